// tb_util_pkg: helpers shared by the testbenches.
//
// init_word gives the contents of a never-written memory beat, so that a
// test can predict what any read returns without loading memory first:
// every 32-bit lane holds the beat index XOR a lane-dependent constant.
package tb_util_pkg;
  import ompif_pkg::*;

  function automatic logic [DATA_W-1:0] init_word(logic [ADDR_W-1:0] addr);
    logic [DATA_W-1:0] w;
    for (int l = 0; l < DATA_W / 32; l++)
      w[l*32 +: 32] = 32'(addr >> 6) ^ (32'h5A00_0000 + 32'(l));
    return w;
  endfunction

  // a recognisable beat: tag word, then a running number
  function automatic logic [DATA_W-1:0] mark_word(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    logic [DATA_W-1:0] w;
    for (int l = 0; l < DATA_W / 32; l++)
      w[l*32 +: 32] = a ^ (b << 8) ^ (c << 20) ^ 32'(l);
    return w;
  endfunction
endpackage
