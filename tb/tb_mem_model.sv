// tb_mem_model: behavioural model of board memory behind a data mover
// (testbench only). One read and one write channel with the Role's
// data-mover signals. A read command returns ceil(bytes/64) beats, the last
// one flagged; a write command takes that many beats and pulses wr_done two
// cycles after the last one. Beats never written read as init_word(addr).
// STALL > 0 inserts random idle cycles on the data channels.
module tb_mem_model
  import ompif_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int STALL = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_cmd_valid,
  output logic              rd_cmd_ready,
  input  mem_cmd_t          rd_cmd,
  output logic              rd_data_valid,
  input  logic              rd_data_ready,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_last,
  input  logic              wr_cmd_valid,
  output logic              wr_cmd_ready,
  input  mem_cmd_t          wr_cmd,
  input  logic              wr_data_valid,
  output logic              wr_data_ready,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_last,
  output logic              wr_done
);
  logic [DATA_W-1:0] mem [logic [ADDR_W-7:0]];

  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    if (mem.exists(a[ADDR_W-1:6])) return mem[a[ADDR_W-1:6]];
    return init_word({a[ADDR_W-1:6], 6'd0});
  endfunction

  function automatic void poke(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    mem[a[ADDR_W-1:6]] = d;
  endfunction

  // read side
  logic              rd_busy;
  logic [ADDR_W-1:0] rd_addr;
  int                rd_left;
  logic              rd_gap;
  assign rd_cmd_ready  = !rd_busy;
  assign rd_data_valid = rd_busy && !rd_gap;
  assign rd_data       = peek(rd_addr);
  assign rd_last       = (rd_left == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 0; rd_addr <= '0; rd_left <= 0; rd_gap <= 0;
    end else begin
      rd_gap <= (STALL > 0) ? (($urandom % 100) < STALL) : 1'b0;
      if (!rd_busy && rd_cmd_valid) begin
        rd_busy <= 1;
        rd_addr <= rd_cmd.addr;
        rd_left <= (int'(rd_cmd.bytes) + 63) / 64;
      end else if (rd_data_valid && rd_data_ready) begin
        rd_addr <= rd_addr + 64;
        rd_left <= rd_left - 1;
        if (rd_left == 1) rd_busy <= 0;
      end
    end
  end

  // write side
  logic              wr_busy;
  logic [ADDR_W-1:0] wr_addr;
  int                wr_left;
  int                done_cnt;
  logic              wr_gap;
  assign wr_cmd_ready  = !wr_busy && done_cnt == 0;
  assign wr_data_ready = wr_busy && !wr_gap;
  assign wr_done       = (done_cnt == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy <= 0; wr_addr <= '0; wr_left <= 0; done_cnt <= 0; wr_gap <= 0;
    end else begin
      wr_gap <= (STALL > 0) ? (($urandom % 100) < STALL) : 1'b0;
      if (done_cnt > 0) done_cnt <= done_cnt - 1;
      if (!wr_busy && done_cnt == 0 && wr_cmd_valid) begin
        wr_busy <= 1;
        wr_addr <= wr_cmd.addr;
        wr_left <= (int'(wr_cmd.bytes) + 63) / 64;
      end else if (wr_data_valid && wr_data_ready) begin
        poke(wr_addr, wr_data);
        wr_addr <= wr_addr + 64;
        wr_left <= wr_left - 1;
        if (wr_left == 1 || wr_last) begin
          wr_busy  <= 0;
          done_cnt <= 2;
        end
      end
    end
  end
endmodule
