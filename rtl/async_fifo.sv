// async_fifo: first-in first-out buffer between two unrelated clocks.
//
// Used at the Role's network boundary: the Shell's streams run on the
// Shell's network clock (156.25 MHz in the original system) while the Role
// runs on the accelerator clock (200 MHz). A dual-clock RAM of DEPTH entries
// holds the data. Each side keeps a binary pointer one bit wider than the
// address plus its Gray-code copy. The Gray pointer crosses to the other
// clock through two flip-flops, so only one bit changes per step and a
// crossing value is either the old or the new pointer. The writer is full
// when the synchronised read pointer equals its own with the two top bits
// inverted; the reader is empty when the synchronised write pointer equals
// its own.
//
// Interface: wr_valid/wr_ready/wr_data on wr_clk, rd_valid/rd_ready/rd_data
// on rd_clk, each side with its own active-low reset (assert both together).
// Read data is taken from the RAM combinationally, so a word written is
// visible to the reader three read-clock edges later, and a free slot to the
// writer three write-clock edges after it was read. The document gives the
// two clocks; the FIFO and its depth are this design's own choices.
module async_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8          // power of two, at least 4
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the reader

  function automatic logic [AW:0] to_gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wr_clk) if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= to_gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= to_gray(rbin + 1'b1);
      end
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0) else $error("async_fifo: DEPTH must be a power of two >= 4");
endmodule
