// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Two instances with DEPTH 4 (small, so it fills often): one writes at
// 156.25 MHz and reads at 200 MHz, the other the reverse. The writers offer
// a counting sequence with random gaps; the readers take words with random
// back-pressure. Each reader checks that every word arrives once and in
// order. The test also checks that each FIFO was seen full (wr_ready low)
// and that the slow-to-fast one ran empty in the middle of the transfer, so
// both pointer crossings decided something.
module tb_async_fifo;
  localparam int N = 3000;
  logic slow = 0, fast = 0, rst_n = 0;
  always #6.4 slow = ~slow;
  always #5   fast = ~fast;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // instance 0: slow -> fast, instance 1: fast -> slow
  logic [1:0] wv, wr, rv, rr;
  logic [1:0][15:0] wd, rd;
  async_fifo #(.WIDTH(16), .DEPTH(4)) u_s2f (.wr_clk(slow), .wr_rst_n(rst_n), .wr_valid(wv[0]), .wr_ready(wr[0]), .wr_data(wd[0]),
    .rd_clk(fast), .rd_rst_n(rst_n), .rd_valid(rv[0]), .rd_ready(rr[0]), .rd_data(rd[0]));
  async_fifo #(.WIDTH(16), .DEPTH(4)) u_f2s (.wr_clk(fast), .wr_rst_n(rst_n), .wr_valid(wv[1]), .wr_ready(wr[1]), .wr_data(wd[1]),
    .rd_clk(slow), .rd_rst_n(rst_n), .rd_valid(rv[1]), .rd_ready(rr[1]), .rd_data(rd[1]));

  int sent [2] = '{0, 0};
  int got  [2] = '{0, 0};
  int bad  [2] = '{0, 0};
  int seen_full [2] = '{0, 0};
  int seen_empty [2] = '{0, 0};

  // writers: instance 0 on slow, instance 1 on fast
  task automatic writer_step(int k);
    if (wv[k] && wr[k]) sent[k]++;
    if (wv[k] && !wr[k]) seen_full[k]++;
    wv[k] <= (sent[k] < N) && ($urandom % 5 != 0);
    wd[k] <= 16'(sent[k]);
  endtask
  task automatic reader_step(int k);
    if (rv[k] && rr[k]) begin
      if (rd[k] != 16'(got[k])) bad[k]++;
      got[k]++;
    end
    if (!rv[k] && got[k] > 0 && got[k] < N) seen_empty[k]++;
    rr[k] <= ($urandom % 3 != 0);
  endtask
  always @(posedge slow) if (rst_n) begin writer_step(0); reader_step(1); end
  always @(posedge fast) if (rst_n) begin writer_step(1); reader_step(0); end

  initial begin
    wv = '0; rr = '0; wd = '0;
    repeat (4) @(posedge slow);
    rst_n = 1;
    wait (got[0] == N && got[1] == N);
    for (int k = 0; k < 2; k++) begin
      check(bad[k] == 0, "words arrive in order, each once");
      check(sent[k] == N, "all words written");
      check(seen_full[k] > 0, "writer saw the FIFO full");
    end
    check(seen_empty[0] > 0, "fast reader ran the FIFO empty during the transfer");
    repeat (20) @(posedge slow);
    check(!rv[0] && !rv[1], "FIFOs empty at the end");
    $display("full cycles %0d %0d", seen_full[0], seen_full[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge fast);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
