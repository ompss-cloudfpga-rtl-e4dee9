// tb_message_receiver: self-checking test of the OMPIF receive engine.
// Frames from two sources and two tags are announced as descriptors (their
// data is whatever the memory model holds at the buffer address). A receive
// for source 2, tag 5, of two frames must copy exactly those two frames, in
// arrival order, to consecutive destination addresses, skip the others, and
// leave the non-matching descriptors stored. A receive issued before its
// frame arrives must wait for it.
module tb_message_receiver;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic desc_valid, desc_ready, req_valid, req_ready, done;
  frame_desc_t desc;
  msg_req_t req;
  logic wr_cmd_valid, wr_cmd_ready, wr_data_valid, wr_data_ready, wr_last, wr_done;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_ready, rd_last;
  mem_cmd_t wr_cmd, rd_cmd;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic [4:0] stored;

  message_receiver #(.NDESC(16), .NNODES(8)) dut (.clk, .rst_n, .desc_valid, .desc_ready, .desc, .req_valid, .req_ready, .req, .done,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready, .rd_data, .rd_last,
    .wr_cmd_valid, .wr_cmd_ready, .wr_cmd, .wr_data_valid, .wr_data_ready, .wr_data, .wr_last, .wr_done, .stored);

  tb_mem_model #(.STALL(10)) mem (.clk, .rst_n, .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready,
    .rd_data, .rd_last, .wr_cmd_valid, .wr_cmd_ready, .wr_cmd, .wr_data_valid, .wr_data_ready, .wr_data,
    .wr_last, .wr_done);

  localparam logic [ADDR_W-1:0] BUF = 34'h1_0000_0000;

  task automatic post(int src, int tag, int slot, int len);
    desc_valid = 1; desc.src = RANK_W'(src); desc.tag = TAG_W'(tag); desc.len = FLEN_W'(len);
    desc.buf_addr = BUF + ADDR_W'(slot * FRAME_BYTES);
    @(posedge clk);
    while (!desc_ready) @(posedge clk);
    #1 desc_valid = 0;
  endtask

  int done_cnt = 0;
  always @(posedge clk) if (done) done_cnt++;

  initial begin
    desc_valid = 0; desc = '0; req_valid = 0; req = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    post(3, 5, 0, FRAME_BYTES);     // other source
    post(2, 5, 1, FRAME_BYTES);     // first frame of the message
    post(2, 6, 2, 640);             // other tag
    post(2, 5, 3, 640);             // second (last) frame
    check(stored == 4, "four descriptors stored");
    req_valid = 1; req.rank = 2; req.tag = 5; req.addr = 34'h8000; req.bytes = FRAME_BYTES + 640;
    @(posedge clk); #1 req_valid = 0;
    wait (done_cnt == 1); @(posedge clk); #1;
    for (int b = 0; b < FRAME_BEATS; b++)
      check(mem.peek(34'h8000 + ADDR_W'(b * 64)) == init_word(BUF + ADDR_W'(FRAME_BYTES + b * 64)), "first frame copied");
    for (int b = 0; b < 10; b++)
      check(mem.peek(34'h8000 + ADDR_W'(FRAME_BYTES + b * 64)) == init_word(BUF + ADDR_W'(3 * FRAME_BYTES + b * 64)),
            "second frame copied after the first");
    check(mem.peek(34'h8000 + ADDR_W'(FRAME_BYTES + 640)) == init_word(34'h8000 + ADDR_W'(FRAME_BYTES + 640)),
          "nothing written past the message");
    check(stored == 2, "matched descriptors removed");
    // a receive waiting for its frame
    req_valid = 1; req.rank = 7; req.tag = 1; req.addr = 34'hC000; req.bytes = 128;
    @(posedge clk); #1 req_valid = 0;
    repeat (50) @(posedge clk); #1;
    check(done_cnt == 1, "receive waits for a matching frame");
    post(7, 1, 9, 128);
    wait (done_cnt == 2); @(posedge clk); #1;
    check(mem.peek(34'hC040) == init_word(BUF + ADDR_W'(9 * FRAME_BYTES + 64)), "late frame copied");
    check(stored == 2, "remaining descriptors kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
