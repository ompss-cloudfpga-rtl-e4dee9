// tb_memory_manager: self-checking test of the memory manager.
// The host writes three beats and reads them back (write response first,
// then a read response carrying the data); the read also covers a beat that
// was never written. Then data frames arrive: each must be written to the
// temporary buffer one after the other, and a descriptor with source, tag,
// length and buffer address must follow once the write is done. A small
// buffer makes the third frame wrap to the start.
module tb_memory_manager;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam logic [ADDR_W-1:0] TB = 34'h2_0000_0000;
  localparam logic [ADDR_W-1:0] TS = 34'(2 * FRAME_BYTES + 128);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready;
  net_beat_t in_beat;
  logic wr_cmd_valid, wr_cmd_ready, wr_data_valid, wr_data_ready, wr_last, wr_done;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_ready, rd_last;
  mem_cmd_t wr_cmd, rd_cmd;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic rsp_valid, rsp_ready, desc_valid, desc_ready;
  net_beat_t rsp;
  frame_desc_t desc;

  memory_manager #(.TMP_BASE(TB), .TMP_BYTES(TS)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat,
    .wr_cmd_valid, .wr_cmd_ready, .wr_cmd, .wr_data_valid, .wr_data_ready, .wr_data, .wr_last, .wr_done,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready, .rd_data, .rd_last,
    .rsp_valid, .rsp_ready, .rsp, .desc_valid, .desc_ready, .desc);

  tb_mem_model #(.STALL(20)) mem (.clk, .rst_n, .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready,
    .rd_data, .rd_last, .wr_cmd_valid, .wr_cmd_ready, .wr_cmd, .wr_data_valid, .wr_data_ready, .wr_data,
    .wr_last, .wr_done);

  always @(posedge clk) begin
    rsp_ready  <= ($urandom % 4) != 0;
    desc_ready <= ($urandom % 2) != 0;
  end

  net_beat_t rsp_log [$];
  frame_desc_t desc_log [$];
  always @(posedge clk) begin
    if (rsp_valid && rsp_ready) rsp_log.push_back(rsp);
    if (desc_valid && desc_ready) desc_log.push_back(desc);
  end

  task automatic send_pkt(pkt_hdr_t h, int beats, int key);
    for (int b = 0; b < beats; b++) begin
      in_valid = 1; in_beat.hdr = h; in_beat.data = mark_word(32'(key), 32'(b), 0); in_beat.last = (b == beats - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    pkt_hdr_t h;
    in_valid = 0; in_beat = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_MEM_WRITE; h.addr = 34'h4000; h.len = 192; h.id = 16'd1;
    send_pkt(h, 3, 77);
    h.cmd = CMD_MEM_READ; h.len = 256; h.id = 16'd2;
    send_pkt(h, 1, 0);
    wait (rsp_log.size() == 5);
    check(rsp_log[0].hdr.cmd == CMD_MEM_WRITE && rsp_log[0].hdr.id == 1 && rsp_log[0].last, "write response");
    for (int b = 0; b < 3; b++)
      check(rsp_log[1+b].data == mark_word(77, 32'(b), 0) && !rsp_log[1+b].last && rsp_log[1+b].hdr.id == 2, "read back");
    check(rsp_log[4].data == init_word(34'h4000 + 3 * 64) && rsp_log[4].last, "read of unwritten beat");
    // three frames of 22 beats
    for (int f = 0; f < 3; f++) begin
      h = '0; h.ptype = PKT_DATA; h.node = RANK_W'(f + 1); h.tag = 8'(f + 10); h.len = 16'(FRAME_BYTES);
      send_pkt(h, FRAME_BEATS, 100 + f);
    end
    wait (desc_log.size() == 3);
    for (int f = 0; f < 3; f++) begin
      logic [ADDR_W-1:0] exp_a;
      exp_a = TB + ((f == 2) ? 0 : ADDR_W'(f * FRAME_BYTES));
      check(desc_log[f].src == RANK_W'(f + 1) && desc_log[f].tag == 8'(f + 10) && desc_log[f].len == FRAME_BYTES &&
            desc_log[f].buf_addr == exp_a, "frame descriptor (third wraps)");
      // frame 0 has been overwritten by frame 2 after the wrap
      if (f > 0) check(mem.peek(exp_a) == mark_word(32'(100 + f), 0, 0) &&
            mem.peek(exp_a + 21 * 64) == mark_word(32'(100 + f), 21, 0), "frame stored in buffer");
    end
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
