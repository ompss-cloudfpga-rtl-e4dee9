// tb_message_sender: self-checking test of the OMPIF send engine.
// A memory model supplies the buffer; the test plays the remote node: it
// checks every frame (size, sequence number, ack request flag, data) and
// acks the last frame of each window after a short delay. The first ack is
// withheld, so the window must be resent after the timeout. A second message
// to the same node must continue the sequence numbers; one to another node
// starts at zero. Frames stream at one beat per cycle.
module tb_message_sender;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int TO = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req_valid, req_ready, done;
  msg_req_t req;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_ready, rd_last;
  mem_cmd_t rd_cmd;
  logic [DATA_W-1:0] rd_data;
  logic tx_valid, tx_ready;
  net_beat_t tx;
  logic ack_valid;
  ack_t ack;
  logic [31:0] retx_count;
  logic wr_cmd_ready, wr_data_ready, wr_done;

  message_sender #(.TIMEOUT(TO), .NNODES(8)) dut (
    .clk, .rst_n, .my_rank(8'd1),
    .req_valid, .req_ready, .req, .done,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready, .rd_data, .rd_last,
    .tx_valid, .tx_ready, .tx, .ack_valid, .ack, .retx_count);

  tb_mem_model mem (.clk, .rst_n,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd, .rd_data_valid, .rd_data_ready, .rd_data, .rd_last,
    .wr_cmd_valid(1'b0), .wr_cmd_ready, .wr_cmd('0), .wr_data_valid(1'b0), .wr_data_ready,
    .wr_data('0), .wr_last(1'b0), .wr_done);

  assign tx_ready = 1'b1;

  // remote side
  int frames_seen = 0, beat_in_frame = 0, acks_withheld = 0, drop_first_ack = 1;
  logic [ADDR_W-1:0] base_addr;
  logic [SEQ_W-1:0]  seq0;
  int  expect_frames, first_beat_cycle, cyc = 0;
  logic [SEQ_W-1:0] pend_seq;
  int  pend_delay = -1;
  logic [RANK_W-1:0] peer;

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    ack_valid <= 1'b0;
    if (pend_delay == 0) begin
      ack_valid <= 1'b1;
      ack.src   <= peer;
      ack.seq   <= pend_seq;
    end
    if (pend_delay >= 0) pend_delay <= pend_delay - 1;
    if (tx_valid && tx_ready) begin
      int f;
      f = int'(tx.hdr.seq - seq0);
      if (beat_in_frame == 0) first_beat_cycle = cyc;
      check(tx.hdr.ptype == PKT_DATA && tx.hdr.dst_rank == peer && tx.hdr.src_rank == 8'd1 && tx.hdr.tag == 8'd7,
            "frame header");
      check(tx.data == init_word(base_addr + ADDR_W'(f * FRAME_BYTES + beat_in_frame * 64)), "frame data");
      beat_in_frame++;
      if (tx.last) begin
        int exp_len;
        exp_len = (f == expect_frames - 1) ? int'(req.bytes) - f * FRAME_BYTES : FRAME_BYTES;
        check(int'(tx.hdr.len) == exp_len && beat_in_frame == exp_len / 64, "frame length");
        check(cyc - first_beat_cycle == beat_in_frame - 1, "one beat per cycle");
        check(tx.hdr.ack_req == ((f % WINDOW) == WINDOW - 1 || f == expect_frames - 1), "ack request flag");
        frames_seen++;
        beat_in_frame = 0;
        if (tx.hdr.ack_req) begin
          if (drop_first_ack) begin drop_first_ack = 0; acks_withheld++; end
          else begin pend_seq <= tx.hdr.seq; pend_delay <= 10; end
        end
      end
    end
  end

  task automatic send_msg(logic [RANK_W-1:0] dst, logic [ADDR_W-1:0] a, int bytes, logic [SEQ_W-1:0] s0);
    int t0;
    peer = dst; base_addr = a; seq0 = s0;
    expect_frames = (bytes + FRAME_BYTES - 1) / FRAME_BYTES;
    frames_seen = 0;
    req.rank = dst; req.tag = 8'd7; req.addr = a; req.bytes = LEN_W'(bytes);
    @(negedge clk); req_valid = 1;
    @(negedge clk); req_valid = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("message of %0d bytes sent in %0d cycles, %0d frames on the wire", bytes, cyc - t0, frames_seen);
  endtask

  initial begin
    req_valid = 0; req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 6 frames: windows of 4 and 2; the first ack is lost
    send_msg(8'd3, 34'h1000, 5 * FRAME_BYTES + 640, 16'd0);
    check(frames_seen == 4 + 4 + 2, "first window resent once");
    check(retx_count == 1 && acks_withheld == 1, "one retransmission counted");
    // same destination: sequence numbers continue at 6
    send_msg(8'd3, 34'h20000, 2 * FRAME_BYTES, 16'd6);
    check(frames_seen == 2, "short message frames");
    // other destination starts at 0, single small frame
    send_msg(8'd5, 34'h40040, 64, 16'd0);
    check(frames_seen == 1 && retx_count == 1, "single-beat message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
