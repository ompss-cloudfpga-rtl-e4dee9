// tb_packet_decoder: self-checking test of the Role's packet decoder.
// It feeds packets of every class and checks where each beat goes: tasks to
// the runtime, memory commands and data frames to the memory manager, acks
// to the sender. Data frames test the duplicate and gap rules: an in-order
// frame is stored, a resent one is dropped but still acked, a frame after a
// lost one is dropped and not acked. The rank registers and the counter
// report are checked last. Outputs are stalled at random to test back-pressure.
module tb_packet_decoder;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rx_valid, rx_ready, task_valid, task_ready, mm_valid, mm_ready, ack_valid, rsp_valid, rsp_ready;
  net_beat_t rx, mm, rsp;
  task_t task_o;
  ack_t ack;
  logic [RANK_W-1:0] my_rank, tx_node_sel;
  logic [RANK_W:0] cluster_size;
  logic [3:0][31:0] rx_type_count;

  packet_decoder #(.NNODES(8)) dut (.clk, .rst_n, .rx_valid, .rx_ready, .rx,
    .task_valid, .task_ready, .task_o, .mm_valid, .mm_ready, .mm, .ack_valid, .ack,
    .rsp_valid, .rsp_ready, .rsp, .my_rank, .cluster_size,
    .tx_type_count({32'd4, 32'd3, 32'd2, 32'd1}), .tx_node_sel, .tx_node_count(32'h77),
    .rx_type_count);

  always @(posedge clk) begin
    task_ready <= ($urandom % 4) != 0;
    mm_ready   <= ($urandom % 4) != 0;
    rsp_ready  <= ($urandom % 3) != 0;
  end

  // collectors
  int n_task = 0, n_mm_beats = 0, n_ack = 0, n_rsp = 0;
  task_t    last_task;
  net_beat_t mm_log [$];
  ack_t     last_ack;
  net_beat_t rsp_log [$];
  always @(posedge clk) if (rst_n) begin
    if (task_valid && task_ready) begin n_task++; last_task = task_o; end
    if (mm_valid && mm_ready) begin n_mm_beats++; mm_log.push_back(mm); end
    if (ack_valid) begin n_ack++; last_ack = ack; end
    if (rsp_valid && rsp_ready) begin n_rsp++; rsp_log.push_back(rsp); end
  end

  task automatic send_pkt(pkt_hdr_t h, int beats);
    for (int b = 0; b < beats; b++) begin
      rx_valid = 1; rx.hdr = h; rx.data = mark_word(32'(h.seq), 32'(b), 32'(h.ptype)); rx.last = (b == beats - 1);
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
      #1;
    end
    rx_valid = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  function automatic pkt_hdr_t data_hdr(int src, int seq, bit ackreq);
    pkt_hdr_t h = '0;
    h.ptype = PKT_DATA; h.node = RANK_W'(src); h.src_rank = RANK_W'(src); h.tag = 8'd9;
    h.seq = SEQ_W'(seq); h.ack_req = ackreq; h.len = 16'(3 * 64);
    return h;
  endfunction

  initial begin
    pkt_hdr_t h;
    int mm0, rsp0;
    rx_valid = 0; rx = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // host task
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_EXEC_TASK; h.tag = TT_CREATOR; h.id = 16'h42;
    send_pkt(h, 1);
    check(n_task == 1 && last_task.ttype == TT_CREATOR && last_task.id == 16'h42 &&
          last_task.parent == PARENT_HOST && last_task.args == mark_word(0, 0, 0), "task forwarded");
    // memory write of 4 beats and read
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_MEM_WRITE; h.addr = 34'h100; h.len = 256;
    send_pkt(h, 4);
    h.cmd = CMD_MEM_READ;
    send_pkt(h, 1);
    check(n_mm_beats == 5 && mm_log[3].last && mm_log[4].hdr.cmd == CMD_MEM_READ, "memory commands forwarded");
    // data frames from node 2: seq 0,1,2,3(ack)
    for (int s = 0; s < 4; s++) send_pkt(data_hdr(2, s, s == 3), 3);
    check(n_mm_beats == 5 + 12, "in-order frames stored");
    check(n_rsp == 1 && rsp_log[0].hdr.ptype == PKT_ACK && rsp_log[0].hdr.seq == 3 && rsp_log[0].hdr.dst_rank == 2,
          "window acked");
    check(mm_log[5].data == mark_word(0, 0, 32'(PKT_DATA)) && mm_log[16].last, "frame beats intact");
    // resend of frames 2,3: dropped, ack repeated
    mm0 = n_mm_beats; rsp0 = n_rsp;
    send_pkt(data_hdr(2, 2, 0), 3);
    send_pkt(data_hdr(2, 3, 1), 3);
    check(n_mm_beats == mm0 && n_rsp == rsp0 + 1 && rsp_log[rsp0].hdr.seq == 3, "duplicates dropped and re-acked");
    // gap: 4 lost, 5..7 arrive -> dropped, no ack
    mm0 = n_mm_beats; rsp0 = n_rsp;
    for (int s = 5; s < 8; s++) send_pkt(data_hdr(2, s, s == 7), 3);
    check(n_mm_beats == mm0 && n_rsp == rsp0, "frames after a gap dropped, no ack");
    // resent window 4..7 accepted
    for (int s = 4; s < 8; s++) send_pkt(data_hdr(2, s, s == 7), 3);
    check(n_mm_beats == mm0 + 12 && n_rsp == rsp0 + 1, "resent window accepted");
    // a frame from node 5 has its own sequence
    send_pkt(data_hdr(5, 0, 1), 3);
    check(n_mm_beats == mm0 + 15 && rsp_log[n_rsp-1].hdr.dst_rank == 5, "per-source sequence");
    // ack message
    h = '0; h.ptype = PKT_ACK; h.node = 6; h.seq = 16'd11;
    send_pkt(h, 1);
    check(n_ack == 1 && last_ack.src == 6 && last_ack.seq == 11, "ack passed to sender");
    // rank registers
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_SET_RANK; h.dst_rank = 8'd3; h.len = 16'd56;
    send_pkt(h, 1);
    check(my_rank == 3 && cluster_size == 56, "rank and size set");
    // counter report for node 2
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_READ_CNT; h.dst_rank = 8'd2; h.id = 16'h9;
    rsp0 = n_rsp;
    send_pkt(h, 1);
    repeat (5) @(posedge clk);
    check(n_rsp == rsp0 + 1 && rsp_log[rsp0].hdr.ptype == PKT_CPU_RESP && rsp_log[rsp0].hdr.id == 16'h9, "counter report sent");
    // rx: cmd 1 task + 2 mem + 1 set-rank (before this one) = 4; data 4+2+3+4+1 = 14; ack 1
    check(rsp_log[rsp0].data[31:0] == 4 && rsp_log[rsp0].data[95:64] == 14 && rsp_log[rsp0].data[127:96] == 1,
          "receive counters by type");
    check(rsp_log[rsp0].data[159:128] == 1 && rsp_log[rsp0].data[255:224] == 4, "transmit counters copied");
    check(rsp_log[rsp0].data[287:256] == 13 && rsp_log[rsp0].data[319:288] == 32'h77, "per-node counters");
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
