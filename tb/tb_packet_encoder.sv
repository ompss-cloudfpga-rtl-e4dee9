// tb_packet_encoder: self-checking test of the packet encoder.
// Four sources send packets of different lengths at the same time while the
// Shell side stalls at random. The test checks that packets come out whole
// (beats of one packet are never interleaved with another), that every
// source is served, that routing fields are filled in (host node and port for
// responses, destination node and message port for data and acks, own rank
// as source), and the transmit counters.
module tb_packet_encoder;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] in_valid, in_ready;
  net_beat_t [3:0] in_beat;
  logic tx_valid, tx_ready;
  net_beat_t tx;
  logic [3:0][31:0] tx_type_count;
  logic [RANK_W-1:0] node_sel;
  logic [31:0] node_count;

  packet_encoder #(.NIN(4), .RESP_MASK(4'b1100), .NNODES(8)) dut (.clk, .rst_n, .my_rank(8'd4),
    .in_valid, .in_ready, .in_beat, .tx_valid, .tx_ready, .tx, .tx_type_count, .node_sel, .node_count);

  localparam int NPKT = 6;
  int sent_pk [4];
  int sent_bt [4];
  int len_of [4] = '{5, 1, 3, 2};

  // sources: packet p of source s has len_of[s] beats
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      in_valid[s] = rst_n && sent_pk[s] < NPKT;
      in_beat[s] = '0;
      in_beat[s].hdr.ptype = (s == 0) ? PKT_DATA : (s == 1) ? PKT_ACK : PKT_CPU_CMD;
      in_beat[s].hdr.cmd   = (s == 2) ? CMD_MEM_READ : CMD_EXEC_TASK;
      in_beat[s].hdr.dst_rank = RANK_W'(s + 1);
      in_beat[s].hdr.id    = 16'(sent_pk[s]);
      in_beat[s].data      = mark_word(32'(s), 32'(sent_pk[s]), 32'(sent_bt[s]));
      in_beat[s].last      = (sent_bt[s] == len_of[s] - 1);
    end
  end
  always @(posedge clk) begin
    for (int s = 0; s < 4; s++)
      if (in_valid[s] && in_ready[s]) begin
        if (sent_bt[s] == len_of[s] - 1) begin sent_bt[s] <= 0; sent_pk[s] <= sent_pk[s] + 1; end
        else sent_bt[s] <= sent_bt[s] + 1;
      end
    tx_ready <= ($urandom % 3) != 0;
  end

  // sink
  int cur_src = -1, cur_beat = 0, got_pk [4], order [$];
  always @(posedge clk) if (tx_valid && tx_ready) begin
    int s;
    s = (tx.hdr.ptype == PKT_DATA) ? 0 : (tx.hdr.ptype == PKT_ACK) ? 1 : (tx.hdr.cmd == CMD_MEM_READ) ? 2 : 3;
    if (cur_src >= 0) check(s == cur_src, "packet not interleaved");
    check(tx.data == mark_word(32'(s), 32'(got_pk[s]), 32'(cur_beat)), "beat data and order");
    if (s < 2) check(tx.hdr.node == RANK_W'(s + 1) && tx.hdr.udp_port == PORT_MSG && tx.hdr.src_rank == 4, "message routing");
    else check(tx.hdr.ptype == PKT_CPU_RESP && tx.hdr.node == HOST_NODE &&
               tx.hdr.udp_port == ((s == 2) ? PORT_MEM : PORT_TASK), "response header and routing");
    cur_src = s; cur_beat++;
    if (tx.last) begin
      check(cur_beat == len_of[s], "packet length");
      got_pk[s]++; cur_src = -1; cur_beat = 0; order.push_back(s);
    end
  end

  initial begin
    for (int s = 0; s < 4; s++) begin sent_pk[s] = 0; sent_bt[s] = 0; got_pk[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got_pk[0] == NPKT && got_pk[1] == NPKT && got_pk[2] == NPKT && got_pk[3] == NPKT);
    repeat (2) @(posedge clk);
    // round robin: the first four packets come from four different sources
    check(order[0] != order[1] && order[1] != order[2] && order[2] != order[3] && order[0] != order[2] &&
          order[0] != order[3] && order[1] != order[3], "round-robin service");
    check(tx_type_count[PKT_DATA] == NPKT && tx_type_count[PKT_ACK] == NPKT && tx_type_count[PKT_CPU_RESP] == 2 * NPKT,
          "transmit counters");
    node_sel = 8'd1; #1;
    check(node_count == NPKT, "per-node counter");
    node_sel = 8'd2; #1;
    check(node_count == NPKT, "per-node counter for acks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    node_sel = 0;
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
