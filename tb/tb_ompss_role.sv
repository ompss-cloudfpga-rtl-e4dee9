// tb_ompss_role: end-to-end test of the Role on a three-FPGA cluster, with
// every parameter of the Role at its default (2048-particle blocks).
//
// Three Roles are connected by a model of the network that delivers packets
// in order; it loses the second data frame sent by rank 0 and the first ack
// sent by rank 2. Each Role has its own board memory model and models of the
// four force and one update accelerators. A host model:
//   1. sets rank and cluster size of every node;
//   2. writes two beats of particle data and reads them back;
//   3. starts the distributed N-body task on every node (3 blocks, 2 steps)
//      and polls the debug counters of every node while it runs;
//   4. waits for the three task completions;
//   5. reads the counters and a force block that rank 0 received from rank 2.
// The update models check, for every block, that the force data they read is
// what the owning rank's last force task wrote, so the allgather, the frame
// split, the retransmissions and the task ordering are all checked through
// the data. The test also counts how often each mechanism of the design
// happened and fails if one never did: window resend, duplicate and gap
// drops, short last frame, dependence stall, a task overtaking a blocked
// older one, taskwait, receive wait, memory and encoder contention, acks.
module tb_ompss_role;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int NN = 3, NF = 4, NU = 1, NE = NF + NU;
  localparam int BLK = 2048, NBLK = 3, STEPS = 2;
  localparam int PER = NBLK / NN;
  localparam int FB = BLK * 12;
  localparam logic [63:0] PARTS = 64'h1000_0000, FORCES = 64'h2000_0000;

  // 200 MHz Role clock and 156.25 MHz Shell network clock
  logic clk = 0, rst_n = 0, net_clk = 0;
  always #5 clk = ~clk;
  always #6.4 net_clk = ~net_clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- nodes ----------------
  logic      [NN-1:0] rx_valid, rx_ready, tx_valid, fired;
  net_beat_t [NN-1:0] rx, tx;
  logic [NN-1:0][31:0] retx;
  logic [NN-1:0][RANK_W-1:0] ranks;
  logic [NN-1:0][RANK_W:0]   csizes;

  for (genvar n = 0; n < NN; n++) begin : g_node
    logic mrcv, mrcr, mrdv, mrdr, mrl, mwcv, mwcr, mwdv, mwdr, mwl, mwd;
    mem_cmd_t mrc, mwc;
    logic [DATA_W-1:0] mrd, mwdat;
    logic [NE-1:0] et_v, et_r, e_done, erc_v, erc_r, erd_v, erd_r, ewc_v, ewc_r, ewd_v, ewd_r, ew_l, ew_done;
    task_t et;
    mem_cmd_t [NE-1:0] erc, ewc;
    logic [DATA_W-1:0] erd;
    logic erl;
    logic [NE-1:0][DATA_W-1:0] ewd;
    logic [RANK_W-1:0] rank;
    logic [RANK_W:0] csize;
    assign ranks[n]  = rank;
    assign csizes[n] = csize;

    ompss_role u_role (
      .clk, .rst_n, .net_clk, .net_rst_n(rst_n),
      .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]), .rx(rx[n]),
      .tx_valid(tx_valid[n]), .tx_ready(1'b1), .tx(tx[n]),
      .mem_rd_cmd_valid(mrcv), .mem_rd_cmd_ready(mrcr), .mem_rd_cmd(mrc),
      .mem_rd_data_valid(mrdv), .mem_rd_data_ready(mrdr), .mem_rd_data(mrd), .mem_rd_last(mrl),
      .mem_wr_cmd_valid(mwcv), .mem_wr_cmd_ready(mwcr), .mem_wr_cmd(mwc),
      .mem_wr_data_valid(mwdv), .mem_wr_data_ready(mwdr), .mem_wr_data(mwdat), .mem_wr_last(mwl), .mem_wr_done(mwd),
      .ext_task_valid(et_v), .ext_task_ready(et_r), .ext_task(et), .ext_done(e_done),
      .ext_rd_cmd_valid(erc_v), .ext_rd_cmd_ready(erc_r), .ext_rd_cmd(erc),
      .ext_rd_data_valid(erd_v), .ext_rd_data_ready(erd_r), .ext_rd_data(erd), .ext_rd_last(erl),
      .ext_wr_cmd_valid(ewc_v), .ext_wr_cmd_ready(ewc_r), .ext_wr_cmd(ewc),
      .ext_wr_data_valid(ewd_v), .ext_wr_data_ready(ewd_r), .ext_wr_data(ewd), .ext_wr_last(ew_l), .ext_wr_done(ew_done),
      .my_rank(rank), .cluster_size(csize), .retx_count(retx[n])
    );

    tb_mem_model #(.STALL(5)) u_mem (.clk, .rst_n,
      .rd_cmd_valid(mrcv), .rd_cmd_ready(mrcr), .rd_cmd(mrc), .rd_data_valid(mrdv), .rd_data_ready(mrdr),
      .rd_data(mrd), .rd_last(mrl), .wr_cmd_valid(mwcv), .wr_cmd_ready(mwcr), .wr_cmd(mwc),
      .wr_data_valid(mwdv), .wr_data_ready(mwdr), .wr_data(mwdat), .wr_last(mwl), .wr_done(mwd));

    for (genvar a = 0; a < NE; a++) begin : g_acc
      int runs, bad;
      tb_acc_model #(.IS_UPDATE(a >= NF), .PARTS(PARTS), .FORCES(FORCES), .BLOCK(BLK), .NBLK(NBLK), .PER(PER)) u_acc (
        .clk, .rst_n, .rank,
        .task_valid(et_v[a]), .task_ready(et_r[a]), .task_i(et), .done(e_done[a]),
        .rd_cmd_valid(erc_v[a]), .rd_cmd_ready(erc_r[a]), .rd_cmd(erc[a]),
        .rd_data_valid(erd_v[a]), .rd_data_ready(erd_r[a]), .rd_data(erd), .rd_last(erl),
        .wr_cmd_valid(ewc_v[a]), .wr_cmd_ready(ewc_r[a]), .wr_cmd(ewc[a]),
        .wr_data_valid(ewd_v[a]), .wr_data_ready(ewd_r[a]), .wr_data(ewd[a]), .wr_last(ew_l[a]), .wr_done(ew_done[a]),
        .tasks_run(runs), .mismatches(bad));
    end
  end

  // ---------------- network and host ----------------
  net_beat_t rxq [NN][$];
  net_beat_t pkt [NN][$];
  net_beat_t host_rsp [NN][$];
  int data_sent [NN], acks_sent [NN];
  int n_dropped_data = 0, n_dropped_ack = 0, n_short_frames = 0, n_poll_rsp = 0, n_poll = 0;
  localparam logic [ID_W-1:0] POLL_ID = 16'h30;
  bit polling = 0;

  // While the distributed task runs, the host reads the debug counters of
  // every node now and then, as a monitoring host would; the replies share
  // the encoder with the message traffic.
  always @(negedge clk) if (polling && cyc % 97 == 0) begin
    for (int n = 0; n < NN; n++) begin
      net_beat_t b;
      b = '0; b.hdr.ptype = PKT_CPU_CMD; b.hdr.cmd = CMD_READ_CNT; b.hdr.node = HOST_NODE;
      b.hdr.dst_rank = RANK_W'((n + 1) % NN); b.hdr.id = POLL_ID; b.last = 1;
      rxq[n].push_back(b);
      n_poll++;
    end
  end

  function automatic void push_pkt(int n, pkt_hdr_t h, int beats, int key);
    net_beat_t b;
    for (int i = 0; i < beats; i++) begin
      b.hdr = h; b.data = mark_word(32'(key), 32'(i), 32'h77); b.last = (i == beats - 1);
      rxq[n].push_back(b);
    end
  endfunction

  always @(posedge net_clk) for (int n = 0; n < NN; n++) begin
    fired[n] <= rx_valid[n] && rx_ready[n];
    if (rst_n && tx_valid[n]) begin
      pkt[n].push_back(tx[n]);
      if (tx[n].last) begin
        pkt_hdr_t h;
        bit drop;
        h = tx[n].hdr;
        drop = 0;
        if (h.ptype == PKT_DATA) begin
          data_sent[n]++;
          if (int'(h.len) != FRAME_BYTES) n_short_frames++;
          if (n == 0 && data_sent[n] == 2) begin drop = 1; n_dropped_data++; end
        end
        if (h.ptype == PKT_ACK) begin
          acks_sent[n]++;
          if (n == 2 && acks_sent[n] == 1) begin drop = 1; n_dropped_ack++; end
        end
        if (h.node == HOST_NODE) begin
          check(h.ptype == PKT_CPU_RESP, "only responses go to the host");
          if (h.id == POLL_ID) n_poll_rsp++;   // answers to the counter polling below
          else foreach (pkt[n][i]) host_rsp[n].push_back(pkt[n][i]);
        end else if (!drop) begin
          check(int'(h.node) < NN && h.src_rank == RANK_W'(n), "message routing");
          foreach (pkt[n][i]) begin
            net_beat_t b;
            b = pkt[n][i];
            b.hdr.node = RANK_W'(n);   // the receiving side sees the sender's node
            rxq[int'(h.node)].push_back(b);
          end
        end
        pkt[n].delete();
      end
    end
  end

  always @(negedge net_clk) for (int n = 0; n < NN; n++) begin
    if (fired[n]) void'(rxq[n].pop_front());
    rx_valid[n] = rst_n && rxq[n].size() > 0;
    rx[n] = (rxq[n].size() > 0) ? rxq[n][0] : '0;
  end

  // ---------------- mechanism counters ----------------
  int m_dup = 0, m_gap = 0, m_dep_stall = 0, m_taskwait = 0, m_recv_wait = 0, m_mem_contend = 0,
      m_enc_contend = 0, m_head_block = 0, m_overtake = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // one block per node instance; written out because hierarchical names need constant indices
    `define MECH(N) \
      if (g_node[N].u_role.u_dec.rx_valid && g_node[N].u_role.u_dec.rx_ready && !g_node[N].u_role.u_dec.in_pkt && \
          g_node[N].u_role.u_dec.rx.hdr.ptype == PKT_DATA) begin \
        if (g_node[N].u_role.u_dec.is_dup) m_dup++; \
        else if (!g_node[N].u_role.u_dec.is_new) m_gap++; \
      end \
      if (g_node[N].u_role.u_pom.head_ok && g_node[N].u_role.u_pom.conflict) m_dep_stall++; \
      if (g_node[N].u_role.u_pom.pop && g_node[N].u_role.u_pom.overtake) m_overtake++; \
      if ((g_node[N].u_role.u_creator.state == 4'd3 || g_node[N].u_role.u_creator.state == 4'd6) && \
          g_node[N].u_role.u_creator.pending != 0) m_taskwait++; \
      if (g_node[N].u_role.u_recv.state == 4'd2) m_recv_wait++; \
      if ($countones(g_node[N].u_role.u_x.m_rd_cmd_valid) > 1) m_mem_contend++; \
      if ($countones(g_node[N].u_role.u_enc.in_valid) > 1) m_enc_contend++;
    `MECH(0)
    `MECH(1)
    `MECH(2)
    `undef MECH
  end

  function automatic logic [DATA_W-1:0] force_word(int j, int i, int r, int b);
    return mark_word(32'(j) ^ 32'hF0F0_0000, 32'(i + 16 * r), 32'(b));
  endfunction

  initial begin
    pkt_hdr_t h;
    int t0;
    rx_valid = '0; rx = '0;
    for (int n = 0; n < NN; n++) begin data_sent[n] = 0; acks_sent[n] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_SET_RANK; h.dst_rank = RANK_W'(n); h.len = 16'(NN);
      push_pkt(n, h, 1, 0);
      h.cmd = CMD_MEM_WRITE; h.addr = ADDR_W'(PARTS); h.len = 128; h.id = 16'h10;
      push_pkt(n, h, 2, 100 + n);
      h.cmd = CMD_MEM_READ; h.id = 16'h11;
      push_pkt(n, h, 1, 0);
    end
    wait (host_rsp[0].size() >= 3 && host_rsp[1].size() >= 3 && host_rsp[2].size() >= 3);
    for (int n = 0; n < NN; n++) begin
      check(ranks[n] == RANK_W'(n) && int'(csizes[n]) == NN, "rank and size set");
      check(host_rsp[n][0].hdr.cmd == CMD_MEM_WRITE && host_rsp[n][0].hdr.id == 16'h10, "write response");
      check(host_rsp[n][1].data == mark_word(32'(100 + n), 0, 32'h77) &&
            host_rsp[n][2].data == mark_word(32'(100 + n), 1, 32'h77) && host_rsp[n][2].last, "host read back");
      host_rsp[n].delete();
    end
    // start the distributed task
    t0 = cyc;
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      net_beat_t b;
      h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_EXEC_TASK; h.tag = TT_CREATOR; h.id = 16'(16'h100 + n);
      b.hdr = h; b.last = 1; b.data = '0;
      b.data[63:0] = PARTS; b.data[127:64] = FORCES; b.data[191:128] = 64'(NBLK); b.data[255:192] = 64'(STEPS);
      rxq[n].push_back(b);
    end
    polling = 1;
    wait (host_rsp[0].size() >= 1 && host_rsp[1].size() >= 1 && host_rsp[2].size() >= 1);
    polling = 0;
    $display("distributed N-body task finished on all nodes after %0d cycles", cyc - t0);
    for (int n = 0; n < NN; n++) begin
      check(host_rsp[n][0].hdr.cmd == CMD_EXEC_TASK && host_rsp[n][0].hdr.id == 16'(16'h100 + n), "task completion reported");
      host_rsp[n].delete();
    end
    `define ACCS(N) \
      check(g_node[N].g_acc[0].runs + g_node[N].g_acc[1].runs + g_node[N].g_acc[2].runs + g_node[N].g_acc[3].runs \
            == STEPS * NBLK * PER, "force tasks run"); \
      check(g_node[N].g_acc[4].runs == STEPS * NBLK, "update tasks run"); \
      check(g_node[N].g_acc[4].bad == 0, "every force block read by the update tasks is correct");
    `ACCS(0)
    `ACCS(1)
    `ACCS(2)
    `undef ACCS
    // counters of node 0, about node 1
    @(negedge clk);
    h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_READ_CNT; h.dst_rank = 8'd1; h.id = 16'h20;
    push_pkt(0, h, 1, 0);
    // force block 2 (owned by rank 2) as received by rank 0
    h.cmd = CMD_MEM_READ; h.addr = ADDR_W'(FORCES + 64'(2 * FB)); h.len = 128; h.id = 16'h21;
    push_pkt(0, h, 1, 0);
    wait (host_rsp[0].size() >= 3);
    // node 0 receives 2 messages of ceil(FB/1408) frames per step, plus resent ones
    check(host_rsp[0][0].data[95:64] >= 32'(STEPS * (NN - 1) * ((FB + FRAME_BYTES - 1) / FRAME_BYTES)), "data frames counted");
    check(host_rsp[0][0].data[287:256] > 0 && host_rsp[0][0].data[319:288] > 0, "per-node message counters");
    check(host_rsp[0][1].data == force_word(2, NBLK - 1, 2, 0) && host_rsp[0][2].data == force_word(2, NBLK - 1, 2, 1),
          "allgathered force block in rank 0 memory");
    // mechanisms
    $display("mechanisms: retransmissions=%0d duplicates dropped=%0d frames dropped after a gap=%0d lost data=%0d lost acks=%0d",
             retx[0] + retx[1] + retx[2], m_dup, m_gap, n_dropped_data, n_dropped_ack);
    $display("            short last frames=%0d dependence stall cycles=%0d taskwait cycles=%0d receive wait cycles=%0d",
             n_short_frames, m_dep_stall, m_taskwait, m_recv_wait);
    $display("            memory contention cycles=%0d encoder contention cycles=%0d acks=%0d tasks overtaking a blocked one=%0d",
             m_mem_contend, m_enc_contend, acks_sent[0] + acks_sent[1] + acks_sent[2], m_overtake);
    check(retx[0] + retx[1] + retx[2] >= 2, "window retransmission happened");
    check(m_dup > 0, "duplicate frames dropped");
    check(m_gap > 0, "frames after a loss dropped");
    check(n_short_frames > 0, "message split with a short last frame");
    check(acks_sent[0] > 0 && acks_sent[1] > 0 && acks_sent[2] > 0, "acks sent by every node");
    check(m_dep_stall > 0, "dependence stall in the runtime");
    check(m_overtake > 0, "ready task dispatched past a blocked older one");
    check(m_taskwait > 0, "taskwait waited");
    check(m_recv_wait > 0, "receive waited for its frames");
    check(m_mem_contend > 0, "memory interconnect contention");
    check(m_enc_contend > 0, "encoder contention");
    check(n_poll > 0 && n_poll_rsp == n_poll, "every counter poll answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    `define DBG(N) $display("node %0d: creator %0d pending %0d q %0d send %0d recv %0d stored %0d mm %0d hostrsp %0d rxq %0d retx %0d", N, \
      g_node[N].u_role.u_creator.state, g_node[N].u_role.u_creator.pending, g_node[N].u_role.u_pom.q_count, \
      g_node[N].u_role.u_send.state, g_node[N].u_role.u_recv.state, g_node[N].u_role.u_recv.total, g_node[N].u_role.u_mm.state, \
      host_rsp[N].size(), rxq[N].size(), retx[N]);
    `DBG(0)
    `DBG(1)
    `DBG(2)
    `undef DBG
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
