// tb_nbody_workload: the distributed N-body workload on a three-FPGA cluster,
// with the Role at its default parameters and the force accelerators taking
// their real computation time.
//
// The evaluated workloads run 30 blocks of 2048 particles per FPGA for 16
// time steps on up to 56 FPGAs. That is far too long to simulate; this test
// keeps the block size and the accelerator rate and shrinks the rest: 3
// FPGAs, 4 blocks of 2048 particles per FPGA (12 blocks, 24576 particles), 2
// time steps. At least four blocks per FPGA are needed to keep its four force
// accelerators busy: the force tasks of one block all update that block's
// forces, so they run one after another. Each force task takes 2048*2048/8 cycles (8 forces per cycle,
// as in the evaluated bitstream), and each FPGA has four force accelerators
// and one update accelerator. The network is lossless here; losses are
// covered by tb_ompss_role.
//
// Checks: every node finishes and reports its task; every force and update
// task ran; every force block read by an update task holds the data written
// by its owner's last force task (so the allgather delivered everything);
// and the efficiency, ideal force time over measured time, is at least 95%.
// The ideal time is the force work of one FPGA divided over its four
// accelerators. The original system reports 97% on one FPGA and 98% of the
// ideal scaling on 56. The pair rate at 200 MHz is printed for reference.
module tb_nbody_workload;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int NN = 3, NF = 4, NU = 1, NE = NF + NU;
  localparam int BLK = 2048, NBLK = 12, STEPS = 2;
  localparam int PER = NBLK / NN;
  localparam int COMPUTE = BLK * BLK / 8;
  localparam logic [63:0] PARTS = 64'h1000_0000, FORCES = 64'h2000_0000;

  // 200 MHz Role clock and 156.25 MHz Shell network clock
  logic clk = 0, rst_n = 0, net_clk = 0;
  always #5 clk = ~clk;
  always #6.4 net_clk = ~net_clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- nodes ----------------
  logic      [NN-1:0] rx_valid, rx_ready, tx_valid, fired;
  net_beat_t [NN-1:0] rx, tx;
  logic [NN-1:0][31:0] retx;

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

    tb_mem_model #(.STALL(2)) u_mem (.clk, .rst_n,
      .rd_cmd_valid(mrcv), .rd_cmd_ready(mrcr), .rd_cmd(mrc), .rd_data_valid(mrdv), .rd_data_ready(mrdr),
      .rd_data(mrd), .rd_last(mrl), .wr_cmd_valid(mwcv), .wr_cmd_ready(mwcr), .wr_cmd(mwc),
      .wr_data_valid(mwdv), .wr_data_ready(mwdr), .wr_data(mwdat), .wr_last(mwl), .wr_done(mwd));

    for (genvar a = 0; a < NE; a++) begin : g_acc
      int runs, bad;
      tb_acc_model #(.IS_UPDATE(a >= NF), .PARTS(PARTS), .FORCES(FORCES), .BLOCK(BLK), .NBLK(NBLK), .PER(PER),
                     .COMPUTE(COMPUTE)) u_acc (
        .clk, .rst_n, .rank,
        .task_valid(et_v[a]), .task_ready(et_r[a]), .task_i(et), .done(e_done[a]),
        .rd_cmd_valid(erc_v[a]), .rd_cmd_ready(erc_r[a]), .rd_cmd(erc[a]),
        .rd_data_valid(erd_v[a]), .rd_data_ready(erd_r[a]), .rd_data(erd), .rd_last(erl),
        .wr_cmd_valid(ewc_v[a]), .wr_cmd_ready(ewc_r[a]), .wr_cmd(ewc[a]),
        .wr_data_valid(ewd_v[a]), .wr_data_ready(ewd_r[a]), .wr_data(ewd[a]), .wr_last(ew_l[a]), .wr_done(ew_done[a]),
        .tasks_run(runs), .mismatches(bad));
    end
  end

  // ---------------- lossless network and host ----------------
  net_beat_t rxq [NN][$];
  net_beat_t pkt [NN][$];
  net_beat_t host_rsp [NN][$];

  always @(posedge net_clk) for (int n = 0; n < NN; n++) begin
    fired[n] <= rx_valid[n] && rx_ready[n];
    if (rst_n && tx_valid[n]) begin
      pkt[n].push_back(tx[n]);
      if (tx[n].last) begin
        pkt_hdr_t h;
        h = tx[n].hdr;
        if (h.node == HOST_NODE) begin
          foreach (pkt[n][i]) host_rsp[n].push_back(pkt[n][i]);
        end else begin
          check(int'(h.node) < NN && h.src_rank == RANK_W'(n), "message routing");
          foreach (pkt[n][i]) begin
            net_beat_t b;
            b = pkt[n][i];
            b.hdr.node = RANK_W'(n);
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

  function automatic bit all_rsp(int k);
    for (int n = 0; n < NN; n++) if (host_rsp[n].size() < k) return 0;
    return 1;
  endfunction

  initial begin
    pkt_hdr_t h;
    int t0, cycles;
    real ideal, eff, gpairs;
    rx_valid = '0; rx = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      net_beat_t b;
      h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_SET_RANK; h.dst_rank = RANK_W'(n); h.len = 16'(NN);
      b.hdr = h; b.last = 1; b.data = '0;
      rxq[n].push_back(b);
    end
    repeat (20) @(negedge clk);
    t0 = cyc;
    for (int n = 0; n < NN; n++) begin
      net_beat_t b;
      h = '0; h.ptype = PKT_CPU_CMD; h.cmd = CMD_EXEC_TASK; h.tag = TT_CREATOR; h.id = 16'(16'h100 + n);
      b.hdr = h; b.last = 1; b.data = '0;
      b.data[63:0] = PARTS; b.data[127:64] = FORCES; b.data[191:128] = 64'(NBLK); b.data[255:192] = 64'(STEPS);
      rxq[n].push_back(b);
    end
    while (!all_rsp(1)) @(posedge clk);
    cycles = cyc - t0;
    for (int n = 0; n < NN; n++)
      check(host_rsp[n][0].hdr.cmd == CMD_EXEC_TASK && host_rsp[n][0].hdr.id == 16'(16'h100 + n), "task completion reported");
    `define ACCS(N) \
      check(g_node[N].g_acc[0].runs + g_node[N].g_acc[1].runs + g_node[N].g_acc[2].runs + g_node[N].g_acc[3].runs \
            == STEPS * NBLK * PER, "force tasks run"); \
      check(g_node[N].g_acc[4].runs == STEPS * NBLK, "update tasks run"); \
      check(g_node[N].g_acc[4].bad == 0, "every force block read by the update tasks is correct");
    `ACCS(0)
    `ACCS(1)
    `ACCS(2)
    `undef ACCS
    ideal  = real'(STEPS) * real'(NBLK * PER) * real'(COMPUTE) / real'(NF);
    eff    = ideal / real'(cycles);
    gpairs = (real'(NBLK * BLK) ** 2) * real'(STEPS) / (real'(cycles) / 200.0e6) / 1.0e9;
    $display("N-body %0d FPGAs, %0d particles, %0d steps: %0d cycles, ideal %0.0f, efficiency %0.2f%%, %0.2f Gpairs/s at 200 MHz (peak %0.2f)",
             NN, NBLK * BLK, STEPS, cycles, ideal, 100.0 * eff, gpairs, 6.4 * real'(NN));
    check(eff >= 0.95, "efficiency at least 95% of the accelerators' peak");
    check(retx[0] + retx[1] + retx[2] == 0, "no retransmissions on a lossless network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14000000) @(posedge clk);
    `define DBG(N) $display("node %0d: creator state %0d pending %0d, force tasks run %0d %0d %0d %0d, updates %0d", N, \
      g_node[N].u_role.u_creator.state, g_node[N].u_role.u_creator.pending, g_node[N].g_acc[0].runs, \
      g_node[N].g_acc[1].runs, g_node[N].g_acc[2].runs, g_node[N].g_acc[3].runs, g_node[N].g_acc[4].runs);
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
