// tb_nbody_creator: self-checking test of the N-body task creator.
// A model of the runtime accepts created tasks (with random stalls) and
// finishes each one a random time later; pending is its count of unfinished
// tasks. The expected task list is computed here from the loop nest:
// forces for i = 0..n-1 and the owned j, the allgather sends and receives
// for k = 1..s-1, then one update per block, for each time step. The test
// also checks the two taskwaits (no send before all force tasks finished, no
// update before the allgather finished), that the next step's force tasks
// start while updates are still running, and that done comes last.
module tb_nbody_creator;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int BLK = 64;
  localparam logic [63:0] PB = 64'(BLK * 28), FB = 64'(BLK * 12);
  localparam logic [63:0] PARTS = 64'h1000_0000, FORCES = 64'h2000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [RANK_W-1:0] my_rank;
  logic [RANK_W:0] cluster_size;
  logic task_valid, task_ready, done, create_valid, create_ready;
  task_t task_i, create;
  logic [15:0] pending;

  nbody_creator #(.BLOCK(BLK)) dut (.clk, .rst_n, .my_rank, .cluster_size, .task_valid, .task_ready, .task_i,
    .done, .create_valid, .create_ready, .create, .pending);

  // runtime model
  int finish_at [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    create_ready <= ($urandom % 3) != 0;
    for (int q = finish_at.size() - 1; q >= 0; q--)
      if (finish_at[q] <= cyc) finish_at.delete(q);
  end
  assign pending = 16'(finish_at.size());

  task_t got [$];
  int pend_at_create [$];
  always @(posedge clk) if (create_valid && create_ready) begin
    got.push_back(create);
    pend_at_create.push_back(finish_at.size());
    finish_at.push_back(cyc + 5 + ($urandom % 40));
  end
  int done_cnt = 0;
  always @(posedge clk) if (done) begin
    done_cnt++;
    check(finish_at.size() == 0, "done only after every child finished");
  end

  task automatic run(int rank, int size, int n, int steps);
    int per, idx, first_send;
    got.delete(); pend_at_create.delete();
    my_rank = RANK_W'(rank); cluster_size = (RANK_W+1)'(size);
    task_i = '0; task_i.ttype = TT_CREATOR;
    task_i.args[0] = PARTS; task_i.args[1] = FORCES; task_i.args[2] = 64'(n); task_i.args[3] = 64'(steps);
    @(negedge clk); task_valid = 1;
    @(negedge clk); task_valid = 0;
    wait (done_cnt > 0); done_cnt = 0;
    per = n / size;
    idx = 0;
    check(got.size() == steps * (n * per + 2 * (size - 1) + n), "number of created tasks");
    for (int t = 0; t < steps; t++) begin
      for (int i = 0; i < n; i++)
        for (int j = per * rank; j < per * rank + per; j++) begin
          check(got[idx].ttype == TT_FORCE && got[idx].args[0] == PARTS + 64'(i) * PB && got[idx].args[1] == PARTS + 64'(j) * PB &&
                got[idx].args[2] == FORCES + 64'(j) * FB && got[idx].deps[2].inout_dir && got[idx].deps[2].addr == got[idx].args[2],
                "force task arguments and dependences");
          if (t > 0 && i == 0 && j == per * rank) check(pend_at_create[idx] > 0, "next step overlaps the updates");
          idx++;
        end
      for (int k = 1; k < size; k++) begin
        check(got[idx].ttype == TT_SEND && got[idx].args[2] == 64'((rank + k) % size) &&
              got[idx].args[0] == FORCES + 64'(per * rank) * FB && got[idx].args[1] == 64'(per) * FB, "allgather send");
        if (k == 1) check(pend_at_create[idx] == 0, "taskwait before the allgather");
        idx++;
        check(got[idx].ttype == TT_RECV && got[idx].args[2] == 64'((rank + size - k) % size) &&
              got[idx].args[0] == FORCES + 64'(per * ((rank + size - k) % size)) * FB, "allgather receive");
        idx++;
      end
      for (int i = 0; i < n; i++) begin
        check(got[idx].ttype == TT_UPDATE && got[idx].args[0] == PARTS + 64'(i) * PB && got[idx].args[1] == FORCES + 64'(i) * FB &&
              got[idx].deps[0].inout_dir && !got[idx].deps[1].inout_dir, "update task");
        if (i == 0) check(pend_at_create[idx] == 0, "taskwait after the allgather");
        idx++;
      end
    end
  endtask

  initial begin
    task_valid = 0; task_i = '0; my_rank = 0; cluster_size = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 3, 6, 2);
    run(2, 3, 7, 1);   // 7 blocks on 3 ranks: 2 each
    run(0, 1, 2, 1);   // single node, no allgather
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
