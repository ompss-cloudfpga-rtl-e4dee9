// tb_pom: self-checking test of the task manager.
// Four accelerator slots: 0 creator, 1 and 2 force, 3 update. Models of the
// accelerators take a task when idle and finish it a fixed time later. The
// test checks: a host task runs on the first idle accelerator of its type
// and is reported to the host with its id when it finishes; independent
// child tasks run in parallel; two tasks writing the same region run one
// after the other in creation order, while a younger independent task
// overtakes the blocked one; tasks that only read a shared region
// still overlap; send and receive petitions reach their engines; the
// creator's pending-children count rises with each created task and falls to
// zero when all have finished (the taskwait condition). A ready task must
// reach its accelerator within 60 cycles of creation, the per-task runtime
// cost the original system reports.
module tb_pom;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int NACC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic host_valid, host_ready;
  task_t host_task;
  logic [NACC-1:0] cr_valid, cr_ready, acc_task_valid, acc_task_ready, acc_done;
  task_t [NACC-1:0] cr_task;
  logic [NACC-1:0][15:0] children_pending;
  task_t acc_task;
  logic send_valid, send_ready, send_done, recv_valid, recv_ready, recv_done, rsp_valid, rsp_ready;
  msg_req_t send_req, recv_req;
  net_beat_t rsp;

  pom #(.NACC(NACC), .ACC_TYPE({TT_UPDATE, TT_FORCE, TT_FORCE, TT_CREATOR}), .QDEPTH(8)) dut (.clk, .rst_n,
    .host_valid, .host_ready, .host_task, .cr_valid, .cr_ready, .cr_task, .children_pending,
    .acc_task_valid, .acc_task_ready, .acc_task, .acc_done,
    .send_valid, .send_ready, .send_req, .send_done, .recv_valid, .recv_ready, .recv_req, .recv_done,
    .rsp_valid, .rsp_ready, .rsp);

  // accelerator models
  localparam int LAT = 30;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int busy_until [NACC];
  logic [NACC-1:0] running = '0;
  int start_of [int];     // task id -> start cycle
  int end_of [int];       // task id -> end cycle
  int acc_of [int];       // task id -> accelerator
  int cur_id [NACC];
  always_comb for (int a = 0; a < NACC; a++) acc_task_ready[a] = !running[a];
  always @(posedge clk) begin
    for (int a = 0; a < NACC; a++) begin
      acc_done[a] <= 1'b0;
      if (running[a] && cyc == busy_until[a]) begin
        acc_done[a] <= 1'b1; running[a] <= 1'b0; end_of[cur_id[a]] = cyc;
      end
      if (rst_n && acc_task_valid[a] && acc_task_ready[a]) begin
        check(acc_task.ttype == ((a == 0) ? TT_CREATOR : (a == 3) ? TT_UPDATE : TT_FORCE), "task on an accelerator of its type");
        running[a] <= 1'b1; busy_until[a] = cyc + LAT; cur_id[a] = int'(acc_task.id);
        start_of[int'(acc_task.id)] = cyc; acc_of[int'(acc_task.id)] = a;
      end
    end
  end

  // OMPIF engine models
  int send_cnt = 0, recv_cnt = 0;
  msg_req_t last_send, last_recv;
  assign send_ready = 1'b1;
  assign recv_ready = 1'b1;
  always @(posedge clk) begin
    send_done <= rst_n && send_valid;
    recv_done <= rst_n && recv_valid;
    if (rst_n && send_valid) begin send_cnt++; last_send = send_req; end
    if (rst_n && recv_valid) begin recv_cnt++; last_recv = recv_req; end
  end

  net_beat_t rsp_log [$];
  assign rsp_ready = 1'b1;
  always @(posedge clk) if (rst_n && rsp_valid) rsp_log.push_back(rsp);

  int max_pending = 0;
  always @(posedge clk) if (rst_n && int'(children_pending[0]) > max_pending) max_pending = int'(children_pending[0]);

  function automatic task_t mk(logic [7:0] tt, int id, logic [63:0] d0, bit w0, logic [63:0] d1, bit w1);
    task_t t = '0;
    t.ttype = tt; t.id = ID_W'(id);
    t.deps[0].valid = 1; t.deps[0].addr = d0; t.deps[0].inout_dir = w0;
    t.deps[1].valid = 1; t.deps[1].addr = d1; t.deps[1].inout_dir = w1;
    return t;
  endfunction

  int created_at [int];   // task id -> cycle the runtime accepted it
  task automatic create(task_t t);
    cr_valid[0] = 1; cr_task[0] = t;
    @(posedge clk);
    while (!cr_ready[0]) @(posedge clk);
    created_at[int'(t.id)] = cyc;
    #1 cr_valid[0] = 0;
  endtask

  initial begin
    task_t t;
    host_valid = 0; host_task = '0; cr_valid = '0; cr_task = '0; running = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // 1. host task
    host_valid = 1; host_task = mk(TT_FORCE, 100, 64'h1000, 1, 64'h2000, 0);
    @(posedge clk); while (!host_ready) @(posedge clk); #1 host_valid = 0;
    wait (rsp_log.size() == 1);
    check(acc_of[100] == 1 && rsp_log[0].hdr.id == 100 && rsp_log[0].hdr.cmd == CMD_EXEC_TASK, "host task run and reported");
    check(children_pending[0] == 0, "host tasks are not children");
    // 2. independent children: run in parallel on 1 and 2
    create(mk(TT_FORCE, 1, 64'hA000, 1, 64'h0, 0));
    create(mk(TT_FORCE, 2, 64'hB000, 1, 64'h40, 0));
    create(mk(TT_UPDATE, 3, 64'hC000, 1, 64'h80, 0));
    check(children_pending[0] == 3, "pending counts created tasks");
    wait (children_pending[0] == 0);
    check(acc_of[1] == 1 && acc_of[2] == 2 && acc_of[3] == 3, "lowest idle accelerator of the type");
    check(start_of[2] < end_of[1] && start_of[3] < end_of[1], "independent tasks overlap");
    // the original runtime spends about 60 cycles per task; a ready task must not take longer here
    for (int id = 1; id <= 3; id++) check(start_of[id] - created_at[id] <= 60, "dispatch within 60 cycles of creation");
    $display("dispatch latency of ready tasks: %0d %0d %0d cycles", start_of[1] - created_at[1],
             start_of[2] - created_at[2], start_of[3] - created_at[3]);
    // 3. write-write conflict on the same region
    create(mk(TT_FORCE, 4, 64'hD000, 1, 64'h0, 0));
    create(mk(TT_FORCE, 5, 64'hD000, 1, 64'h40, 0));
    wait (children_pending[0] == 0);
    check(start_of[5] >= end_of[4], "conflicting writes serialised");
    // 3b. a younger independent task overtakes one blocked by a dependence
    create(mk(TT_FORCE, 9, 64'hD400, 1, 64'h0, 0));
    create(mk(TT_FORCE, 10, 64'hD400, 1, 64'h40, 0));
    create(mk(TT_FORCE, 11, 64'hD800, 1, 64'h40, 0));
    wait (children_pending[0] == 0);
    check(start_of[10] >= end_of[9], "dependent task waits");
    check(start_of[11] < end_of[9], "independent younger task overtakes the blocked one");
    // 4. read-read sharing
    create(mk(TT_FORCE, 6, 64'hE000, 0, 64'h100, 1));
    create(mk(TT_FORCE, 7, 64'hE000, 0, 64'h140, 1));
    // 5. read after write: an update reads a region the force task 7 wrote
    create(mk(TT_UPDATE, 8, 64'h140, 0, 64'h9000, 1));
    wait (children_pending[0] == 0);
    check(start_of[7] < end_of[6], "shared reads overlap");
    check(start_of[8] >= end_of[7], "read waits for the earlier writer");
    // 6. send and receive petitions
    t = '0; t.ttype = TT_SEND; t.args[0] = 64'h4_0000; t.args[1] = 64'd4096; t.args[2] = 64'd3; t.args[3] = 64'd9;
    create(t);
    t.ttype = TT_RECV; t.args[2] = 64'd1;
    create(t);
    wait (children_pending[0] == 0);
    check(send_cnt == 1 && last_send.addr == 34'h4_0000 && last_send.bytes == 4096 && last_send.rank == 3 && last_send.tag == 9,
          "send petition");
    check(recv_cnt == 1 && last_recv.rank == 1, "receive petition");
    check(max_pending == 3, "pending reached the number of outstanding children");
    // 7. host-started creator task
    host_valid = 1; host_task = mk(TT_CREATOR, 200, 64'h0, 0, 64'h40, 0);
    @(posedge clk); while (!host_ready) @(posedge clk); #1 host_valid = 0;
    wait (rsp_log.size() == 2);
    check(acc_of[200] == 0 && rsp_log[1].hdr.id == 200, "creator task on slot 0");
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
