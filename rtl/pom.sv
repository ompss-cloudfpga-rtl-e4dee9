// pom: the task manager of the hardware runtime (Picos OmpSs Manager).
//
// Tasks come from the host (through the packet decoder) and from
// accelerators that create tasks themselves. A round-robin arbiter places
// them in a queue of QDEPTH entries kept in creation order (entry 0 is the
// oldest). Every cycle the oldest entry that is ready is dispatched and the
// younger entries move down one place. An entry is ready when
//   * its resource is free: TT_SEND / TT_RECV petitions need the message
//     sender / receiver to be ready, other types an idle accelerator whose
//     kind (ACC_TYPE) equals the task type (the lowest-numbered one is used);
//   * none of its dependences conflicts with a running task or with an older
//     task still in the queue. Two dependences conflict when they name the
//     same region address and at least one of the two writes it.
// So a task waits exactly for the older tasks it depends on, and independent
// younger tasks overtake a blocked one; every pair of tasks that share a
// written region still runs in creation order.
//
// Each accelerator that creates tasks has a counter of its unfinished child
// tasks (children_pending): it counts up when a child enters the queue and
// down when the child finishes. An accelerator implements taskwait by waiting
// for its counter to reach zero. When a task created by the host finishes, a
// one-beat completion response carrying the task id is sent to the host.
//
// Interface: task streams (valid/ready, task_t); acc_task_valid/ready per
// accelerator with a shared acc_task bus; acc_done one-cycle pulses; send/recv
// petition streams and done pulses; host responses as net_beat_t. A ready
// task is dispatched two cycles after it is created. The queueing,
// dependence-ordered dispatch, taskwait and host notification follow the
// document, which gives the runtime's function but not its inside: the
// compacting queue, the full comparison against older entries and the
// three dependences per task are this design's own choices. The
// valid of the petition streams and of acc_task_valid depends on the
// matching ready (the engines' ready depends only on their state).
module pom
  import ompif_pkg::*;
#(
  parameter int                   NACC     = 6,
  parameter logic [NACC-1:0][7:0] ACC_TYPE = {TT_UPDATE, TT_FORCE, TT_FORCE, TT_FORCE, TT_FORCE, TT_CREATOR},
  parameter int                   QDEPTH   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // tasks from the host
  input  logic                         host_valid,
  output logic                         host_ready,
  input  task_t                        host_task,
  // tasks created by accelerators
  input  logic  [NACC-1:0]             cr_valid,
  output logic  [NACC-1:0]             cr_ready,
  input  task_t [NACC-1:0]             cr_task,
  output logic  [NACC-1:0][15:0]       children_pending,
  // dispatch to accelerators
  output logic  [NACC-1:0]             acc_task_valid,
  input  logic  [NACC-1:0]             acc_task_ready,
  output task_t                        acc_task,
  input  logic  [NACC-1:0]             acc_done,
  // OMPIF petitions
  output logic                         send_valid,
  input  logic                         send_ready,
  output msg_req_t                     send_req,
  input  logic                         send_done,
  output logic                         recv_valid,
  input  logic                         recv_ready,
  output msg_req_t                     recv_req,
  input  logic                         recv_done,
  // completion of host tasks
  output logic                         rsp_valid,
  input  logic                         rsp_ready,
  output net_beat_t                    rsp
);

  localparam int NSRC = NACC + 1;            // source NACC is the host
  localparam int SW   = $clog2(NSRC);
  localparam int QW   = $clog2(QDEPTH);
  localparam int AW   = (NACC > 1) ? $clog2(NACC) : 1;

  // ---------------- creation: arbitration into the FIFO ----------------
  logic  [NSRC-1:0] src_valid;
  task_t [NSRC-1:0] src_task;
  logic  [SW-1:0]   last_src, pick;
  logic             any;

  always_comb begin
    for (int s = 0; s < NACC; s++) begin
      src_valid[s]       = cr_valid[s];
      src_task[s]        = cr_task[s];
      src_task[s].parent = PARENT_W'(s);
    end
    src_valid[NACC]        = host_valid;
    src_task[NACC]         = host_task;
    src_task[NACC].parent  = PARENT_HOST;
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= NSRC; k++) begin
      if (!any && src_valid[(int'(last_src) + k) % NSRC]) begin
        any  = 1'b1;
        pick = SW'((int'(last_src) + k) % NSRC);
      end
    end
  end

  task_t          q [QDEPTH];
  logic [QW:0]    q_count;
  logic           push, pop;

  assign push = any && (q_count < (QW+1)'(QDEPTH));
  always_comb begin
    cr_ready   = '0;
    host_ready = 1'b0;
    if (push) begin
      if (int'(pick) == NACC) host_ready = 1'b1;
      else cr_ready[pick[AW-1:0]] = 1'b1;
    end
  end

  // ---------------- dispatch ----------------
  logic [NACC-1:0]          busy;
  dep_t [NACC-1:0][NDEP-1:0] run_deps;
  logic [NACC-1:0][PARENT_W-1:0] run_parent;
  logic [NACC-1:0][ID_W-1:0]     run_id;
  logic [PARENT_W-1:0] send_parent, recv_parent;

  function automatic logic deps_conflict(dep_t [NDEP-1:0] x, dep_t [NDEP-1:0] y);
    logic c = 1'b0;
    for (int d = 0; d < NDEP; d++)
      for (int e = 0; e < NDEP; e++)
        if (x[d].valid && y[e].valid && x[d].addr == y[e].addr && (x[d].inout_dir || y[e].inout_dir))
          c = 1'b1;
    return c;
  endfunction

  logic [QDEPTH-1:0] run_conf, old_conf, res_ok, ready_e;
  always_comb begin
    for (int e = 0; e < QDEPTH; e++) begin
      run_conf[e] = 1'b0;
      for (int a = 0; a < NACC; a++)
        if (busy[a] && deps_conflict(run_deps[a], q[e].deps)) run_conf[e] = 1'b1;
      old_conf[e] = 1'b0;
      for (int o = 0; o < e; o++)
        if (deps_conflict(q[o].deps, q[e].deps)) old_conf[e] = 1'b1;
      if (q[e].ttype == TT_SEND)      res_ok[e] = send_ready;
      else if (q[e].ttype == TT_RECV) res_ok[e] = recv_ready;
      else begin
        res_ok[e] = 1'b0;
        for (int a = 0; a < NACC; a++)
          if (!busy[a] && acc_task_ready[a] && ACC_TYPE[a] == q[e].ttype) res_ok[e] = 1'b1;
      end
      ready_e[e] = ((QW+1)'(e) < q_count) && !run_conf[e] && !old_conf[e] && res_ok[e];
    end
  end

  logic          sel_any;
  logic [QW-1:0] sel;
  always_comb begin
    sel_any = 1'b0;
    sel     = '0;
    for (int e = QDEPTH - 1; e >= 0; e--)
      if (ready_e[e]) begin
        sel_any = 1'b1;
        sel     = QW'(e);
      end
  end

  task_t chosen;
  assign chosen = q[sel];

  // oldest task blocked by a running task, and whether a younger task overtook it
  logic head_ok, conflict, overtake;
  assign head_ok  = (q_count != 0);
  assign conflict = run_conf[0] || old_conf[0];
  assign overtake = sel_any && sel != '0;

  logic          acc_hit;
  logic [AW-1:0] acc_sel;
  always_comb begin
    acc_hit = 1'b0;
    acc_sel = '0;
    for (int a = NACC - 1; a >= 0; a--)
      if (!busy[a] && acc_task_ready[a] && ACC_TYPE[a] == chosen.ttype) begin
        acc_hit = 1'b1;
        acc_sel = AW'(a);
      end
  end

  logic is_send, is_recv;
  assign is_send = (chosen.ttype == TT_SEND);
  assign is_recv = (chosen.ttype == TT_RECV);

  always_comb begin
    acc_task_valid = '0;
    if (sel_any && !is_send && !is_recv && acc_hit) acc_task_valid[acc_sel] = 1'b1;
  end
  assign acc_task   = chosen;
  assign send_valid = sel_any && is_send;
  assign recv_valid = sel_any && is_recv;
  assign send_req   = task_to_req(chosen);
  assign recv_req   = task_to_req(chosen);

  logic disp_acc;
  assign disp_acc = |(acc_task_valid & acc_task_ready);
  assign pop = disp_acc || (send_valid && send_ready) || (recv_valid && recv_ready);

  // ---------------- completion ----------------
  logic [NACC-1:0] host_pend;           // host task finished, response not yet sent
  logic [NACC-1:0][ID_W-1:0] host_pend_id;
  logic [AW-1:0] rsp_sel;
  logic          rsp_any;
  always_comb begin
    rsp_any = 1'b0;
    rsp_sel = '0;
    for (int a = NACC - 1; a >= 0; a--)
      if (host_pend[a]) begin
        rsp_any = 1'b1;
        rsp_sel = AW'(a);
      end
  end
  assign rsp_valid = rsp_any;
  always_comb begin
    rsp           = '0;
    rsp.hdr.ptype = PKT_CPU_RESP;
    rsp.hdr.cmd   = CMD_EXEC_TASK;
    rsp.hdr.id    = host_pend_id[rsp_sel];
    rsp.last      = 1'b1;
  end

  // child counter changes of this cycle
  logic [NACC-1:0][15:0] inc, dec;
  always_comb begin
    inc = '0;
    dec = '0;
    if (push && int'(pick) < NACC) inc[pick[AW-1:0]] = 16'd1;
    for (int a = 0; a < NACC; a++)
      if (acc_done[a] && busy[a] && run_parent[a] != PARENT_HOST)
        dec[AW'(run_parent[a])] = dec[AW'(run_parent[a])] + 16'd1;
    if (send_done && send_parent != PARENT_HOST) dec[AW'(send_parent)] = dec[AW'(send_parent)] + 16'd1;
    if (recv_done && recv_parent != PARENT_HOST) dec[AW'(recv_parent)] = dec[AW'(recv_parent)] + 16'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_src         <= SW'(NACC);
      q_count          <= '0;
      busy             <= '0;
      run_deps         <= '0;
      run_parent       <= '0;
      run_id           <= '0;
      send_parent      <= '0;
      recv_parent      <= '0;
      host_pend        <= '0;
      host_pend_id     <= '0;
      children_pending <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      // remove the dispatched entry: younger entries move down one place
      if (pop)
        for (int e = 0; e < QDEPTH - 1; e++)
          if (QW'(e) >= sel) q[e] <= q[e + 1];
      if (push) begin
        q[q_count[QW-1:0] - QW'(pop)] <= src_task[pick];
        last_src <= pick;
      end
      q_count <= q_count + (QW+1)'(push) - (QW+1)'(pop);

      for (int a = 0; a < NACC; a++) begin
        children_pending[a] <= children_pending[a] + inc[a] - dec[a];
        if (acc_done[a] && busy[a]) begin
          busy[a] <= 1'b0;
          if (run_parent[a] == PARENT_HOST) begin
            host_pend[a]    <= 1'b1;
            host_pend_id[a] <= run_id[a];
          end
        end
      end
      if (rsp_valid && rsp_ready) host_pend[rsp_sel] <= 1'b0;

      if (disp_acc) begin
        busy[acc_sel]       <= 1'b1;
        run_deps[acc_sel]   <= chosen.deps;
        run_parent[acc_sel] <= chosen.parent;
        run_id[acc_sel]     <= chosen.id;
      end
      if (send_valid && send_ready) send_parent <= chosen.parent;
      if (recv_valid && recv_ready) recv_parent <= chosen.parent;
    end
  end

  a_done_busy: assert property (@(posedge clk) disable iff (!rst_n) (acc_done & ~busy) == '0);

endmodule
