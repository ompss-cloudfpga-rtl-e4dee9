// nbody_creator: the distributed N-body task that runs on every FPGA and
// spawns the work of its rank (the task-creating accelerator).
//
// Started by a TT_CREATOR task with args[0] = particle buffer address,
// args[1] = force buffer address, args[2] = number of blocks n, args[3] =
// number of time steps. With rank r and cluster size s, the rank owns blocks
// start = (n/s)*r up to end = start + n/s. For every time step it:
//   1. creates a force task for every block i (0..n-1) against every owned
//      block j: args (part_i, part_j, forces_j), reading part_i and part_j and
//      updating forces_j;
//   2. waits until all its child tasks have finished (taskwait);
//   3. runs the ring allgather of the force buffer: for k = 1..s-1 it sends
//      its own force blocks to rank (r+k) mod s and receives the blocks of
//      rank (r-k) mod s into their place, then waits for all of them;
//   4. creates an update task for every block i: args (part_i, forces_i),
//      updating part_i and reading forces_i.
// Update tasks of one step overlap with the force tasks of the next: the
// runtime orders them through their dependences. After the last step it waits
// for every child and pulses done.
//
// n/s is found by repeated subtraction when the task starts (n cycles at
// most). Interface: task_valid/task_ready/task_i (the creator task), done
// pulse, create_valid/create_ready/create (new tasks to the runtime),
// pending (unfinished children). The loop structure and the allgather order
// follow the document; block sizes in bytes come from an assumed layout of
// 7 single-precision values per particle and 3 per force.
module nbody_creator
  import ompif_pkg::*;
#(
  parameter int BLOCK       = 2048,  // particles per block
  parameter int PART_BYTES  = 28,    // bytes per particle: position, velocity, mass
  parameter int FORCE_BYTES = 12     // bytes per particle force
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RANK_W-1:0] my_rank,
  input  logic [RANK_W:0]   cluster_size,
  input  logic              task_valid,
  output logic              task_ready,
  input  task_t             task_i,
  output logic              done,
  output logic              create_valid,
  input  logic              create_ready,
  output task_t             create,
  input  logic [15:0]       pending
);

  localparam logic [63:0] PB = 64'(BLOCK * PART_BYTES);
  localparam logic [63:0] FB = 64'(BLOCK * FORCE_BYTES);

  typedef enum logic [3:0] {C_IDLE, C_DIV, C_FORCE, C_TW1, C_SEND, C_RECV, C_TW2, C_UPD, C_NEXT, C_TW3, C_DONE} state_e;
  state_e state;

  logic [63:0] parts, forces;
  logic [31:0] n, steps, t;
  logic [31:0] per, rem;       // n/s and the remainder during the division
  logic [31:0] i, j, start;
  logic [RANK_W:0] k;
  logic [RANK_W:0] size_q;

  logic [RANK_W:0] dst, src;
  always_comb begin
    dst = ((RANK_W+1)'(my_rank) + k) % size_q;
    src = ((RANK_W+1)'(my_rank) + size_q - k) % size_q;
  end

  function automatic dep_t mk_dep(logic [63:0] a, logic w);
    dep_t d;
    d.valid = 1'b1;
    d.inout_dir = w;
    d.addr = a;
    return d;
  endfunction

  always_comb begin
    create = '0;
    create_valid = 1'b0;
    unique case (state)
      C_FORCE: begin
        create_valid   = 1'b1;
        create.ttype   = TT_FORCE;
        create.args[0] = parts + 64'(i) * PB;
        create.args[1] = parts + 64'(j) * PB;
        create.args[2] = forces + 64'(j) * FB;
        create.deps[0] = mk_dep(create.args[0], 1'b0);
        create.deps[1] = mk_dep(create.args[1], 1'b0);
        create.deps[2] = mk_dep(create.args[2], 1'b1);
      end
      C_SEND, C_RECV: begin
        create_valid   = 1'b1;
        create.ttype   = (state == C_SEND) ? TT_SEND : TT_RECV;
        create.args[0] = forces + 64'(per) * FB * 64'((state == C_SEND) ? my_rank : src[RANK_W-1:0]);
        create.args[1] = 64'(per) * FB;
        create.args[2] = 64'((state == C_SEND) ? dst : src);
        create.args[3] = 64'(0);
      end
      C_UPD: begin
        create_valid   = 1'b1;
        create.ttype   = TT_UPDATE;
        create.args[0] = parts + 64'(i) * PB;
        create.args[1] = forces + 64'(i) * FB;
        create.deps[0] = mk_dep(create.args[0], 1'b1);
        create.deps[1] = mk_dep(create.args[1], 1'b0);
      end
      default: ;
    endcase
  end

  assign task_ready = (state == C_IDLE);
  assign done       = (state == C_DONE);

  logic fire;
  assign fire = create_valid && create_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_IDLE;
      parts  <= '0;
      forces <= '0;
      n      <= '0;
      steps  <= '0;
      t      <= '0;
      per    <= '0;
      rem    <= '0;
      i      <= '0;
      j      <= '0;
      start  <= '0;
      k      <= '0;
      size_q <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (task_valid) begin
          parts  <= task_i.args[0];
          forces <= task_i.args[1];
          n      <= task_i.args[2][31:0];
          steps  <= task_i.args[3][31:0];
          size_q <= (cluster_size == 0) ? (RANK_W+1)'(1) : cluster_size;
          rem    <= task_i.args[2][31:0];
          per    <= '0;
          t      <= '0;
          state  <= C_DIV;
        end
        C_DIV: begin
          if (rem >= 32'(size_q)) begin
            rem <= rem - 32'(size_q);
            per <= per + 1;
          end else begin
            start <= per * 32'(my_rank);
            i     <= '0;
            j     <= per * 32'(my_rank);
            state <= (steps == 0 || per == 0) ? C_TW3 : C_FORCE;
          end
        end
        C_FORCE: if (fire) begin
          if (j + 1 < start + per) j <= j + 1;
          else begin
            j <= start;
            if (i + 1 < n) i <= i + 1;
            else state <= C_TW1;
          end
        end
        C_TW1: if (pending == 0) begin
          k     <= (RANK_W+1)'(1);
          state <= (size_q > 1) ? C_SEND : C_UPD;
          i     <= '0;
        end
        C_SEND: if (fire) state <= C_RECV;
        C_RECV: if (fire) begin
          if (k + 1 < size_q) begin
            k     <= k + 1'b1;
            state <= C_SEND;
          end else state <= C_TW2;
        end
        C_TW2: if (pending == 0) begin
          i     <= '0;
          state <= C_UPD;
        end
        C_UPD: if (fire) begin
          if (i + 1 < n) i <= i + 1;
          else state <= C_NEXT;
        end
        C_NEXT: begin
          i <= '0;
          j <= start;
          if (t + 1 < steps) begin
            t     <= t + 1;
            state <= C_FORCE;
          end else state <= C_TW3;
        end
        C_TW3: if (pending == 0) state <= C_DONE;
        C_DONE: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
