// tb_acc_model: behavioural stand-in for the N-body HLS accelerators
// (testbench only; their arithmetic is not modelled).
//   FORCE  task (part_i, part_j, forces_j): reads the first beat of part_i
//          and of part_j, then overwrites the whole force block j with
//          force_word(j, i, rank, beat).
//   UPDATE task (part_i, forces_i): reads the whole force block i, compares
//          each beat with force_word(i, n-1, owner, beat) (the last force
//          task of block i in a time step, on the rank that owns it), counts
//          mismatches, then writes one beat at part_i.
// A force task waits COMPUTE cycles between its reads and its writes (the
// time of the pair computation; 0 in the functional tests, BLOCK*BLOCK/8 for
// an accelerator that computes 8 forces per cycle).
// done pulses for one cycle after the last write completes.
module tb_acc_model
  import ompif_pkg::*;
  import tb_util_pkg::*;
#(
  parameter bit          IS_UPDATE = 0,
  parameter logic [63:0] PARTS     = 64'h1000_0000,
  parameter logic [63:0] FORCES    = 64'h2000_0000,
  parameter int          BLOCK     = 2048,
  parameter int          NBLK      = 3,
  parameter int          PER       = 1,
  parameter int          COMPUTE   = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RANK_W-1:0] rank,
  input  logic              task_valid,
  output logic              task_ready,
  input  task_t             task_i,
  output logic              done,
  output logic              rd_cmd_valid,
  input  logic              rd_cmd_ready,
  output mem_cmd_t          rd_cmd,
  input  logic              rd_data_valid,
  output logic              rd_data_ready,
  input  logic [DATA_W-1:0] rd_data,
  input  logic              rd_last,
  output logic              wr_cmd_valid,
  input  logic              wr_cmd_ready,
  output mem_cmd_t          wr_cmd,
  output logic              wr_data_valid,
  input  logic              wr_data_ready,
  output logic [DATA_W-1:0] wr_data,
  output logic              wr_last,
  input  logic              wr_done,
  output int                tasks_run,
  output int                mismatches
);
  localparam int FB = BLOCK * 12, PB = BLOCK * 28;

  function automatic logic [DATA_W-1:0] force_word(int j, int i, int r, int b);
    return mark_word(32'(j) ^ 32'hF0F0_0000, 32'(i + 16 * r), 32'(b));
  endfunction

  typedef enum {A_IDLE, A_RD1, A_RD1D, A_RD2, A_RD2D, A_COMP, A_WCMD, A_WDATA, A_WDONE, A_DONE} st_e;
  st_e st;
  int i_blk, j_blk, beat, nbeats, comp;
  logic [ADDR_W-1:0] ra1, ra2, wa;

  assign task_ready    = (st == A_IDLE);
  assign done          = (st == A_DONE);
  assign rd_cmd_valid  = (st == A_RD1) || (st == A_RD2);
  assign rd_cmd.addr   = (st == A_RD1) ? ra1 : ra2;
  assign rd_cmd.bytes  = (IS_UPDATE && st == A_RD1) ? FLEN_W'(FB) : FLEN_W'(64);
  assign rd_data_ready = (st == A_RD1D) || (st == A_RD2D);
  assign wr_cmd_valid  = (st == A_WCMD);
  assign wr_cmd.addr   = wa;
  assign wr_cmd.bytes  = IS_UPDATE ? FLEN_W'(64) : FLEN_W'(FB);
  assign wr_data_valid = (st == A_WDATA);
  assign wr_data       = IS_UPDATE ? mark_word(32'(i_blk), 32'hAB, 0) : force_word(j_blk, i_blk, int'(rank), beat);
  assign wr_last       = (beat == nbeats - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; tasks_run <= 0; mismatches <= 0; beat <= 0; nbeats <= 0; comp <= 0;
      i_blk <= 0; j_blk <= 0; ra1 <= '0; ra2 <= '0; wa <= '0;
    end else begin
      case (st)
        A_IDLE: if (task_valid) begin
          tasks_run <= tasks_run + 1;
          beat <= 0;
          if (IS_UPDATE) begin
            i_blk  <= int'((task_i.args[0] - PARTS) / 64'(PB));
            ra1    <= ADDR_W'(task_i.args[1]);
            wa     <= ADDR_W'(task_i.args[0]);
            nbeats <= 1;
          end else begin
            i_blk  <= int'((task_i.args[0] - PARTS) / 64'(PB));
            j_blk  <= int'((task_i.args[2] - FORCES) / 64'(FB));
            ra1    <= ADDR_W'(task_i.args[0]);
            ra2    <= ADDR_W'(task_i.args[1]);
            wa     <= ADDR_W'(task_i.args[2]);
            nbeats <= FB / 64;
          end
          st <= A_RD1;
        end
        A_RD1:  if (rd_cmd_ready) st <= A_RD1D;
        A_RD1D: if (rd_data_valid) begin
          if (IS_UPDATE) begin
            if (rd_data != force_word(i_blk, NBLK - 1, i_blk / PER, beat)) mismatches <= mismatches + 1;
            beat <= beat + 1;
          end
          if (rd_last) begin beat <= 0; st <= IS_UPDATE ? A_WCMD : A_RD2; end
        end
        A_RD2:  if (rd_cmd_ready) st <= A_RD2D;
        A_RD2D: if (rd_data_valid && rd_last) begin comp <= 0; st <= (COMPUTE > 0) ? A_COMP : A_WCMD; end
        A_COMP: begin comp <= comp + 1; if (comp >= COMPUTE - 1) st <= A_WCMD; end
        A_WCMD: if (wr_cmd_ready) st <= A_WDATA;
        A_WDATA: if (wr_data_ready) begin
          beat <= beat + 1;
          if (beat == nbeats - 1) st <= A_WDONE;
        end
        A_WDONE: if (wr_done) st <= A_DONE;
        A_DONE: st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
