// mem_arbiter: the memory interconnect of the Role (block "X" in the Role
// diagram). It lets NRD read masters and NWR write masters share one
// data-mover style read channel and one write channel towards board memory.
//
// Each channel is granted round-robin on its command. A read grant is held
// until the last data beat of that read has been returned to its master; a
// write grant is held until the memory reports the write done. So at most one
// read and one write are in flight at a time, and data beats never need an ID.
//
// Interface, per master m: *_cmd_valid/ready/cmd (address and byte count),
// rd_data_valid/ready/data/last back to the master, wr_data_valid/ready/data/
// last from the master, and a one-cycle wr_done pulse. The memory side has the
// same signals once. The document only names this block; the arbitration
// scheme and the one-outstanding-access rule are this design's own choices.
module mem_arbiter
  import ompif_pkg::*;
#(
  parameter int NRD = 2,
  parameter int NWR = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // read masters
  input  logic     [NRD-1:0]         m_rd_cmd_valid,
  output logic     [NRD-1:0]         m_rd_cmd_ready,
  input  mem_cmd_t [NRD-1:0]         m_rd_cmd,
  output logic     [NRD-1:0]         m_rd_data_valid,
  input  logic     [NRD-1:0]         m_rd_data_ready,
  output logic     [DATA_W-1:0]      m_rd_data,
  output logic                       m_rd_last,
  // write masters
  input  logic     [NWR-1:0]         m_wr_cmd_valid,
  output logic     [NWR-1:0]         m_wr_cmd_ready,
  input  mem_cmd_t [NWR-1:0]         m_wr_cmd,
  input  logic     [NWR-1:0]         m_wr_data_valid,
  output logic     [NWR-1:0]         m_wr_data_ready,
  input  logic     [NWR-1:0][DATA_W-1:0] m_wr_data,
  input  logic     [NWR-1:0]         m_wr_last,
  output logic     [NWR-1:0]         m_wr_done,
  // memory side
  output logic                       s_rd_cmd_valid,
  input  logic                       s_rd_cmd_ready,
  output mem_cmd_t                   s_rd_cmd,
  input  logic                       s_rd_data_valid,
  output logic                       s_rd_data_ready,
  input  logic     [DATA_W-1:0]      s_rd_data,
  input  logic                       s_rd_last,
  output logic                       s_wr_cmd_valid,
  input  logic                       s_wr_cmd_ready,
  output mem_cmd_t                   s_wr_cmd,
  output logic                       s_wr_data_valid,
  input  logic                       s_wr_data_ready,
  output logic     [DATA_W-1:0]      s_wr_data,
  output logic                       s_wr_last,
  input  logic                       s_wr_done
);

  localparam int RW = (NRD > 1) ? $clog2(NRD) : 1;
  localparam int WW = (NWR > 1) ? $clog2(NWR) : 1;

  // ---------------- read channel ----------------
  logic          rd_busy;
  logic [RW-1:0] rd_gnt, rd_last_gnt, rd_pick;
  logic          rd_any;

  always_comb begin
    rd_any  = 1'b0;
    rd_pick = '0;
    for (int k = 1; k <= NRD; k++) begin
      if (!rd_any && m_rd_cmd_valid[(int'(rd_last_gnt) + k) % NRD]) begin
        rd_any  = 1'b1;
        rd_pick = RW'((int'(rd_last_gnt) + k) % NRD);
      end
    end
  end

  always_comb begin
    s_rd_cmd_valid = !rd_busy && rd_any;
    s_rd_cmd       = m_rd_cmd[rd_pick];
    m_rd_cmd_ready = '0;
    if (!rd_busy && rd_any) m_rd_cmd_ready[rd_pick] = s_rd_cmd_ready;
    m_rd_data_valid = '0;
    if (rd_busy) m_rd_data_valid[rd_gnt] = s_rd_data_valid;
    s_rd_data_ready = rd_busy && m_rd_data_ready[rd_gnt];
    m_rd_data       = s_rd_data;
    m_rd_last       = s_rd_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy     <= 1'b0;
      rd_gnt      <= '0;
      rd_last_gnt <= RW'(NRD - 1);
    end else if (!rd_busy) begin
      if (s_rd_cmd_valid && s_rd_cmd_ready) begin
        rd_busy     <= 1'b1;
        rd_gnt      <= rd_pick;
        rd_last_gnt <= rd_pick;
      end
    end else if (s_rd_data_valid && s_rd_data_ready && s_rd_last) begin
      rd_busy <= 1'b0;
    end
  end

  // ---------------- write channel ----------------
  logic          wr_busy;
  logic [WW-1:0] wr_gnt, wr_last_gnt, wr_pick;
  logic          wr_any;

  always_comb begin
    wr_any  = 1'b0;
    wr_pick = '0;
    for (int k = 1; k <= NWR; k++) begin
      if (!wr_any && m_wr_cmd_valid[(int'(wr_last_gnt) + k) % NWR]) begin
        wr_any  = 1'b1;
        wr_pick = WW'((int'(wr_last_gnt) + k) % NWR);
      end
    end
  end

  always_comb begin
    s_wr_cmd_valid = !wr_busy && wr_any;
    s_wr_cmd       = m_wr_cmd[wr_pick];
    m_wr_cmd_ready = '0;
    if (!wr_busy && wr_any) m_wr_cmd_ready[wr_pick] = s_wr_cmd_ready;
    s_wr_data_valid = wr_busy && m_wr_data_valid[wr_gnt];
    s_wr_data       = m_wr_data[wr_gnt];
    s_wr_last       = m_wr_last[wr_gnt];
    m_wr_data_ready = '0;
    if (wr_busy) m_wr_data_ready[wr_gnt] = s_wr_data_ready;
    m_wr_done = '0;
    if (wr_busy) m_wr_done[wr_gnt] = s_wr_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy     <= 1'b0;
      wr_gnt      <= '0;
      wr_last_gnt <= WW'(NWR - 1);
    end else if (!wr_busy) begin
      if (s_wr_cmd_valid && s_wr_cmd_ready) begin
        wr_busy     <= 1'b1;
        wr_gnt      <= wr_pick;
        wr_last_gnt <= wr_pick;
      end
    end else if (s_wr_done) begin
      wr_busy <= 1'b0;
    end
  end

  // A memory-side write completion can only belong to a granted write.
  a_done_granted: assert property (@(posedge clk) disable iff (!rst_n) s_wr_done |-> wr_busy);

endmodule
