// packet_encoder: exit point of the Role towards the Shell.
//
// NIN packet streams from the Role's modules (message sender, decoder acks
// and counter reports, memory manager responses, runtime task completions)
// are merged into one stream. The arbiter is round-robin and switches only
// between packets, so a packet's beats stay together. On the way out the
// encoder fills in the routing: responses to CPU commands go to the host node
// on the task or memory port (inputs flagged in RESP_MASK are marked as CPU
// responses here, which is the response header the encoder adds); data and
// ack messages go to the node of their destination rank on the message port,
// with this node's rank as source.
//
// Debug counters: packets sent per packet type, and application messages
// sent to each node (readable for one node through node_sel/node_count).
//
// Interface: valid/ready streams of net_beat_t, one output beat per cycle
// when the Shell is ready; no added latency (the output is combinational on
// the granted input). Merging, routing and counting follow the document;
// the arbitration policy and the port numbers are this design's own choices.
module packet_encoder
  import ompif_pkg::*;
#(
  parameter int              NIN       = 4,
  parameter logic [NIN-1:0]  RESP_MASK = '0,
  parameter int              NNODES    = MAX_NODES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [RANK_W-1:0]     my_rank,
  input  logic [NIN-1:0]        in_valid,
  output logic [NIN-1:0]        in_ready,
  input  net_beat_t [NIN-1:0]   in_beat,
  output logic                  tx_valid,
  input  logic                  tx_ready,
  output net_beat_t             tx,
  output logic [3:0][31:0]      tx_type_count,
  input  logic [RANK_W-1:0]     node_sel,
  output logic [31:0]           node_count
);

  localparam int IW = (NIN > 1) ? $clog2(NIN) : 1;
  localparam int NW = (NNODES > 1) ? $clog2(NNODES) : 1;

  logic          locked;
  logic [IW-1:0] gnt, last_gnt, pick, sel;
  logic          any;
  logic [31:0]   tx_node_count [NNODES];

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= NIN; k++) begin
      if (!any && in_valid[(int'(last_gnt) + k) % NIN]) begin
        any  = 1'b1;
        pick = IW'((int'(last_gnt) + k) % NIN);
      end
    end
    sel = locked ? gnt : pick;
  end

  net_beat_t b;
  always_comb begin
    b = in_beat[sel];
    if (RESP_MASK[sel]) b.hdr.ptype = PKT_CPU_RESP;
    tx = b;
    unique case (b.hdr.ptype)
      PKT_CPU_RESP, PKT_CPU_CMD: begin
        tx.hdr.node     = HOST_NODE;
        tx.hdr.udp_port = (b.hdr.cmd == CMD_MEM_READ || b.hdr.cmd == CMD_MEM_WRITE) ? PORT_MEM : PORT_TASK;
      end
      default: begin
        tx.hdr.node     = b.hdr.dst_rank;
        tx.hdr.udp_port = PORT_MSG;
        tx.hdr.src_rank = my_rank;
      end
    endcase
  end

  assign tx_valid = (locked || any) && in_valid[sel];
  always_comb begin
    in_ready = '0;
    if (locked || any) in_ready[sel] = tx_ready;
  end

  assign node_count = tx_node_count[NW'(node_sel)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked        <= 1'b0;
      gnt           <= '0;
      last_gnt      <= IW'(NIN - 1);
      tx_type_count <= '0;
      for (int n = 0; n < NNODES; n++) tx_node_count[n] <= '0;
    end else if (tx_valid && tx_ready) begin
      if (!locked) begin
        gnt      <= sel;
        last_gnt <= sel;
      end
      locked <= !tx.last;
      if (tx.last) begin
        tx_type_count[tx.hdr.ptype] <= tx_type_count[tx.hdr.ptype] + 1;
        if (tx.hdr.ptype == PKT_DATA || tx.hdr.ptype == PKT_ACK)
          tx_node_count[NW'(tx.hdr.node)] <= tx_node_count[NW'(tx.hdr.node)] + 1;
      end
    end
  end

endmodule
