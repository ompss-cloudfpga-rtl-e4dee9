// packet_decoder: entry point of the Role for traffic from the Shell.
//
// Every packet arriving from the network is classified by its header and
// forwarded:
//   * CPU command "execute task"      -> task to the hardware runtime (POM)
//   * CPU command "memory read/write" -> memory manager
//   * CPU command "set rank"          -> the rank and cluster-size registers
//   * CPU command "read counters"     -> a counter report to the encoder
//   * data message                    -> memory manager (to the temporary buffer)
//   * ack message                     -> message sender
// The decoder also answers data messages with acks. For each source node it
// keeps the next expected sequence number: a frame with that number is
// stored; an older one (a resent duplicate) and a newer one (a frame was lost)
// are dropped. A frame flagged ack_req is acked when it is stored or is an old
// duplicate; after a gap nothing is acked, so the sender resends the window.
//
// Debug counters: packets received per packet type, and application messages
// (data and ack) received from each node. CMD_READ_CNT returns them together
// with the encoder's transmit counters in one response beat:
//   data[ 31:  0.. 127:96]  rx packets of type 0..3
//   data[159:128..255:224]  tx packets of type 0..3
//   data[287:256]           messages received from node dst_rank
//   data[319:288]           messages sent to node dst_rank
//
// Interface: valid/ready streams of net_beat_t (header repeated on every beat,
// last on the final beat), task_t towards the runtime, a one-cycle ack_valid
// pulse towards the sender. One packet is handled at a time; a beat moves in
// the cycle its destination is ready. The classification, acking and counters
// follow the document; the ack rule, the expected-sequence table and the
// counter report layout are this design's own choices.
module packet_decoder
  import ompif_pkg::*;
#(
  parameter int NNODES = MAX_NODES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the Shell
  input  logic                    rx_valid,
  output logic                    rx_ready,
  input  net_beat_t               rx,
  // to the hardware runtime
  output logic                    task_valid,
  input  logic                    task_ready,
  output task_t                   task_o,
  // to the memory manager
  output logic                    mm_valid,
  input  logic                    mm_ready,
  output net_beat_t               mm,
  // to the message sender
  output logic                    ack_valid,
  output ack_t                    ack,
  // acks and counter reports to the packet encoder
  output logic                    rsp_valid,
  input  logic                    rsp_ready,
  output net_beat_t               rsp,
  // configuration
  output logic [RANK_W-1:0]       my_rank,
  output logic [RANK_W:0]         cluster_size,
  // transmit counters of the encoder, for the counter report
  input  logic [3:0][31:0]        tx_type_count,
  output logic [RANK_W-1:0]       tx_node_sel,
  input  logic [31:0]             tx_node_count,
  // receive counters
  output logic [3:0][31:0]        rx_type_count
);

  localparam int NW = (NNODES > 1) ? $clog2(NNODES) : 1;

  typedef enum logic [2:0] {R_TASK, R_MM, R_DROP, R_ACK, R_CNT, R_RANK} route_e;

  logic             in_pkt;       // a packet has started and is not finished
  logic             accept_q;     // stored/dropped decision of the current data packet
  logic             dup_q;        // the current data packet is an old duplicate
  logic [SEQ_W-1:0] exp_seq [NNODES];
  logic [31:0]      rx_node_count [NNODES];

  logic             rsp_busy;
  net_beat_t        rsp_q;

  // decision for a data frame, made on its first beat
  logic [NW-1:0]    src_idx;
  logic [SEQ_W-1:0] seq_diff;
  logic             is_new, is_dup;
  always_comb begin
    src_idx  = NW'(rx.hdr.node);
    seq_diff = rx.hdr.seq - exp_seq[src_idx];
    is_new   = (seq_diff == '0);
    is_dup   = seq_diff[SEQ_W-1];          // older than expected
  end

  logic accept;
  assign accept = in_pkt ? accept_q : is_new;

  route_e route;
  always_comb begin
    route = R_DROP;
    unique case (rx.hdr.ptype)
      PKT_CPU_CMD: begin
        unique case (rx.hdr.cmd)
          CMD_EXEC_TASK:                route = R_TASK;
          CMD_MEM_WRITE, CMD_MEM_READ:  route = R_MM;
          CMD_READ_CNT:                 route = R_CNT;
          CMD_SET_RANK:                 route = R_RANK;
          default:                      route = R_DROP;
        endcase
      end
      PKT_DATA:     route = accept ? R_MM : R_DROP;
      PKT_ACK:      route = R_ACK;
      PKT_CPU_RESP: route = R_DROP;
      default:      route = R_DROP;
    endcase
  end

  // a response (ack or counter report) is produced on the last beat
  logic need_rsp;
  always_comb begin
    need_rsp = 1'b0;
    if (rx.last) begin
      if (route == R_CNT) need_rsp = 1'b1;
      if (rx.hdr.ptype == PKT_DATA && rx.hdr.ack_req && (accept || (in_pkt ? dup_q : is_dup)))
        need_rsp = 1'b1;
    end
  end

  always_comb begin
    rx_ready   = 1'b0;
    task_valid = 1'b0;
    mm_valid   = 1'b0;
    if (!(need_rsp && rsp_busy)) begin
      unique case (route)
        R_TASK: begin task_valid = rx_valid; rx_ready = task_ready; end
        R_MM:   begin mm_valid   = rx_valid; rx_ready = mm_ready;   end
        default: rx_ready = 1'b1;
      endcase
    end
  end

  always_comb begin
    task_o        = '0;
    task_o.ttype  = rx.hdr.tag;
    task_o.parent = PARENT_HOST;
    task_o.id     = rx.hdr.id;
    task_o.args   = rx.data;
  end

  assign mm        = rx;
  assign rsp_valid = rsp_busy;
  assign rsp       = rsp_q;
  assign tx_node_sel = rx.hdr.dst_rank;

  logic fire;
  assign fire = rx_valid && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt        <= 1'b0;
      accept_q      <= 1'b0;
      dup_q         <= 1'b0;
      rsp_busy      <= 1'b0;
      rsp_q         <= '0;
      ack_valid     <= 1'b0;
      ack           <= '0;
      my_rank       <= '0;
      cluster_size  <= (RANK_W+1)'(1);
      rx_type_count <= '0;
      for (int n = 0; n < NNODES; n++) begin
        exp_seq[n]       <= '0;
        rx_node_count[n] <= '0;
      end
    end else begin
      ack_valid <= 1'b0;
      if (rsp_busy && rsp_ready) rsp_busy <= 1'b0;

      if (fire) begin
        in_pkt <= !rx.last;
        if (!in_pkt && rx.hdr.ptype == PKT_DATA) begin
          accept_q <= is_new;
          dup_q    <= is_dup;
          if (is_new) exp_seq[src_idx] <= exp_seq[src_idx] + 1'b1;
        end
        if (rx.last) begin
          rx_type_count[rx.hdr.ptype] <= rx_type_count[rx.hdr.ptype] + 1;
          if (rx.hdr.ptype == PKT_DATA || rx.hdr.ptype == PKT_ACK)
            rx_node_count[src_idx] <= rx_node_count[src_idx] + 1;
        end
        if (route == R_ACK) begin
          ack_valid <= 1'b1;
          ack.src   <= rx.hdr.node;
          ack.seq   <= rx.hdr.seq;
        end
        if (route == R_RANK) begin
          my_rank      <= rx.hdr.dst_rank;
          cluster_size <= (RANK_W+1)'(rx.hdr.len);
        end
        if (need_rsp) begin
          rsp_busy <= 1'b1;
          rsp_q    <= '0;
          rsp_q.last <= 1'b1;
          if (route == R_CNT) begin
            rsp_q.hdr.ptype <= PKT_CPU_RESP;
            rsp_q.hdr.cmd   <= CMD_READ_CNT;
            rsp_q.hdr.id    <= rx.hdr.id;
            rsp_q.hdr.len   <= FLEN_W'(BEAT_BYTES);
            rsp_q.data      <= {192'd0, tx_node_count, rx_node_count[NW'(rx.hdr.dst_rank)],
                                tx_type_count, rx_type_count};
          end else begin
            rsp_q.hdr.ptype    <= PKT_ACK;
            rsp_q.hdr.dst_rank <= rx.hdr.node;
            rsp_q.hdr.seq      <= rx.hdr.seq;
          end
        end
      end
    end
  end

endmodule
