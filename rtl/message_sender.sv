// message_sender: the send half of the OMPIF message-passing runtime.
//
// It takes one send petition at a time (destination rank, tag, buffer address,
// size in bytes), reads the buffer from memory and sends it to the packet
// encoder as data-message frames of at most FRAME_BYTES (1408) bytes. Frames
// go out in windows of WINDOW (4); the last frame of each window asks for an
// ack. The sender then waits for the ack of that frame; if it does not arrive
// within TIMEOUT cycles the whole window is read and sent again. When every
// window is acknowledged, done pulses for one cycle.
//
// Every frame carries a sequence number that runs on from message to message
// for each destination, so the receiving node can tell a retransmitted frame
// from a new one.
//
// Interface: req_valid/req_ready/req (petition), done (pulse); rd_cmd and
// rd_data (memory read channel, 512-bit beats); tx_valid/tx_ready/tx (frames
// to the encoder, header repeated on every beat, last on the final beat of a
// frame); ack_valid/ack (ack messages seen by the packet decoder); retx_count
// (windows resent, a debug counter).
//
// From the document: frame size, 64-byte alignment, window of four frames,
// resend of the whole window after a fixed time. This design's own choices:
// the timeout value, running sequence numbers and the ack_req flag. Message
// sizes must be non-zero multiples of 64 bytes.
module message_sender
  import ompif_pkg::*;
#(
  parameter int TIMEOUT = 20000,     // cycles to wait for an ack
  parameter int NNODES  = MAX_NODES  // destinations with their own sequence counter
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RANK_W-1:0] my_rank,
  input  logic              req_valid,
  output logic              req_ready,
  input  msg_req_t          req,
  output logic              done,
  output logic              rd_cmd_valid,
  input  logic              rd_cmd_ready,
  output mem_cmd_t          rd_cmd,
  input  logic              rd_data_valid,
  output logic              rd_data_ready,
  input  logic [DATA_W-1:0] rd_data,
  input  logic              rd_last,
  output logic              tx_valid,
  input  logic              tx_ready,
  output net_beat_t         tx,
  input  logic              ack_valid,
  input  ack_t              ack,
  output logic [31:0]       retx_count
);

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_DATA, S_WAIT, S_DONE} state_e;
  state_e state;

  msg_req_t          cur;
  logic [LEN_W-1:0]  nframes;      // frames in the message
  logic [LEN_W-1:0]  win_start;    // first frame of the current window
  logic [LEN_W-1:0]  frame;        // frame being sent
  logic [LEN_W-1:0]  win_last;     // last frame of the current window
  logic [SEQ_W-1:0]  seq_base;     // sequence number of frame 0
  logic [31:0]       timer;
  logic [SEQ_W-1:0]  seq_tab [NNODES];

  localparam int NW = (NNODES > 1) ? $clog2(NNODES) : 1;

  logic [LEN_W-1:0]  offset;
  logic [LEN_W-1:0]  remaining;
  logic [FLEN_W-1:0] fbytes;
  logic [SEQ_W-1:0]  fseq;

  always_comb begin
    offset    = frame * LEN_W'(FRAME_BYTES);
    remaining = cur.bytes - offset;
    fbytes    = (remaining > LEN_W'(FRAME_BYTES)) ? FLEN_W'(FRAME_BYTES) : FLEN_W'(remaining);
    fseq      = seq_base + SEQ_W'(frame);
  end

  assign req_ready     = (state == S_IDLE);
  assign rd_cmd_valid  = (state == S_CMD);
  assign rd_cmd.addr   = cur.addr + ADDR_W'(offset);
  assign rd_cmd.bytes  = fbytes;
  assign tx_valid      = (state == S_DATA) && rd_data_valid;
  assign rd_data_ready = (state == S_DATA) && tx_ready;
  assign done          = (state == S_DONE);

  always_comb begin
    tx = '0;
    tx.hdr.ptype     = PKT_DATA;
    tx.hdr.node      = cur.rank;
    tx.hdr.udp_port  = PORT_MSG;
    tx.hdr.src_rank  = my_rank;
    tx.hdr.dst_rank  = cur.rank;
    tx.hdr.tag       = cur.tag;
    tx.hdr.seq       = fseq;
    tx.hdr.ack_req   = (frame == win_last);
    tx.hdr.msg_bytes = cur.bytes;
    tx.hdr.len       = fbytes;
    tx.data          = rd_data;
    tx.last          = rd_last;
  end

  logic ack_hit;
  assign ack_hit = ack_valid && (ack.src == cur.rank) && (ack.seq == seq_base + SEQ_W'(win_last));

  function automatic logic [LEN_W-1:0] last_of_window(logic [LEN_W-1:0] start, logic [LEN_W-1:0] n);
    return (start + LEN_W'(WINDOW) < n) ? start + LEN_W'(WINDOW - 1) : n - 1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      nframes    <= '0;
      win_start  <= '0;
      win_last   <= '0;
      frame      <= '0;
      seq_base   <= '0;
      timer      <= '0;
      retx_count <= '0;
      for (int n = 0; n < NNODES; n++) seq_tab[n] <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_valid) begin
          cur       <= req;
          nframes   <= (req.bytes + LEN_W'(FRAME_BYTES - 1)) / LEN_W'(FRAME_BYTES);
          win_start <= '0;
          frame     <= '0;
          win_last  <= last_of_window('0, (req.bytes + LEN_W'(FRAME_BYTES - 1)) / LEN_W'(FRAME_BYTES));
          seq_base  <= seq_tab[NW'(req.rank)];
          state     <= S_CMD;
        end
        S_CMD: if (rd_cmd_ready) state <= S_DATA;
        S_DATA: if (rd_data_valid && tx_ready && rd_last) begin
          if (frame == win_last) begin
            timer <= '0;
            state <= S_WAIT;
          end else begin
            frame <= frame + 1'b1;
            state <= S_CMD;
          end
        end
        S_WAIT: begin
          if (ack_hit) begin
            if (win_last + 1 >= nframes) begin
              seq_tab[NW'(cur.rank)] <= seq_base + SEQ_W'(nframes);
              state <= S_DONE;
            end else begin
              win_start <= win_last + 1;
              frame     <= win_last + 1;
              win_last  <= last_of_window(win_last + 1, nframes);
              state     <= S_CMD;
            end
          end else if (timer >= 32'(TIMEOUT - 1)) begin
            frame      <= win_start;
            retx_count <= retx_count + 1;
            state      <= S_CMD;
          end else begin
            timer <= timer + 1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && req_valid) |-> (req.bytes != 0 && req.bytes[5:0] == 0 && req.addr[5:0] == 0));

endmodule
