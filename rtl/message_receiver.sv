// message_receiver: the receive half of the OMPIF message-passing runtime.
//
// Data frames are written to the temporary buffer by the memory manager,
// which then hands over a descriptor (source rank, tag, length, buffer
// address). The receiver keeps the descriptors of stored frames in a RAM of
// NDESC slots, chained into one linked list per source rank in arrival
// order: per source it holds the head, the tail and the number of frames;
// per slot the descriptor and the index of the next slot. Free slots are
// taken first from a never-used counter, then from a free list chained
// through the same next-index RAM, so the RAM needs no reset.
//
// A receive petition (source rank, tag, destination address, size) is served
// frame by frame. The receiver walks the source's list from its head, one
// slot per cycle, to the first frame with the petition's tag; reads it from
// the temporary buffer and writes it to the destination address plus the
// bytes already copied; then unlinks the slot (one cycle) and frees it (one
// cycle). When the whole size is copied, done pulses for one cycle. If the
// list holds no matching frame, the receiver waits until a frame from that
// source arrives and walks again. Frames of one source arrive in order, so
// the frames of a message are copied in order.
//
// Interface: desc_valid/desc_ready/desc (from the memory manager; not ready
// while a slot is being unlinked or freed, or when all slots are in use),
// req_valid/req_ready/req and done (petition from the runtime), rd_cmd/rd_data
// and wr_cmd/wr_data/wr_done (memory channels, 512-bit beats; wr_done must
// come after the last data beat). The copy runs one beat per cycle.
// Matching by source and tag and copying to the final address follow the
// document; the linked-list bookkeeping and its size are this design's own.
module message_receiver
  import ompif_pkg::*;
#(
  parameter int NDESC  = 32768,
  parameter int NNODES = MAX_NODES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              desc_valid,
  output logic              desc_ready,
  input  frame_desc_t       desc,
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
  output logic              wr_cmd_valid,
  input  logic              wr_cmd_ready,
  output mem_cmd_t          wr_cmd,
  output logic              wr_data_valid,
  input  logic              wr_data_ready,
  output logic [DATA_W-1:0] wr_data,
  output logic              wr_last,
  input  logic              wr_done,
  output logic [$clog2(NDESC+1)-1:0] stored
);

  localparam int SW = $clog2(NDESC);
  localparam int CW = $clog2(NDESC + 1);
  localparam int NW = (NNODES > 1) ? $clog2(NNODES) : 1;

  typedef enum logic [3:0] {V_IDLE, V_SEARCH, V_WAIT, V_RCMD, V_WCMD, V_COPY, V_WDONE, V_UNLINK, V_FREE, V_DONE} state_e;
  state_e state;

  // slot storage
  frame_desc_t   d_ram [NDESC];
  logic [SW-1:0] n_ram [NDESC];

  // per-source lists
  logic [SW-1:0] head  [NNODES];
  logic [SW-1:0] tail  [NNODES];
  logic [CW-1:0] cnt   [NNODES];

  // allocation
  logic [CW-1:0] fresh;       // slots never used so far are fresh..NDESC-1
  logic [SW-1:0] free_head;
  logic [CW-1:0] free_cnt;
  logic [CW-1:0] total;

  // current petition and walk
  msg_req_t         cur;
  logic [NW-1:0]    src;
  logic [LEN_W-1:0] copied;
  logic [SW-1:0]    walk, prev;
  logic             prev_valid;
  logic [CW-1:0]    steps;
  frame_desc_t      sel;

  frame_desc_t   walk_d;
  assign walk_d = d_ram[walk];

  logic          can_alloc;
  logic [SW-1:0] new_slot;
  assign can_alloc = (free_cnt != 0) || (fresh < CW'(NDESC));
  assign new_slot  = (free_cnt != 0) ? free_head : fresh[SW-1:0];

  assign desc_ready = can_alloc && state != V_UNLINK && state != V_FREE;
  assign req_ready  = (state == V_IDLE);
  assign done       = (state == V_DONE);
  assign stored     = total;

  logic ins;
  logic [NW-1:0] ins_src;
  assign ins     = desc_valid && desc_ready;
  assign ins_src = NW'(desc.src);

  assign rd_cmd_valid  = (state == V_RCMD);
  assign rd_cmd.addr   = sel.buf_addr;
  assign rd_cmd.bytes  = sel.len;
  assign wr_cmd_valid  = (state == V_WCMD);
  assign wr_cmd.addr   = cur.addr + ADDR_W'(copied);
  assign wr_cmd.bytes  = sel.len;
  assign wr_data_valid = (state == V_COPY) && rd_data_valid;
  assign rd_data_ready = (state == V_COPY) && wr_data_ready;
  assign wr_data       = rd_data;
  assign wr_last       = rd_last;

  // RAM writes: at most one per array per cycle
  always_ff @(posedge clk) begin
    if (ins) begin
      d_ram[new_slot] <= desc;
      if (cnt[ins_src] != 0) n_ram[tail[ins_src]] <= new_slot;
    end else if (state == V_UNLINK && prev_valid) begin
      n_ram[prev] <= n_ram[walk];
    end else if (state == V_FREE) begin
      n_ram[walk] <= free_head;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= V_IDLE;
      fresh      <= '0;
      free_head  <= '0;
      free_cnt   <= '0;
      total      <= '0;
      cur        <= '0;
      src        <= '0;
      copied     <= '0;
      walk       <= '0;
      prev       <= '0;
      prev_valid <= 1'b0;
      steps      <= '0;
      sel        <= '0;
      for (int s = 0; s < NNODES; s++) begin
        head[s] <= '0;
        tail[s] <= '0;
        cnt[s]  <= '0;
      end
    end else begin
      // append an arriving frame to its source's list
      if (ins) begin
        if (free_cnt != 0) begin
          free_head <= n_ram[free_head];
          free_cnt  <= free_cnt - 1'b1;
        end else begin
          fresh <= fresh + 1'b1;
        end
        if (cnt[ins_src] == 0) head[ins_src] <= new_slot;
        tail[ins_src] <= new_slot;
        cnt[ins_src]  <= cnt[ins_src] + 1'b1;
        total         <= total + 1'b1;
      end

      unique case (state)
        V_IDLE: if (req_valid) begin
          cur        <= req;
          src        <= NW'(req.rank);
          copied     <= '0;
          walk       <= head[NW'(req.rank)];
          prev_valid <= 1'b0;
          steps      <= '0;
          state      <= V_SEARCH;
        end
        V_SEARCH: begin
          if (steps >= cnt[src]) begin
            state <= V_WAIT;
          end else if (walk_d.tag == cur.tag) begin
            sel   <= walk_d;
            state <= V_RCMD;
          end else begin
            prev       <= walk;
            prev_valid <= 1'b1;
            walk       <= n_ram[walk];
            steps      <= steps + 1'b1;
          end
        end
        V_WAIT: if (ins && ins_src == src) begin
          walk       <= (cnt[src] == 0) ? new_slot : head[src];
          prev_valid <= 1'b0;
          steps      <= '0;
          state      <= V_SEARCH;
        end
        V_RCMD:  if (rd_cmd_ready) state <= V_WCMD;
        V_WCMD:  if (wr_cmd_ready) state <= V_COPY;
        V_COPY:  if (rd_data_valid && wr_data_ready && rd_last) state <= V_WDONE;
        V_WDONE: if (wr_done) begin
          copied <= copied + LEN_W'(sel.len);
          state  <= V_UNLINK;
        end
        V_UNLINK: begin
          // no arrival is accepted in this state, so the list is stable
          if (!prev_valid) head[src] <= n_ram[walk];
          if (tail[src] == walk) tail[src] <= prev;
          cnt[src] <= cnt[src] - 1'b1;
          total    <= total - 1'b1;
          state    <= V_FREE;
        end
        V_FREE: begin
          free_head <= walk;
          free_cnt  <= free_cnt + 1'b1;
          if (copied >= cur.bytes) begin
            state <= V_DONE;
          end else begin
            walk       <= head[src];
            prev_valid <= 1'b0;
            steps      <= '0;
            state      <= V_SEARCH;
          end
        end
        V_DONE:  state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end

  a_slots: assert property (@(posedge clk) disable iff (!rst_n) total <= CW'(NDESC));

endmodule
