// memory_manager: turns memory traffic arriving as packets into data-mover
// commands.
//
// Three kinds of packets come from the packet decoder:
//   * CPU memory write: a write command (addr, len) is issued, the packet's
//     beats are streamed as write data, and after the memory reports the write
//     done a one-beat response goes to the host.
//   * CPU memory read: a read command (addr, len) is issued and the data beats
//     are returned to the host as one response packet.
//   * data message frame: the frame is written to the temporary buffer, a
//     circular queue of TMP_BYTES bytes at TMP_BASE in board memory, and once
//     the write is done a descriptor (source, tag, length, buffer address) is
//     handed to the message receiver. A frame that would not fit before the
//     end of the buffer is placed at its start. As in the document, the buffer
//     is assumed large enough for all pending messages: there is no full check.
//
// Interface: in_valid/in_ready/in (packets from the decoder), wr_cmd/wr_data/
// wr_done and rd_cmd/rd_data (data-mover channels, 512-bit beats), rsp stream
// of net_beat_t towards the encoder, desc stream towards the receiver. One
// packet is handled at a time. The buffer placement, the write response and
// the single-packet read response are this design's own choices.
module memory_manager
  import ompif_pkg::*;
#(
  parameter logic [ADDR_W-1:0] TMP_BASE  = 34'h3_C000_0000, // last GiB of 16 GiB
  parameter logic [ADDR_W-1:0] TMP_BYTES = 34'h0_4000_0000  // 1 GiB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  net_beat_t         in_beat,
  output logic              wr_cmd_valid,
  input  logic              wr_cmd_ready,
  output mem_cmd_t          wr_cmd,
  output logic              wr_data_valid,
  input  logic              wr_data_ready,
  output logic [DATA_W-1:0] wr_data,
  output logic              wr_last,
  input  logic              wr_done,
  output logic              rd_cmd_valid,
  input  logic              rd_cmd_ready,
  output mem_cmd_t          rd_cmd,
  input  logic              rd_data_valid,
  output logic              rd_data_ready,
  input  logic [DATA_W-1:0] rd_data,
  input  logic              rd_last,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output net_beat_t         rsp,
  output logic              desc_valid,
  input  logic              desc_ready,
  output frame_desc_t       desc
);

  typedef enum logic [2:0] {M_IDLE, M_WCMD, M_WDATA, M_WDONE, M_WRSP, M_DESC, M_RCMD, M_RDATA} state_e;
  state_e state;

  pkt_hdr_t          h;          // header of the packet being handled
  logic [ADDR_W-1:0] wptr;       // next free offset in the temporary buffer
  logic [ADDR_W-1:0] waddr;      // where the current frame goes
  logic              is_frame;

  // placement of an incoming frame
  logic [ADDR_W-1:0] place;
  assign place = (wptr + ADDR_W'(in_beat.hdr.len) > TMP_BYTES) ? '0 : wptr;

  assign wr_cmd_valid  = (state == M_WCMD);
  assign wr_cmd.addr   = is_frame ? TMP_BASE + waddr : h.addr;
  assign wr_cmd.bytes  = h.len;
  assign wr_data_valid = (state == M_WDATA) && in_valid;
  assign wr_data       = in_beat.data;
  assign wr_last       = in_beat.last;

  assign rd_cmd_valid  = (state == M_RCMD);
  assign rd_cmd.addr   = h.addr;
  assign rd_cmd.bytes  = h.len;
  assign rd_data_ready = (state == M_RDATA) && rsp_ready;

  always_comb begin
    unique case (state)
      M_WDATA: in_ready = wr_data_ready;
      M_RCMD:  in_ready = rd_cmd_ready;
      default: in_ready = 1'b0;
    endcase
  end

  always_comb begin
    rsp           = '0;
    rsp.hdr.ptype = PKT_CPU_RESP;
    rsp.hdr.id    = h.id;
    rsp.hdr.addr  = h.addr;
    rsp.hdr.len   = h.len;
    if (state == M_RDATA) begin
      rsp_valid   = rd_data_valid;
      rsp.hdr.cmd = CMD_MEM_READ;
      rsp.data    = rd_data;
      rsp.last    = rd_last;
    end else begin
      rsp_valid   = (state == M_WRSP);
      rsp.hdr.cmd = CMD_MEM_WRITE;
      rsp.last    = 1'b1;
    end
  end

  assign desc_valid    = (state == M_DESC);
  assign desc.src      = h.node;
  assign desc.tag      = h.tag;
  assign desc.len      = h.len;
  assign desc.buf_addr = TMP_BASE + waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      h        <= '0;
      wptr     <= '0;
      waddr    <= '0;
      is_frame <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: if (in_valid) begin
          h        <= in_beat.hdr;
          is_frame <= (in_beat.hdr.ptype == PKT_DATA);
          if (in_beat.hdr.ptype == PKT_DATA) begin
            waddr <= place;
            wptr  <= place + ADDR_W'(in_beat.hdr.len);
            state <= M_WCMD;
          end else if (in_beat.hdr.cmd == CMD_MEM_READ) begin
            state <= M_RCMD;
          end else begin
            state <= M_WCMD;
          end
        end
        M_WCMD:  if (wr_cmd_ready) state <= M_WDATA;
        M_WDATA: if (in_valid && wr_data_ready && in_beat.last) state <= M_WDONE;
        M_WDONE: if (wr_done) state <= is_frame ? M_DESC : M_WRSP;
        M_WRSP:  if (rsp_ready) state <= M_IDLE;
        M_DESC:  if (desc_ready) state <= M_IDLE;
        M_RCMD:  if (rd_cmd_ready) state <= M_RDATA;
        M_RDATA: if (rd_data_valid && rsp_ready && rd_last) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
