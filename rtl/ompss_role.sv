// ompss_role: the OmpSs@cloudFPGA Role, the application side of a network-
// attached FPGA.
//
// Packets from the Shell enter the packet decoder. Host tasks go to the
// hardware runtime (pom), host memory accesses and incoming data messages go
// to the memory manager, acks go to the message sender. The runtime runs
// tasks on the accelerators: the N-body creator inside this module, and
// NFORCE force and NUPD update accelerators outside it, reached through the
// ext_* ports (their task and done signals, and their memory channels). The
// creator spawns tasks back into the runtime, including OMPIF send and
// receive petitions, which the runtime hands to the message sender and
// receiver. Everything that leaves the FPGA goes through the packet encoder.
// All memory traffic is merged by mem_arbiter onto one read and one write
// data-mover channel (mem_*), served by the board memory outside.
//
// Memory masters: reads  0 memory manager, 1 message sender, 2 receiver,
//                        3.. external accelerators;
//                 writes 0 memory manager, 1 receiver, 2.. external accelerators.
// Encoder inputs: 0 message sender, 1 decoder acks and counter reports,
//                 2 memory manager responses, 3 runtime task completions.
// Accelerator slots: 0 creator, 1..NFORCE force, then NUPD update.
//
// Two clocks: the network streams rx/tx run on net_clk, the Shell's clock
// (156.25 MHz in the original system), and everything else on clk, the
// accelerator clock (200 MHz there). Two async_fifo instances of NET_FIFO
// beats cross between them at the Shell boundary. In the original system the
// encoder and decoder themselves run on the Shell clock; here they sit on the
// Role side of the crossing so that the Role has one crossing per direction
// instead of one per internal stream. Assert rst_n and net_rst_n together.
module ompss_role
  import ompif_pkg::*;
#(
  parameter int NFORCE  = 4,
  parameter int NUPD    = 1,
  parameter int TIMEOUT = 20000,
  parameter int BLOCK   = 2048,
  parameter int NET_FIFO = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // Shell network streams, on the Shell's clock
  input  logic                            net_clk,
  input  logic                            net_rst_n,
  input  logic                            rx_valid,
  output logic                            rx_ready,
  input  net_beat_t                       rx,
  output logic                            tx_valid,
  input  logic                            tx_ready,
  output net_beat_t                       tx,
  // board memory, data-mover style
  output logic                            mem_rd_cmd_valid,
  input  logic                            mem_rd_cmd_ready,
  output mem_cmd_t                        mem_rd_cmd,
  input  logic                            mem_rd_data_valid,
  output logic                            mem_rd_data_ready,
  input  logic [DATA_W-1:0]               mem_rd_data,
  input  logic                            mem_rd_last,
  output logic                            mem_wr_cmd_valid,
  input  logic                            mem_wr_cmd_ready,
  output mem_cmd_t                        mem_wr_cmd,
  output logic                            mem_wr_data_valid,
  input  logic                            mem_wr_data_ready,
  output logic [DATA_W-1:0]               mem_wr_data,
  output logic                            mem_wr_last,
  input  logic                            mem_wr_done,
  // external accelerators (force, then update)
  output logic     [NFORCE+NUPD-1:0]      ext_task_valid,
  input  logic     [NFORCE+NUPD-1:0]      ext_task_ready,
  output task_t                           ext_task,
  input  logic     [NFORCE+NUPD-1:0]      ext_done,
  input  logic     [NFORCE+NUPD-1:0]      ext_rd_cmd_valid,
  output logic     [NFORCE+NUPD-1:0]      ext_rd_cmd_ready,
  input  mem_cmd_t [NFORCE+NUPD-1:0]      ext_rd_cmd,
  output logic     [NFORCE+NUPD-1:0]      ext_rd_data_valid,
  input  logic     [NFORCE+NUPD-1:0]      ext_rd_data_ready,
  output logic     [DATA_W-1:0]           ext_rd_data,
  output logic                            ext_rd_last,
  input  logic     [NFORCE+NUPD-1:0]      ext_wr_cmd_valid,
  output logic     [NFORCE+NUPD-1:0]      ext_wr_cmd_ready,
  input  mem_cmd_t [NFORCE+NUPD-1:0]      ext_wr_cmd,
  input  logic     [NFORCE+NUPD-1:0]      ext_wr_data_valid,
  output logic     [NFORCE+NUPD-1:0]      ext_wr_data_ready,
  input  logic     [NFORCE+NUPD-1:0][DATA_W-1:0] ext_wr_data,
  input  logic     [NFORCE+NUPD-1:0]      ext_wr_last,
  output logic     [NFORCE+NUPD-1:0]      ext_wr_done,
  // status
  output logic     [RANK_W-1:0]           my_rank,
  output logic     [RANK_W:0]             cluster_size,
  output logic     [31:0]                 retx_count
);

  localparam int NEXT = NFORCE + NUPD;
  localparam int NACC = 1 + NEXT;
  localparam int NRD  = 3 + NEXT;
  localparam int NWR  = 2 + NEXT;

  function automatic logic [NACC-1:0][7:0] acc_types();
    logic [NACC-1:0][7:0] t;
    t[0] = TT_CREATOR;
    for (int a = 1; a < NACC; a++) t[a] = (a <= NFORCE) ? TT_FORCE : TT_UPDATE;
    return t;
  endfunction

  // ---------------- decoder ----------------
  logic      dec_task_valid, dec_task_ready;
  task_t     dec_task;
  logic      dec_mm_valid, dec_mm_ready;
  net_beat_t dec_mm;
  logic      ack_valid;
  ack_t      ack;
  logic [3:0][31:0] tx_type_count, rx_type_count;
  logic [RANK_W-1:0] node_sel;
  logic [31:0]       node_count;

  logic      [3:0] enc_valid, enc_ready;
  net_beat_t [3:0] enc_beat;

  // clock-domain crossing at the Shell boundary
  logic      c_rx_valid, c_rx_ready, c_tx_valid, c_tx_ready;
  net_beat_t c_rx, c_tx;

  async_fifo #(.WIDTH($bits(net_beat_t)), .DEPTH(NET_FIFO)) u_rx_cdc (
    .wr_clk(net_clk), .wr_rst_n(net_rst_n), .wr_valid(rx_valid), .wr_ready(rx_ready), .wr_data(rx),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_valid(c_rx_valid), .rd_ready(c_rx_ready), .rd_data(c_rx));

  async_fifo #(.WIDTH($bits(net_beat_t)), .DEPTH(NET_FIFO)) u_tx_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_valid(c_tx_valid), .wr_ready(c_tx_ready), .wr_data(c_tx),
    .rd_clk(net_clk), .rd_rst_n(net_rst_n), .rd_valid(tx_valid), .rd_ready(tx_ready), .rd_data(tx));

  packet_decoder u_dec (
    .clk, .rst_n,
    .rx_valid(c_rx_valid), .rx_ready(c_rx_ready), .rx(c_rx),
    .task_valid(dec_task_valid), .task_ready(dec_task_ready), .task_o(dec_task),
    .mm_valid(dec_mm_valid), .mm_ready(dec_mm_ready), .mm(dec_mm),
    .ack_valid, .ack,
    .rsp_valid(enc_valid[1]), .rsp_ready(enc_ready[1]), .rsp(enc_beat[1]),
    .my_rank, .cluster_size,
    .tx_type_count, .tx_node_sel(node_sel), .tx_node_count(node_count),
    .rx_type_count
  );

  packet_encoder #(.NIN(4), .RESP_MASK(4'b1100)) u_enc (
    .clk, .rst_n, .my_rank,
    .in_valid(enc_valid), .in_ready(enc_ready), .in_beat(enc_beat),
    .tx_valid(c_tx_valid), .tx_ready(c_tx_ready), .tx(c_tx),
    .tx_type_count, .node_sel, .node_count
  );

  // ---------------- memory interconnect ----------------
  logic     [NRD-1:0] rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_ready;
  mem_cmd_t [NRD-1:0] rd_cmd;
  logic [DATA_W-1:0]  rd_data;
  logic               rd_last;
  logic     [NWR-1:0] wr_cmd_valid, wr_cmd_ready, wr_data_valid, wr_data_ready, wr_last, wr_done;
  mem_cmd_t [NWR-1:0] wr_cmd;
  logic     [NWR-1:0][DATA_W-1:0] wr_data;

  mem_arbiter #(.NRD(NRD), .NWR(NWR)) u_x (
    .clk, .rst_n,
    .m_rd_cmd_valid(rd_cmd_valid), .m_rd_cmd_ready(rd_cmd_ready), .m_rd_cmd(rd_cmd),
    .m_rd_data_valid(rd_data_valid), .m_rd_data_ready(rd_data_ready),
    .m_rd_data(rd_data), .m_rd_last(rd_last),
    .m_wr_cmd_valid(wr_cmd_valid), .m_wr_cmd_ready(wr_cmd_ready), .m_wr_cmd(wr_cmd),
    .m_wr_data_valid(wr_data_valid), .m_wr_data_ready(wr_data_ready),
    .m_wr_data(wr_data), .m_wr_last(wr_last), .m_wr_done(wr_done),
    .s_rd_cmd_valid(mem_rd_cmd_valid), .s_rd_cmd_ready(mem_rd_cmd_ready), .s_rd_cmd(mem_rd_cmd),
    .s_rd_data_valid(mem_rd_data_valid), .s_rd_data_ready(mem_rd_data_ready),
    .s_rd_data(mem_rd_data), .s_rd_last(mem_rd_last),
    .s_wr_cmd_valid(mem_wr_cmd_valid), .s_wr_cmd_ready(mem_wr_cmd_ready), .s_wr_cmd(mem_wr_cmd),
    .s_wr_data_valid(mem_wr_data_valid), .s_wr_data_ready(mem_wr_data_ready),
    .s_wr_data(mem_wr_data), .s_wr_last(mem_wr_last), .s_wr_done(mem_wr_done)
  );

  assign rd_cmd_valid[NRD-1:3]  = ext_rd_cmd_valid;
  assign rd_cmd[NRD-1:3]        = ext_rd_cmd;
  assign rd_data_ready[NRD-1:3] = ext_rd_data_ready;
  assign ext_rd_cmd_ready       = rd_cmd_ready[NRD-1:3];
  assign ext_rd_data_valid      = rd_data_valid[NRD-1:3];
  assign ext_rd_data            = rd_data;
  assign ext_rd_last            = rd_last;
  assign wr_cmd_valid[NWR-1:2]  = ext_wr_cmd_valid;
  assign wr_cmd[NWR-1:2]        = ext_wr_cmd;
  assign wr_data_valid[NWR-1:2] = ext_wr_data_valid;
  assign wr_data[NWR-1:2]       = ext_wr_data;
  assign wr_last[NWR-1:2]       = ext_wr_last;
  assign ext_wr_cmd_ready       = wr_cmd_ready[NWR-1:2];
  assign ext_wr_data_ready      = wr_data_ready[NWR-1:2];
  assign ext_wr_done            = wr_done[NWR-1:2];

  // ---------------- memory manager ----------------
  logic        desc_valid, desc_ready;
  frame_desc_t desc;

  memory_manager u_mm (
    .clk, .rst_n,
    .in_valid(dec_mm_valid), .in_ready(dec_mm_ready), .in_beat(dec_mm),
    .wr_cmd_valid(wr_cmd_valid[0]), .wr_cmd_ready(wr_cmd_ready[0]), .wr_cmd(wr_cmd[0]),
    .wr_data_valid(wr_data_valid[0]), .wr_data_ready(wr_data_ready[0]),
    .wr_data(wr_data[0]), .wr_last(wr_last[0]), .wr_done(wr_done[0]),
    .rd_cmd_valid(rd_cmd_valid[0]), .rd_cmd_ready(rd_cmd_ready[0]), .rd_cmd(rd_cmd[0]),
    .rd_data_valid(rd_data_valid[0]), .rd_data_ready(rd_data_ready[0]),
    .rd_data(rd_data), .rd_last(rd_last),
    .rsp_valid(enc_valid[2]), .rsp_ready(enc_ready[2]), .rsp(enc_beat[2]),
    .desc_valid, .desc_ready, .desc
  );

  // ---------------- runtime ----------------
  logic  [NACC-1:0]       cr_valid, cr_ready, acc_task_valid, acc_task_ready, acc_done;
  task_t [NACC-1:0]       cr_task;
  logic  [NACC-1:0][15:0] children_pending;
  task_t                  acc_task;
  logic     send_valid, send_ready, send_done, recv_valid, recv_ready, recv_done;
  msg_req_t send_req, recv_req;

  pom #(.NACC(NACC), .ACC_TYPE(acc_types())) u_pom (
    .clk, .rst_n,
    .host_valid(dec_task_valid), .host_ready(dec_task_ready), .host_task(dec_task),
    .cr_valid, .cr_ready, .cr_task, .children_pending,
    .acc_task_valid, .acc_task_ready, .acc_task, .acc_done,
    .send_valid, .send_ready, .send_req, .send_done,
    .recv_valid, .recv_ready, .recv_req, .recv_done,
    .rsp_valid(enc_valid[3]), .rsp_ready(enc_ready[3]), .rsp(enc_beat[3])
  );

  assign cr_valid[NACC-1:1] = '0;
  assign cr_task[NACC-1:1]  = '0;
  assign ext_task_valid             = acc_task_valid[NACC-1:1];
  assign acc_task_ready[NACC-1:1]   = ext_task_ready;
  assign ext_task                   = acc_task;
  assign acc_done[NACC-1:1]         = ext_done;

  nbody_creator #(.BLOCK(BLOCK)) u_creator (
    .clk, .rst_n, .my_rank, .cluster_size,
    .task_valid(acc_task_valid[0]), .task_ready(acc_task_ready[0]), .task_i(acc_task),
    .done(acc_done[0]),
    .create_valid(cr_valid[0]), .create_ready(cr_ready[0]), .create(cr_task[0]),
    .pending(children_pending[0])
  );

  // ---------------- OMPIF runtime ----------------
  message_sender #(.TIMEOUT(TIMEOUT)) u_send (
    .clk, .rst_n, .my_rank,
    .req_valid(send_valid), .req_ready(send_ready), .req(send_req), .done(send_done),
    .rd_cmd_valid(rd_cmd_valid[1]), .rd_cmd_ready(rd_cmd_ready[1]), .rd_cmd(rd_cmd[1]),
    .rd_data_valid(rd_data_valid[1]), .rd_data_ready(rd_data_ready[1]),
    .rd_data(rd_data), .rd_last(rd_last),
    .tx_valid(enc_valid[0]), .tx_ready(enc_ready[0]), .tx(enc_beat[0]),
    .ack_valid, .ack, .retx_count
  );

  message_receiver u_recv (
    .clk, .rst_n,
    .desc_valid, .desc_ready, .desc,
    .req_valid(recv_valid), .req_ready(recv_ready), .req(recv_req), .done(recv_done),
    .rd_cmd_valid(rd_cmd_valid[2]), .rd_cmd_ready(rd_cmd_ready[2]), .rd_cmd(rd_cmd[2]),
    .rd_data_valid(rd_data_valid[2]), .rd_data_ready(rd_data_ready[2]),
    .rd_data(rd_data), .rd_last(rd_last),
    .wr_cmd_valid(wr_cmd_valid[1]), .wr_cmd_ready(wr_cmd_ready[1]), .wr_cmd(wr_cmd[1]),
    .wr_data_valid(wr_data_valid[1]), .wr_data_ready(wr_data_ready[1]),
    .wr_data(wr_data[1]), .wr_last(wr_last[1]), .wr_done(wr_done[1]),
    .stored()
  );

endmodule
