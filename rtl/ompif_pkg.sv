// ompif_pkg: types and constants shared by the OmpSs@cloudFPGA Role.
//
// The Role moves three kinds of traffic: UDP packets to and from the Shell
// (net_beat_t), tasks between the hardware runtime and the accelerators
// (task_t), and memory accesses through a data-mover style command/data
// interface (mem_cmd_t plus 512-bit data beats).
//
// Taken from the description of the system: 512-bit memory data (the AXI4
// data channels of the memory controller), 64-byte address alignment,
// 1408-byte message frames (22 beats), a window of four frames per ack,
// 64-bit task parameters, 8-bit message tags, four packet classes (CPU
// command, CPU response, data message, ack message) and 16 GB of board memory
// (34-bit byte addresses).
//
// This design's own choices: the network stream is also 512 bits wide and
// carries the packet header as side-band fields repeated on every beat of a
// packet (pkt_hdr_t) instead of as bytes in the payload; ranks and node
// numbers are 8 bits; the host is node HOST_NODE; UDP port numbers, command
// codes and task type codes are arbitrary values defined here.
package ompif_pkg;

  localparam int DATA_W      = 512;
  localparam int BEAT_BYTES  = DATA_W / 8;               // 64
  localparam int ADDR_W      = 34;                       // 16 GB DDR4
  localparam int RANK_W      = 8;
  localparam int TAG_W       = 8;
  localparam int SEQ_W       = 16;
  localparam int LEN_W       = 32;                       // message size in bytes
  localparam int FLEN_W      = 16;                       // bytes of one frame / memory command
  localparam int ID_W        = 16;
  localparam int FRAME_BYTES = 1408;                     // largest multiple of 64 below the 1450-byte MTU
  localparam int FRAME_BEATS = FRAME_BYTES / BEAT_BYTES; // 22
  localparam int WINDOW      = 4;                        // frames sent before waiting for an ack
  localparam int MAX_ARGS    = 8;                        // 64-bit task parameters in one beat
  localparam int NDEP        = 3;                        // dependences carried by one task
  localparam int MAX_NODES   = 64;                       // per-node debug counters

  localparam logic [RANK_W-1:0] HOST_NODE = 8'hFF;

  localparam logic [15:0] PORT_TASK = 16'd2718;  // host task / control traffic
  localparam logic [15:0] PORT_MEM  = 16'd2719;  // host memory read/write traffic
  localparam logic [15:0] PORT_MSG  = 16'd2720;  // FPGA-to-FPGA OMPIF messages

  typedef enum logic [1:0] {
    PKT_CPU_CMD  = 2'd0,
    PKT_CPU_RESP = 2'd1,
    PKT_DATA     = 2'd2,
    PKT_ACK      = 2'd3
  } pkt_type_e;

  typedef enum logic [2:0] {
    CMD_EXEC_TASK = 3'd0,   // run a task: type in tag, id in id, arguments in the beat
    CMD_MEM_WRITE = 3'd1,   // write len bytes at addr, data in the beats
    CMD_MEM_READ  = 3'd2,   // read len bytes at addr, answered with the data
    CMD_READ_CNT  = 3'd3,   // read the debug counters of node dst_rank
    CMD_SET_RANK  = 3'd4    // rank in dst_rank, cluster size in len
  } cpu_cmd_e;

  typedef struct packed {
    pkt_type_e          ptype;
    cpu_cmd_e           cmd;
    logic [RANK_W-1:0]  node;      // remote node: source on receive, destination on send
    logic [15:0]        udp_port;
    logic [RANK_W-1:0]  src_rank;
    logic [RANK_W-1:0]  dst_rank;
    logic [TAG_W-1:0]   tag;
    logic [SEQ_W-1:0]   seq;       // frame sequence number, per sender/receiver pair
    logic               ack_req;   // last frame of a window: the receiver must ack it
    logic [LEN_W-1:0]   msg_bytes; // size of the whole message
    logic [FLEN_W-1:0]  len;       // bytes carried by this packet / memory command
    logic [ADDR_W-1:0]  addr;
    logic [ID_W-1:0]    id;
  } pkt_hdr_t;

  typedef struct packed {
    pkt_hdr_t            hdr;
    logic [DATA_W-1:0]   data;
    logic                last;
  } net_beat_t;

  // Task type codes. TT_SEND and TT_RECV are OMPIF petitions handled by the
  // message sender and receiver; the others name accelerator kinds.
  localparam logic [7:0] TT_NONE    = 8'h00;
  localparam logic [7:0] TT_CREATOR = 8'h01;
  localparam logic [7:0] TT_FORCE   = 8'h02;
  localparam logic [7:0] TT_UPDATE  = 8'h03;
  localparam logic [7:0] TT_SEND    = 8'hF0;
  localparam logic [7:0] TT_RECV    = 8'hF1;

  localparam int PARENT_W = 4;
  localparam logic [PARENT_W-1:0] PARENT_HOST = '1;

  typedef struct packed {
    logic        valid;
    logic        inout_dir;   // 1: the task writes the region, 0: it only reads it
    logic [63:0] addr;        // base address that names the region
  } dep_t;

  typedef struct packed {
    logic [7:0]                   ttype;
    logic [PARENT_W-1:0]          parent;   // creating accelerator, or PARENT_HOST
    logic [ID_W-1:0]              id;
    dep_t [NDEP-1:0]              deps;
    logic [MAX_ARGS-1:0][63:0]    args;
  } task_t;

  // OMPIF send/receive petition: arguments of TT_SEND / TT_RECV tasks are
  // args[0] = buffer address, args[1] = bytes, args[2] = peer rank, args[3] = tag.
  typedef struct packed {
    logic [RANK_W-1:0] rank;
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  bytes;
  } msg_req_t;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [FLEN_W-1:0] bytes;
  } mem_cmd_t;

  typedef struct packed {
    logic [RANK_W-1:0] src;
    logic [SEQ_W-1:0]  seq;
  } ack_t;

  // A data frame stored in the temporary buffer, waiting for a matching receive.
  typedef struct packed {
    logic [RANK_W-1:0] src;
    logic [TAG_W-1:0]  tag;
    logic [FLEN_W-1:0] len;
    logic [ADDR_W-1:0] buf_addr;
  } frame_desc_t;

  function automatic msg_req_t task_to_req(task_t t);
    msg_req_t r;
    r.addr  = t.args[0][ADDR_W-1:0];
    r.bytes = t.args[1][LEN_W-1:0];
    r.rank  = t.args[2][RANK_W-1:0];
    r.tag   = t.args[3][TAG_W-1:0];
    return r;
  endfunction

endpackage
