// noc_pkg: types and constants shared by the network-on-chip, its network
// interfaces and the tiles.
//
// The network is a packet-switched mesh of 32-bit links. Every link carries
// four priority classes; priority 0 is the highest (interrupts), priority 3 the
// lowest (single reads and writes). A packet stays in one priority class from
// source to destination. The 32-bit data width, the four priorities and the
// 12-router floor plan follow the platform description; the flit and packet
// formats, the node numbering and the address map are this design's own.
//
// Flit: {head, tail, data[31:0]}. A single-flit packet has head and tail set.
// Head flit data: [31:28] destination node, [27:24] source node,
//                 [23:21] command, [7:0] interrupt number (CMD_IRQ only).
// Packets:  WRITE  = head, address, data       (3 flits)
//           READ   = head, address             (2 flits)
//           RDRESP = head, data                (2 flits)
//           WRACK  = head                      (1 flit)
//           IRQ    = head                      (1 flit)
// Global address map: address[31:28] is the node number; address[27:0] is the
// offset inside that node. Node numbers without a device are served by the
// default slave.
package noc_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned NUM_PRIO  = 4;
  localparam int unsigned NUM_NODES = 12;

  // Priority classes.
  localparam logic [1:0] PRIO_IRQ    = 2'd0;  // interrupt messages
  localparam logic [1:0] PRIO_RESP   = 2'd1;  // read data and write acknowledges
  localparam logic [1:0] PRIO_BLOCK  = 2'd2;  // block (DMA) transfers
  localparam logic [1:0] PRIO_SINGLE = 2'd3;  // single reads and writes

  typedef logic [3:0] node_t;

  typedef enum logic [2:0] {
    CMD_WRITE  = 3'd0,
    CMD_READ   = 3'd1,
    CMD_WRACK  = 3'd2,
    CMD_RDRESP = 3'd3,
    CMD_IRQ    = 3'd4
  } cmd_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One physical link direction between two routers: one flit per cycle,
  // tagged with its priority class. Back-pressure runs the other way as one
  // ready bit per priority class.
  typedef struct packed {
    logic       valid;
    logic [1:0] prio;
    flit_t      flit;
  } link_t;

  // Word-access ports of the network interfaces, bundled for the ports of
  // the top level. A request is held until its acknowledge.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [1:0]  prio;
  } mreq_t;      // tile -> network (master side)

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } rsp_t;       // acknowledge with read data

  typedef struct packed {
    logic        req;
    logic        we;
    logic [27:0] addr;
    logic [31:0] wdata;
    node_t       src;
  } sreq_t;      // network -> tile (slave side)

  typedef struct packed {
    logic       valid;
    logic [7:0] num;
    node_t      src;
  } irq_msg_t;   // received interrupt message

  // Router port numbering. Port 4 is the local port, which has one physical
  // link per priority class.
  localparam int unsigned P_N = 0;
  localparam int unsigned P_E = 1;
  localparam int unsigned P_S = 2;
  localparam int unsigned P_W = 3;
  localparam int unsigned P_L = 4;

  // Node numbers of the tiles, row by row over the floor plan.
  localparam node_t NODE_ADCDAC  = 4'd0;
  localparam node_t NODE_DEFAULT = 4'd1;
  localparam node_t NODE_DMA     = 4'd2;
  localparam node_t NODE_XEN0    = 4'd3;
  localparam node_t NODE_GMT     = 4'd4;
  localparam node_t NODE_SPARE   = 4'd5;  // router without a tile
  localparam node_t NODE_AMBA    = 4'd6;
  localparam node_t NODE_SDRAM   = 4'd7;
  localparam node_t NODE_XEN1    = 4'd8;
  localparam node_t NODE_SPW2    = 4'd9;
  localparam node_t NODE_GBIF    = 4'd10;
  localparam node_t NODE_SPW1    = 4'd11;

  // Column (x) and row (y) of each node in the 4x4 grid without corners.
  function automatic logic [1:0] node_x(node_t n);
    case (n)
      4'd0: return 2'd1;  4'd1: return 2'd2;
      4'd2: return 2'd0;  4'd3: return 2'd1;  4'd4: return 2'd2;  4'd5: return 2'd3;
      4'd6: return 2'd0;  4'd7: return 2'd1;  4'd8: return 2'd2;  4'd9: return 2'd3;
      4'd10: return 2'd1; 4'd11: return 2'd2;
      default: return 2'd2;  // unused numbers resolve to the default slave
    endcase
  endfunction

  function automatic logic [1:0] node_y(node_t n);
    case (n)
      4'd0, 4'd1:                return 2'd0;
      4'd2, 4'd3, 4'd4, 4'd5:    return 2'd1;
      4'd6, 4'd7, 4'd8, 4'd9:    return 2'd2;
      4'd10, 4'd11:              return 2'd3;
      default:                   return 2'd0;
    endcase
  endfunction

  // Node that serves a global address: nodes without a device go to the
  // default slave.
  function automatic node_t addr_node(logic [31:0] addr);
    node_t n;
    n = addr[31:28];
    if (n >= node_t'(NUM_NODES) || n == NODE_SPARE) return NODE_DEFAULT;
    return n;
  endfunction

  function automatic flit_t make_head(node_t dst, node_t src, cmd_e cmd,
                                      logic [7:0] info, logic tail);
    flit_t f;
    f.head = 1'b1;
    f.tail = tail;
    f.data = {dst, src, cmd, 13'd0, info};
    return f;
  endfunction

  function automatic node_t head_dst(flit_t f);
    return f.data[31:28];
  endfunction

  function automatic node_t head_src(flit_t f);
    return f.data[27:24];
  endfunction

  function automatic cmd_e head_cmd(flit_t f);
    return cmd_e'(f.data[23:21]);
  endfunction

endpackage
