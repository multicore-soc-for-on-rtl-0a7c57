// mpsoc_top: the network-on-chip subsystem of a multicore platform for
// on-board payload signal processing.
//
// Twelve routers (noc_mesh) join the tiles below; every tile is memory mapped
// (address[31:28] = node number) and every master can read and write any of
// them. Node, tile and interface kind:
//   0 ADC/DAC bridge  adc_dac_bridge  slave       (converter pins brought out)
//   1 default slave   default_slave   slave       (absorbs unmapped addresses)
//   2 DMA             noc_dma         master/slave
//   3 Xentium 0       xentium_tile    master/slave (core port brought out)
//   4 global memory   memory_tile     slave
//   5 (no tile)       local port idle
//   6 AMBA subsystem  noc_ni          master/slave (word ports brought out)
//   7 SDRAM ctrl      noc_ni          slave        (word ports brought out)
//   8 Xentium 1       xentium_tile    master/slave (core port brought out)
//   9 SpaceWire 2     noc_ni          master/slave (word ports brought out)
//  10 gigabit link    noc_ni          master/slave (word ports brought out)
//  11 SpaceWire 1     noc_ni          master/slave (word ports brought out)
// The devices behind nodes 6, 7, 9, 10 and 11 (the AMBA bridge with its
// processor and peripherals, the SDRAM controller, the SpaceWire links and the
// gigabit link) are outside this module. Each gets a network interface here
// and its word-access ports at the top: ext_* arrays indexed by EXT_AMBA,
// EXT_SDRAM, EXT_SPW1, EXT_SPW2, EXT_GBIF. A master port (ext_m, xen_m) holds
// its request until the matching rsp acknowledge; a slave port (ext_s) is
// presented an access and holds it until ext_s_rsp.ack. Interrupt messages
// can be sent from and are delivered to every master/slave node.
// The real-time clock of the AMBA subsystem (rtc_cuc) is also instantiated
// here, its APB port brought out as rtc_* signals, since the peripheral bus it
// hangs on is not part of this RTL.
// The tile list and floor plan follow the platform; all interfaces between the
// blocks are this design's choices.
module mpsoc_top
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned GMT_WORDS  = 16384,
  parameter int unsigned XEN_BYTES  = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  // ADC/DAC
  input  logic       adc_valid,
  input  logic [13:0] adc_data,
  input  logic       dac_strobe,
  output logic [11:0] dac_data,
  output logic       adc_overflow,
  output logic       dac_underflow,
  // Xentium cores
  input  mreq_t      xen_m          [2],
  output rsp_t       xen_rsp        [2],
  output logic       xen_timer_irq  [2],
  output irq_msg_t   xen_irq_in     [2],
  input  logic       xen_irq_req    [2],
  input  node_t      xen_irq_dst    [2],
  input  logic [7:0] xen_irq_num    [2],
  output logic       xen_irq_ack    [2],
  // devices outside the network subsystem
  input  mreq_t      ext_m          [5],
  output rsp_t       ext_m_rsp      [5],
  output sreq_t      ext_s          [5],
  input  rsp_t       ext_s_rsp      [5],
  input  logic       ext_irq_req    [5],
  input  node_t      ext_irq_dst    [5],
  input  logic [7:0] ext_irq_num    [5],
  output logic       ext_irq_ack    [5],
  output irq_msg_t   ext_irq_in     [5],
  // status
  output logic       dma_busy,
  output logic       dma_done,
  output logic [15:0] unmapped_count,
  output logic [27:0] unmapped_addr,
  // real-time clock, APB slave of the AMBA subsystem
  input  logic        rtc_psel,
  input  logic        rtc_penable,
  input  logic        rtc_pwrite,
  input  logic [7:0]  rtc_paddr,
  input  logic [31:0] rtc_pwdata,
  output logic [31:0] rtc_prdata,
  output logic        rtc_pready,
  output logic        rtc_pslverr,
  output logic [31:0] rtc_coarse,
  output logic [15:0] rtc_fine
);
  localparam int EXT_AMBA  = 0;
  localparam int EXT_SDRAM = 1;
  localparam int EXT_SPW1  = 2;
  localparam int EXT_SPW2  = 3;
  localparam int EXT_GBIF  = 4;

  localparam node_t EXT_NODE [5] = '{NODE_AMBA, NODE_SDRAM, NODE_SPW1, NODE_SPW2, NODE_GBIF};

  logic [NUM_PRIO-1:0] li_valid  [NUM_NODES];
  flit_t               li_flit   [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] li_ready  [NUM_NODES];
  logic [NUM_PRIO-1:0] lo_valid  [NUM_NODES];
  flit_t               lo_flit   [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] lo_ready  [NUM_NODES];

  noc_mesh #(.FIFO_DEPTH(FIFO_DEPTH)) u_mesh (
    .clk, .rst_n,
    .loc_in_valid  (li_valid),
    .loc_in_flit   (li_flit),
    .loc_in_ready  (li_ready),
    .loc_out_valid (lo_valid),
    .loc_out_flit  (lo_flit),
    .loc_out_ready (lo_ready)
  );

  // Node 0: ADC/DAC bridge
  adc_dac_bridge #(.NODE(NODE_ADCDAC)) u_adcdac (
    .clk, .rst_n,
    .tx_valid (li_valid[NODE_ADCDAC]), .tx_flit (li_flit[NODE_ADCDAC]), .tx_ready (li_ready[NODE_ADCDAC]),
    .rx_valid (lo_valid[NODE_ADCDAC]), .rx_flit (lo_flit[NODE_ADCDAC]), .rx_ready (lo_ready[NODE_ADCDAC]),
    .adc_valid, .adc_data, .dac_strobe, .dac_data, .adc_overflow, .dac_underflow
  );

  // Node 1: default slave
  default_slave #(.NODE(NODE_DEFAULT)) u_default (
    .clk, .rst_n,
    .tx_valid (li_valid[NODE_DEFAULT]), .tx_flit (li_flit[NODE_DEFAULT]), .tx_ready (li_ready[NODE_DEFAULT]),
    .rx_valid (lo_valid[NODE_DEFAULT]), .rx_flit (lo_flit[NODE_DEFAULT]), .rx_ready (lo_ready[NODE_DEFAULT]),
    .err_count (unmapped_count), .err_addr (unmapped_addr), .err_we (), .err_src ()
  );

  // Node 2: DMA
  noc_dma #(.NODE(NODE_DMA)) u_dma (
    .clk, .rst_n,
    .tx_valid (li_valid[NODE_DMA]), .tx_flit (li_flit[NODE_DMA]), .tx_ready (li_ready[NODE_DMA]),
    .rx_valid (lo_valid[NODE_DMA]), .rx_flit (lo_flit[NODE_DMA]), .rx_ready (lo_ready[NODE_DMA]),
    .busy (dma_busy), .done (dma_done)
  );

  // Node 4: global memory tile
  memory_tile #(.NODE(NODE_GMT), .WORDS(GMT_WORDS)) u_gmt (
    .clk, .rst_n,
    .tx_valid (li_valid[NODE_GMT]), .tx_flit (li_flit[NODE_GMT]), .tx_ready (li_ready[NODE_GMT]),
    .rx_valid (lo_valid[NODE_GMT]), .rx_flit (lo_flit[NODE_GMT]), .rx_ready (lo_ready[NODE_GMT])
  );

  // Node 5: router without a tile
  assign li_valid[NODE_SPARE] = '0;
  assign li_flit[NODE_SPARE]  = '{default: '0};
  assign lo_ready[NODE_SPARE] = '1;

  // Nodes 3 and 8: Xentium tiles
  localparam node_t XEN_NODE [2] = '{NODE_XEN0, NODE_XEN1};
  for (genvar k = 0; k < 2; k++) begin : g_xen
    xentium_tile #(.NODE(XEN_NODE[k]), .MEM_BYTES(XEN_BYTES)) u_xen (
      .clk, .rst_n,
      .tx_valid (li_valid[XEN_NODE[k]]), .tx_flit (li_flit[XEN_NODE[k]]), .tx_ready (li_ready[XEN_NODE[k]]),
      .rx_valid (lo_valid[XEN_NODE[k]]), .rx_flit (lo_flit[XEN_NODE[k]]), .rx_ready (lo_ready[XEN_NODE[k]]),
      .core_req   (xen_m[k].req),
      .core_we    (xen_m[k].we),
      .core_addr  (xen_m[k].addr),
      .core_wdata (xen_m[k].wdata),
      .core_prio  (xen_m[k].prio),
      .core_ack   (xen_rsp[k].ack),
      .core_rdata (xen_rsp[k].rdata),
      .timer_irq     (xen_timer_irq[k]),
      .net_irq_valid (xen_irq_in[k].valid),
      .net_irq_num   (xen_irq_in[k].num),
      .net_irq_src   (xen_irq_in[k].src),
      .core_irq_req  (xen_irq_req[k]),
      .core_irq_dst  (xen_irq_dst[k]),
      .core_irq_num  (xen_irq_num[k]),
      .core_irq_ack  (xen_irq_ack[k])
    );
  end

  // Nodes 6, 7, 9, 10, 11: interfaces of devices outside this module
  for (genvar e = 0; e < 5; e++) begin : g_ext
    noc_ni #(.NODE(EXT_NODE[e]), .HAS_MASTER(e != EXT_SDRAM)) u_ni (
      .clk, .rst_n,
      .tx_valid (li_valid[EXT_NODE[e]]), .tx_flit (li_flit[EXT_NODE[e]]), .tx_ready (li_ready[EXT_NODE[e]]),
      .rx_valid (lo_valid[EXT_NODE[e]]), .rx_flit (lo_flit[EXT_NODE[e]]), .rx_ready (lo_ready[EXT_NODE[e]]),
      .m_req   (ext_m[e].req),
      .m_we    (ext_m[e].we),
      .m_addr  (ext_m[e].addr),
      .m_wdata (ext_m[e].wdata),
      .m_prio  (ext_m[e].prio),
      .m_ack   (ext_m_rsp[e].ack),
      .m_rdata (ext_m_rsp[e].rdata),
      .s_req   (ext_s[e].req),
      .s_we    (ext_s[e].we),
      .s_addr  (ext_s[e].addr),
      .s_wdata (ext_s[e].wdata),
      .s_src   (ext_s[e].src),
      .s_ack   (ext_s_rsp[e].ack),
      .s_rdata (ext_s_rsp[e].rdata),
      .irq_req (ext_irq_req[e]),
      .irq_dst (ext_irq_dst[e]),
      .irq_num (ext_irq_num[e]),
      .irq_ack (ext_irq_ack[e]),
      .irq_in_valid (ext_irq_in[e].valid),
      .irq_in_num   (ext_irq_in[e].num),
      .irq_in_src   (ext_irq_in[e].src)
    );
  end

  // Real-time clock. It belongs to the AMBA subsystem's peripheral bus, which
  // is outside this module, so its bus port is brought out as it is.
  rtc_cuc u_rtc (
    .clk, .rst_n,
    .psel (rtc_psel), .penable (rtc_penable), .pwrite (rtc_pwrite), .paddr (rtc_paddr),
    .pwdata (rtc_pwdata), .prdata (rtc_prdata), .pready (rtc_pready), .pslverr (rtc_pslverr),
    .coarse (rtc_coarse), .fine (rtc_fine)
  );

endmodule
