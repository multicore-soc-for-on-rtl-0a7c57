// memory_tile: the global memory tile, a fast SRAM on the network that any
// master can read and write. It gives the high-speed interfaces (ADC/DAC,
// SpaceWire, gigabit link) a buffer to stream into and out of.
//
// A slave-only network interface (noc_ni, "NI-S") turns READ and WRITE
// packets into word accesses on a single-port array of WORDS 32-bit words,
// addressed by byte offset (offset[1:0] ignored, offsets wrap at the array
// size). An access is answered one cycle after the interface presents it,
// which matches the platform's "SRAM with low access times running at the
// speed of the whole platform". The array size is not given for the platform;
// 64 KiB is this design's choice. The tile only answers; it never starts a
// transfer or sends an interrupt.
module memory_tile
  import noc_pkg::*;
#(
  parameter node_t       NODE  = NODE_GMT,
  parameter int unsigned WORDS = 16384
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready
);
  localparam int unsigned AW = $clog2(WORDS);

  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata, s_rdata;
  node_t       s_src;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b0)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready,
    .m_req(1'b0), .m_we(1'b0), .m_addr('0), .m_wdata('0), .m_prio(2'd0),
    .m_ack(), .m_rdata(),
    .s_req, .s_we, .s_addr, .s_wdata, .s_src, .s_ack, .s_rdata,
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  logic [31:0] mem [WORDS];
  logic        ack_q;
  logic [31:0] rdata_q;
  logic [AW-1:0] widx;
  assign widx = s_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (s_req && !ack_q) begin
      if (s_we) mem[widx] <= s_wdata;
      rdata_q <= mem[widx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= s_req && !ack_q;
  end

  assign s_ack   = ack_q;
  assign s_rdata = rdata_q;

endmodule
