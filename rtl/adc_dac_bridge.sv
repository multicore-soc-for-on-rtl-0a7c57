// adc_dac_bridge: connects an external analog-to-digital converter (14-bit
// samples) and digital-to-analog converter (12-bit samples) to the network.
//
// Two samples share one 32-bit network word, so the links carry samples at
// full width: a word holds the earlier sample in bits [15:0] and the later one
// in bits [31:16]. ADC samples are taken as two's complement and sign-extended
// to 16 bits; a DAC sample is bits [11:0] of its half word.
//
// ADC path: adc_valid marks a new sample on adc_data (up to one per clock;
// the converters run at up to 40 MS/s against a 50 MHz system clock). Pairs
// are packed and queued in a FIFO of FIFO_DEPTH words. A full FIFO drops the
// word and sets the sticky adc_overflow flag.
// DAC path: words written to the bridge are queued in a second FIFO and
// unpacked; each dac_strobe puts the next sample on dac_data (registered). An
// empty FIFO holds the last value and sets the sticky dac_underflow flag.
//
// Network side, a slave-only interface ("NI-S"), byte offsets:
//   0x00 ADC_DATA  read: the oldest packed ADC word; the access waits until
//                  one is there
//   0x04 DAC_DATA  write: queue a packed DAC word; waits until there is room
//   0x08 STATUS    [7:0] ADC words queued, [15:8] DAC words queued,
//                  [16] adc_overflow, [17] dac_underflow
//   0x0C CTRL      [0] ADC enable, [1] DAC enable; a write clears the flags
// Waiting accesses let a DMA engine stream samples with fixed source or
// destination addresses and no software pacing, as the platform moves all
// converter data by DMA. Sample widths and packing are the platform's; the
// FIFOs, register map and flags are this design's choices.
module adc_dac_bridge
  import noc_pkg::*;
#(
  parameter node_t       NODE       = NODE_ADCDAC,
  parameter int unsigned ADC_BITS   = 14,
  parameter int unsigned DAC_BITS   = 12,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready,
  // converters
  input  logic                adc_valid,
  input  logic [ADC_BITS-1:0] adc_data,
  input  logic                dac_strobe,
  output logic [DAC_BITS-1:0] dac_data,
  output logic                adc_overflow,
  output logic                dac_underflow
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata, s_rdata;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b0)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready,
    .m_req(1'b0), .m_we(1'b0), .m_addr('0), .m_wdata('0), .m_prio(2'd0),
    .m_ack(), .m_rdata(),
    .s_req, .s_we, .s_addr, .s_wdata, .s_src(), .s_ack, .s_rdata,
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  logic adc_en, dac_en;

  // ------------------------------------------------------------------
  // ADC packing
  // ------------------------------------------------------------------
  logic        adc_half;      // a first sample is waiting for its partner
  logic [15:0] adc_low;
  logic        adc_push, adc_pop, adc_full, adc_empty;
  logic [31:0] adc_word, adc_head;
  logic [LW-1:0] adc_level, dac_level;

  function automatic logic [15:0] sext(logic [ADC_BITS-1:0] s);
    return 16'($signed(s));
  endfunction

  assign adc_word = {sext(adc_data), adc_low};
  assign adc_push = adc_en && adc_valid && adc_half;

  noc_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_adc_fifo (
    .clk, .rst_n, .push(adc_push), .wr_data(adc_word), .pop(adc_pop),
    .rd_data(adc_head), .full(adc_full), .empty(adc_empty)
  );

  // ------------------------------------------------------------------
  // DAC unpacking
  // ------------------------------------------------------------------
  logic        dac_push, dac_pop, dac_full, dac_empty;
  logic [31:0] dac_head;
  logic        dac_half;      // next sample comes from bits [31:16]

  noc_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_dac_fifo (
    .clk, .rst_n, .push(dac_push), .wr_data(s_wdata), .pop(dac_pop),
    .rd_data(dac_head), .full(dac_full), .empty(dac_empty)
  );

  assign dac_pop = dac_en && dac_strobe && !dac_empty && dac_half;

  // ------------------------------------------------------------------
  // Register access
  // ------------------------------------------------------------------
  logic ack_q, can_ack;
  always_comb begin
    can_ack = 1'b1;
    if (s_addr[3:2] == 2'd0 && !s_we) can_ack = !adc_empty;
    if (s_addr[3:2] == 2'd1 &&  s_we) can_ack = !dac_full;
  end
  logic do_acc;
  assign do_acc   = s_req && !ack_q && can_ack;
  assign adc_pop  = do_acc && s_addr[3:2] == 2'd0 && !s_we;
  assign dac_push = do_acc && s_addr[3:2] == 2'd1 &&  s_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q         <= 1'b0;
      s_rdata       <= '0;
      adc_en        <= 1'b0;
      dac_en        <= 1'b0;
      adc_half      <= 1'b0;
      adc_low       <= '0;
      adc_level     <= '0;
      dac_level     <= '0;
      adc_overflow  <= 1'b0;
      dac_underflow <= 1'b0;
      dac_half      <= 1'b0;
      dac_data      <= '0;
    end else begin
      ack_q <= do_acc;
      if (do_acc) begin
        case (s_addr[3:2])
          2'd0: s_rdata <= adc_head;
          2'd2: s_rdata <= {14'd0, dac_underflow, adc_overflow,
                            8'(dac_level), 8'(adc_level)};
          2'd3: s_rdata <= {30'd0, dac_en, adc_en};
          default: s_rdata <= '0;
        endcase
      end
      // ADC
      if (adc_en && adc_valid) begin
        adc_half <= !adc_half;
        if (!adc_half) adc_low <= sext(adc_data);
        if (adc_half && adc_full) adc_overflow <= 1'b1;
      end
      adc_level <= adc_level + LW'(adc_push && !adc_full) - LW'(adc_pop);
      // DAC
      if (dac_en && dac_strobe) begin
        if (dac_empty) begin
          dac_underflow <= 1'b1;
        end else begin
          dac_data <= dac_half ? dac_head[16 +: DAC_BITS] : dac_head[DAC_BITS-1:0];
          dac_half <= !dac_half;
        end
      end
      dac_level <= dac_level + LW'(dac_push) - LW'(dac_pop);
      // control
      if (do_acc && s_we && s_addr[3:2] == 2'd3) begin
        adc_en        <= s_wdata[0];
        dac_en        <= s_wdata[1];
        adc_overflow  <= 1'b0;
        dac_underflow <= 1'b0;
        if (!s_wdata[0]) adc_half <= 1'b0;
      end
    end
  end
  assign s_ack = ack_q;

endmodule
