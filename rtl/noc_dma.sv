// noc_dma: DMA engine on the network. It copies a block of words from one
// global address to another, so that the interfaces and the memories exchange
// data without a processor moving each word.
//
// The engine sits behind a master/slave network interface ("NI-MS"). Any
// master programs it through the slave side (byte offsets):
//   0x00 SRC    source address (global)
//   0x04 DST    destination address (global)
//   0x08 LEN    number of 32-bit words
//   0x0C CTRL   [0] start (write 1), [1] increment source, [2] increment
//               destination, [3] interrupt when done, [11:8] node to
//               interrupt, [23:16] interrupt number
//   0x10 STATUS [0] busy, [1] done (cleared by start), [31:16] words left
// Once started it reads one word from SRC and writes it to DST, as block-class
// (priority 2) packets, LEN times; a source or destination that is not
// incremented is a device data register (for example the ADC/DAC bridge,
// whose data registers stall the access until a word is there). At the end it
// sets done and, if asked, sends an interrupt message. Each word takes one
// read round trip and one write round trip over the network; the engine keeps
// one access in flight. Register accesses are answered one cycle after they
// are presented. The platform shows a DMA node on the network and says the
// interfaces move all data by DMA; the register map, the word-by-word copy and
// the completion interrupt are this design's own.
module noc_dma
  import noc_pkg::*;
#(
  parameter node_t NODE = NODE_DMA
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready,
  output logic                busy,
  output logic                done
);
  logic        m_req, m_we, m_ack;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata, s_rdata;
  logic        irq_req, irq_ack;

  typedef enum logic [1:0] {D_IDLE, D_READ, D_WRITE, D_IRQ} d_state_e;
  d_state_e d_state;

  logic [31:0] src_q, dst_q, data_q;
  logic [15:0] len_q, left_q;
  logic        src_inc, dst_inc, irq_en;
  node_t       irq_node;
  logic [7:0]  irq_num;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b1)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready,
    .m_req, .m_we, .m_addr, .m_wdata, .m_prio(PRIO_BLOCK), .m_ack, .m_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_src(), .s_ack, .s_rdata,
    .irq_req, .irq_dst(irq_node), .irq_num, .irq_ack,
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  // ------------------------------------------------------------------
  // Registers
  // ------------------------------------------------------------------
  logic ack_q;
  logic start;
  assign start = s_req && !ack_q && s_we && s_addr[4:2] == 3'd3 && s_wdata[0] &&
                 d_state == D_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      s_rdata <= '0;
    end else begin
      ack_q <= s_req && !ack_q;
      if (s_req && !ack_q) begin
        case (s_addr[4:2])
          3'd0: s_rdata <= src_q;
          3'd1: s_rdata <= dst_q;
          3'd2: s_rdata <= {16'd0, len_q};
          3'd3: s_rdata <= {8'd0, irq_num, 4'd0, irq_node, 4'd0, irq_en, dst_inc, src_inc, 1'b0};
          3'd4: s_rdata <= {left_q, 14'd0, done, busy};
          default: s_rdata <= '0;
        endcase
      end
    end
  end
  assign s_ack = ack_q;

  // ------------------------------------------------------------------
  // Copy engine
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_state  <= D_IDLE;
      src_q    <= '0;
      dst_q    <= '0;
      len_q    <= '0;
      left_q   <= '0;
      data_q   <= '0;
      src_inc  <= 1'b0;
      dst_inc  <= 1'b0;
      irq_en   <= 1'b0;
      irq_node <= '0;
      irq_num  <= '0;
      done     <= 1'b0;
    end else begin
      if (s_req && !ack_q && s_we && d_state == D_IDLE) begin
        case (s_addr[4:2])
          3'd0: src_q <= s_wdata;
          3'd1: dst_q <= s_wdata;
          3'd2: len_q <= s_wdata[15:0];
          3'd3: begin
            src_inc  <= s_wdata[1];
            dst_inc  <= s_wdata[2];
            irq_en   <= s_wdata[3];
            irq_node <= s_wdata[11:8];
            irq_num  <= s_wdata[23:16];
          end
          default: ;
        endcase
      end
      case (d_state)
        D_IDLE:
          if (start) begin
            done    <= 1'b0;
            left_q  <= len_q;
            d_state <= (len_q == '0) ? (s_wdata[3] ? D_IRQ : D_IDLE) : D_READ;
            if (len_q == '0 && !s_wdata[3]) done <= 1'b1;
          end
        D_READ:
          if (m_ack) begin
            data_q  <= m_rdata;
            d_state <= D_WRITE;
          end
        D_WRITE:
          if (m_ack) begin
            if (src_inc) src_q <= src_q + 32'd4;
            if (dst_inc) dst_q <= dst_q + 32'd4;
            left_q <= left_q - 1'b1;
            if (left_q == 16'd1) begin
              d_state <= irq_en ? D_IRQ : D_IDLE;
              if (!irq_en) done <= 1'b1;
            end else begin
              d_state <= D_READ;
            end
          end
        D_IRQ:
          if (irq_ack) begin
            done    <= 1'b1;
            d_state <= D_IDLE;
          end
        default: d_state <= D_IDLE;
      endcase
    end
  end

  assign m_req   = (d_state == D_READ) || (d_state == D_WRITE);
  assign m_we    = (d_state == D_WRITE);
  assign m_addr  = (d_state == D_WRITE) ? dst_q : src_q;
  assign m_wdata = data_q;
  assign irq_req = (d_state == D_IRQ);
  assign busy    = (d_state != D_IDLE);

endmodule
