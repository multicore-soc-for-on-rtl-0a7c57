// noc_ni: network interface between a tile and the local port of its router.
//
// Every device on the network is memory mapped, and any master can read and
// write any address. The network interface turns a tile's word accesses into
// packets and back:
//  * Master side (only when HAS_MASTER, the "NI-MS" kind; "NI-S" without it):
//    the tile raises m_req with m_we, m_addr, m_wdata and m_prio and holds them
//    until m_ack. The interface sends a READ or WRITE packet to the node that
//    owns the address (address[31:28]) and waits for the answer; m_ack is high
//    for one cycle when the RDRESP or WRACK packet arrives, with the read word
//    on m_rdata in that cycle. m_prio selects the class: PRIO_BLOCK (2) for
//    block transfers, anything else sends on PRIO_SINGLE (3).
//  * Slave side: READ and WRITE packets arriving on classes 2 and 3 become
//    accesses on the s_* port (s_req held until s_ack; the read word is taken
//    with s_ack). Class 2 is served first when both wait. The answer goes back
//    on class 1 (responses), so that answers never wait behind requests.
//  * Interrupts: irq_req sends a one-flit IRQ packet with irq_num on class 0
//    (highest) to irq_dst; irq_ack is high in the cycle it leaves. A received
//    IRQ packet shows as a one-cycle pulse on irq_in_valid.
// Each class has its own local link (tx_* and rx_* are indexed by class), as
// the router's local port has four links. The packet formats are in noc_pkg.
// The memory-mapped model and the interrupt messages are the platform's;
// the handshakes, the class assignment and one outstanding access per master
// are this design's choices.
module noc_ni
  import noc_pkg::*;
#(
  parameter node_t NODE       = 4'd0,
  parameter bit    HAS_MASTER = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // to the router (router's local input), one link per class
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  // from the router (router's local output), one link per class
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready,
  // master port: the tile reads and writes the network
  input  logic                m_req,
  input  logic                m_we,
  input  logic [31:0]         m_addr,
  input  logic [31:0]         m_wdata,
  input  logic [1:0]          m_prio,
  output logic                m_ack,
  output logic [31:0]         m_rdata,
  // slave port: the network reads and writes the tile
  output logic                s_req,
  output logic                s_we,
  output logic [27:0]         s_addr,
  output logic [31:0]         s_wdata,
  output node_t               s_src,
  input  logic                s_ack,
  input  logic [31:0]         s_rdata,
  // interrupts
  input  logic                irq_req,
  input  node_t               irq_dst,
  input  logic [7:0]          irq_num,
  output logic                irq_ack,
  output logic                irq_in_valid,
  output logic [7:0]          irq_in_num,
  output node_t               irq_in_src
);

  // ------------------------------------------------------------------
  // Interrupt messages, class 0
  // ------------------------------------------------------------------
  assign irq_ack            = irq_req && tx_ready[PRIO_IRQ];
  assign irq_in_valid       = rx_valid[PRIO_IRQ] && rx_flit[PRIO_IRQ].head &&
                              head_cmd(rx_flit[PRIO_IRQ]) == CMD_IRQ;
  assign irq_in_num         = rx_flit[PRIO_IRQ].data[7:0];
  assign irq_in_src         = head_src(rx_flit[PRIO_IRQ]);

  // ------------------------------------------------------------------
  // Slave engine: requests in on class 2/3, responses out on class 1
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_DATA, S_ACCESS, S_RHEAD, S_RDATA} s_state_e;
  s_state_e    s_state;
  logic [1:0]  s_cls;      // class of the request being served
  logic        s_is_wr;
  logic [31:0] s_rword;
  logic [27:0] s_addr_q;
  logic [31:0] s_wdata_q;
  node_t       s_src_q;

  logic [1:0] s_pick;
  assign s_pick = rx_valid[PRIO_BLOCK] ? PRIO_BLOCK : PRIO_SINGLE;

  // Class whose request flits the slave engine takes this cycle, if any.
  logic       s_take;
  logic [1:0] s_take_cls;
  assign s_take     = (s_state == S_IDLE) || (s_state == S_ADDR) || (s_state == S_DATA);
  assign s_take_cls = (s_state == S_IDLE) ? s_pick : s_cls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_state   <= S_IDLE;
      s_cls     <= PRIO_SINGLE;
      s_is_wr   <= 1'b0;
      s_rword   <= '0;
      s_addr_q  <= '0;
      s_wdata_q <= '0;
      s_src_q   <= '0;
    end else begin
      case (s_state)
        S_IDLE:
          if (rx_valid[s_pick] && rx_flit[s_pick].head) begin
            s_cls   <= s_pick;
            s_is_wr <= head_cmd(rx_flit[s_pick]) == CMD_WRITE;
            s_src_q <= head_src(rx_flit[s_pick]);
            s_state <= S_ADDR;
          end
        S_ADDR:
          if (rx_valid[s_cls]) begin
            s_addr_q <= rx_flit[s_cls].data[27:0];
            s_state  <= s_is_wr ? S_DATA : S_ACCESS;
          end
        S_DATA:
          if (rx_valid[s_cls]) begin
            s_wdata_q <= rx_flit[s_cls].data;
            s_state   <= S_ACCESS;
          end
        S_ACCESS:
          if (s_ack) begin
            s_rword <= s_rdata;
            s_state <= S_RHEAD;
          end
        S_RHEAD:
          if (tx_ready[PRIO_RESP]) s_state <= s_is_wr ? S_IDLE : S_RDATA;
        S_RDATA:
          if (tx_ready[PRIO_RESP]) s_state <= S_IDLE;
        default: s_state <= S_IDLE;
      endcase
    end
  end

  assign s_req   = (s_state == S_ACCESS);
  assign s_we    = s_is_wr;
  assign s_addr  = s_addr_q;
  assign s_wdata = s_wdata_q;
  assign s_src   = s_src_q;

  logic  resp_valid;
  flit_t resp_flit;
  assign resp_valid = (s_state == S_RHEAD) || (s_state == S_RDATA);
  assign resp_flit  = (s_state == S_RHEAD)
                    ? make_head(s_src_q, NODE, s_is_wr ? CMD_WRACK : CMD_RDRESP, 8'd0, s_is_wr)
                    : '{head: 1'b0, tail: 1'b1, data: s_rword};

  // ------------------------------------------------------------------
  // Master engine: requests out on class 2/3, responses in on class 1
  // ------------------------------------------------------------------
  logic       req_valid;
  flit_t      req_flit;
  logic [1:0] m_cls;
  logic       resp_take;
  assign m_cls = (m_prio == PRIO_BLOCK) ? PRIO_BLOCK : PRIO_SINGLE;

  if (HAS_MASTER) begin : g_master
    typedef enum logic [1:0] {M_HEAD, M_ADDR, M_DATA, M_WAIT} m_state_e;
    m_state_e   m_state;

    always_comb begin
      req_valid = 1'b0;
      req_flit  = '0;
      case (m_state)
        M_HEAD: begin
          req_valid = m_req;
          req_flit  = make_head(addr_node(m_addr), NODE,
                                m_we ? CMD_WRITE : CMD_READ, 8'd0, 1'b0);
        end
        M_ADDR: begin
          req_valid = 1'b1;
          req_flit  = '{head: 1'b0, tail: !m_we, data: m_addr};
        end
        M_DATA: begin
          req_valid = 1'b1;
          req_flit  = '{head: 1'b0, tail: 1'b1, data: m_wdata};
        end
        default: ;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m_state <= M_HEAD;
      end else begin
        case (m_state)
          M_HEAD: if (m_req && tx_ready[m_cls]) m_state <= M_ADDR;
          M_ADDR: if (tx_ready[m_cls]) m_state <= m_we ? M_DATA : M_WAIT;
          M_DATA: if (tx_ready[m_cls]) m_state <= M_WAIT;
          M_WAIT: if (rx_valid[PRIO_RESP] && rx_flit[PRIO_RESP].tail) m_state <= M_HEAD;
          default: m_state <= M_HEAD;
        endcase
      end
    end

    assign resp_take = 1'b1;
    assign m_ack   = (m_state == M_WAIT) && rx_valid[PRIO_RESP] && rx_flit[PRIO_RESP].tail;
    assign m_rdata = rx_flit[PRIO_RESP].data;

    // The tile holds its request steady until it is acknowledged.
    a_m_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_req && !m_ack |=> m_req && $stable(m_addr) && $stable(m_we));
  end else begin : g_no_master
    assign req_valid = 1'b0;
    assign req_flit  = '0;
    assign resp_take = 1'b1;
    assign m_ack     = 1'b0;
    assign m_rdata   = '0;
  end

  // ------------------------------------------------------------------
  // Local links, one per class
  // ------------------------------------------------------------------
  always_comb begin
    tx_valid[PRIO_IRQ]    = irq_req;
    tx_flit[PRIO_IRQ]     = make_head(irq_dst, NODE, CMD_IRQ, irq_num, 1'b1);
    tx_valid[PRIO_RESP]   = resp_valid;
    tx_flit[PRIO_RESP]    = resp_flit;
    tx_valid[PRIO_BLOCK]  = req_valid && (m_cls == PRIO_BLOCK);
    tx_flit[PRIO_BLOCK]   = req_flit;
    tx_valid[PRIO_SINGLE] = req_valid && (m_cls == PRIO_SINGLE);
    tx_flit[PRIO_SINGLE]  = req_flit;
    rx_ready[PRIO_IRQ]    = 1'b1;
    rx_ready[PRIO_RESP]   = resp_take;
    rx_ready[PRIO_BLOCK]  = s_take && (s_take_cls == PRIO_BLOCK);
    rx_ready[PRIO_SINGLE] = s_take && (s_take_cls == PRIO_SINGLE);
  end

  a_s_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req && !s_ack |=> s_req);

endmodule
