// xentium_tile: the processing tile around a Xentium DSP core: 32 KiB local
// data memory, a timer and a network interface, joined by a small local bus.
// The core itself (datapath, control, instruction cache) is not part of this
// module; its data-access and interrupt signals are the core_* ports.
//
// Address map of the tile (offsets inside the tile's node, address[27:0]):
//   0x0000-0x7FFF  data memory, 8192 words
//   0x8000 TCOUNT  timer count (read/write), counts clock cycles when enabled
//   0x8004 TCMP    timer compare value
//   0x8008 TCTRL   [0] enable, [1] interrupt enable, [2] interrupt pending
//                  (read); any write clears the pending flag
// Core port: core_req with core_we/core_addr/core_wdata held until core_ack.
// An address in the tile's own node goes to the local bus and is answered one
// cycle later; any other address goes out through the network interface as a
// read or write on class core_prio and is answered when the response packet
// arrives. The network reaches the same memory and timer through the slave
// side of the interface (any master can read and write local Xentium
// memory). The core has priority on the local bus; a network access waits
// for a free cycle.
// Interrupts: timer_irq is high while the timer's pending flag is set and
// its interrupt is enabled (set when TCOUNT equals TCMP). Interrupt messages
// arriving from the network appear as a one-cycle pulse on net_irq_*. The core
// can send an interrupt message (for example "kernel finished") with
// core_irq_req/core_irq_dst/core_irq_num, acknowledged by core_irq_ack.
// The memory size and the presence of timer and network interface are the
// platform's; the address map, the timer's registers and the arbitration are
// this design's choices.
module xentium_tile
  import noc_pkg::*;
#(
  parameter node_t       NODE      = NODE_XEN0,
  parameter int unsigned MEM_BYTES = 32768
) (
  input  logic                clk,
  input  logic                rst_n,
  // router local port
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready,
  // core data port
  input  logic                core_req,
  input  logic                core_we,
  input  logic [31:0]         core_addr,
  input  logic [31:0]         core_wdata,
  input  logic [1:0]          core_prio,
  output logic                core_ack,
  output logic [31:0]         core_rdata,
  // interrupts
  output logic                timer_irq,
  output logic                net_irq_valid,
  output logic [7:0]          net_irq_num,
  output node_t               net_irq_src,
  input  logic                core_irq_req,
  input  node_t               core_irq_dst,
  input  logic [7:0]          core_irq_num,
  output logic                core_irq_ack
);
  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam logic [27:0] TIMER_BASE = 28'(MEM_BYTES);

  logic        m_req, m_ack;
  logic [31:0] m_rdata;
  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata, s_rdata;

  logic core_local;
  assign core_local = core_addr[31:28] == NODE;
  assign m_req      = core_req && !core_local;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b1)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready,
    .m_req, .m_we(core_we), .m_addr(core_addr), .m_wdata(core_wdata),
    .m_prio(core_prio), .m_ack, .m_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_src(), .s_ack, .s_rdata,
    .irq_req(core_irq_req), .irq_dst(core_irq_dst), .irq_num(core_irq_num),
    .irq_ack(core_irq_ack),
    .irq_in_valid(net_irq_valid), .irq_in_num(net_irq_num), .irq_in_src(net_irq_src)
  );

  // ------------------------------------------------------------------
  // Local bus: core first, then the network
  // ------------------------------------------------------------------
  logic        core_ack_q, net_ack_q;
  logic        sel_core, sel_net, acc;
  logic        acc_we;
  logic [27:0] acc_addr;
  logic [31:0] acc_wdata, rdata_q;

  assign sel_core  = core_req && core_local && !core_ack_q;
  assign sel_net   = !sel_core && s_req && !net_ack_q;
  assign acc       = sel_core || sel_net;
  assign acc_we    = sel_core ? core_we : s_we;
  assign acc_addr  = sel_core ? core_addr[27:0] : s_addr;
  assign acc_wdata = sel_core ? core_wdata : s_wdata;

  logic is_mem;
  assign is_mem = acc_addr < TIMER_BASE;

  logic [31:0] mem [WORDS];
  logic [31:0] tcount, tcmp;
  logic        t_en, t_ie, t_pend;

  always_ff @(posedge clk) begin
    if (acc && is_mem && acc_we) mem[acc_addr[AW+1:2]] <= acc_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_ack_q <= 1'b0;
      net_ack_q  <= 1'b0;
      rdata_q    <= '0;
      tcount     <= '0;
      tcmp       <= '0;
      t_en       <= 1'b0;
      t_ie       <= 1'b0;
      t_pend     <= 1'b0;
    end else begin
      core_ack_q <= sel_core;
      net_ack_q  <= sel_net;
      if (t_en) tcount <= tcount + 1'b1;
      if (t_en && tcount == tcmp) t_pend <= 1'b1;
      if (acc) begin
        if (is_mem) begin
          rdata_q <= mem[acc_addr[AW+1:2]];
        end else begin
          case (acc_addr[3:2])
            2'd0: rdata_q <= tcount;
            2'd1: rdata_q <= tcmp;
            2'd2: rdata_q <= {29'd0, t_pend, t_ie, t_en};
            default: rdata_q <= '0;
          endcase
          if (acc_we) begin
            case (acc_addr[3:2])
              2'd0: tcount <= acc_wdata;
              2'd1: tcmp   <= acc_wdata;
              2'd2: begin
                t_en   <= acc_wdata[0];
                t_ie   <= acc_wdata[1];
                t_pend <= 1'b0;
              end
              default: ;
            endcase
          end
        end
      end
    end
  end

  assign s_ack      = net_ack_q;
  assign s_rdata    = rdata_q;
  assign core_ack   = core_ack_q || m_ack;
  assign core_rdata = core_ack_q ? rdata_q : m_rdata;
  assign timer_irq  = t_pend && t_ie;

endmodule
