// default_slave: the network node that answers accesses to addresses no
// device owns, so that a stray access by any master completes instead of
// hanging the master.
//
// Every global address whose node field (address[31:28]) names no device is
// routed here (noc_pkg::addr_node). Through its slave-only network interface
// the block acknowledges every write without storing it and answers every
// read with READ_VALUE, one cycle after the access is presented. It counts the
// accesses it has absorbed (err_count, saturating) and keeps the offset, the
// direction and the source node of the latest one (err_addr, err_we, err_src),
// for a debugger to inspect. The platform only names this block; everything
// it does beyond completing the access is this design's choice.
module default_slave
  import noc_pkg::*;
#(
  parameter node_t       NODE       = NODE_DEFAULT,
  parameter logic [31:0] READ_VALUE = 32'hDEAD_BEEF
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PRIO-1:0] tx_valid,
  output flit_t               tx_flit  [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] tx_ready,
  input  logic [NUM_PRIO-1:0] rx_valid,
  input  flit_t               rx_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] rx_ready,
  output logic [15:0]         err_count,
  output logic [27:0]         err_addr,
  output logic                err_we,
  output node_t               err_src
);
  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata;
  node_t       s_src;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b0)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready,
    .m_req(1'b0), .m_we(1'b0), .m_addr('0), .m_wdata('0), .m_prio(2'd0),
    .m_ack(), .m_rdata(),
    .s_req, .s_we, .s_addr, .s_wdata, .s_src, .s_ack, .s_rdata(READ_VALUE),
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  logic ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q     <= 1'b0;
      err_count <= '0;
      err_addr  <= '0;
      err_we    <= 1'b0;
      err_src   <= '0;
    end else begin
      ack_q <= s_req && !ack_q;
      if (s_req && !ack_q) begin
        if (err_count != '1) err_count <= err_count + 1'b1;
        err_addr <= s_addr;
        err_we   <= s_we;
        err_src  <= s_src;
      end
    end
  end
  assign s_ack = ack_q;

  // Write data is dropped by design.
  logic unused_wdata;
  assign unused_wdata = ^s_wdata;

endmodule
