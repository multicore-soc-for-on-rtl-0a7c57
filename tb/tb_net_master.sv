// tb_net_master: testbench helper, a master/slave network interface driven
// by tasks. Testbenches call access() through the instance to read or write
// any global address; received interrupt messages are counted in irq_count
// with the latest in irq_last_num / irq_last_src. The slave side answers every
// access to this node with zero and counts it in s_count.
module tb_net_master
  import noc_pkg::*;
#(
  parameter node_t NODE = NODE_AMBA
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
  logic        m_req = 1'b0, m_we = 1'b0, m_ack;
  logic [31:0] m_addr = '0, m_wdata = '0, m_rdata;
  logic [1:0]  m_prio = PRIO_SINGLE;
  logic        s_req, s_we;
  logic [27:0] s_addr;
  logic [31:0] s_wdata;
  node_t       s_src;
  logic        irq_in_valid;
  logic [7:0]  irq_in_num;
  node_t       irq_in_src;

  noc_ni #(.NODE(NODE), .HAS_MASTER(1'b1)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready,
    .m_req, .m_we, .m_addr, .m_wdata, .m_prio, .m_ack, .m_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_src, .s_ack(s_req), .s_rdata(32'h0),
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid, .irq_in_num, .irq_in_src
  );

  int cycle = 0;
  int ack_cyc;
  int irq_count = 0;
  int s_count = 0;
  logic [7:0] irq_last_num;
  node_t      irq_last_src;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (m_ack) ack_cyc = cycle;
    if (irq_in_valid) begin
      irq_count++;
      irq_last_num = irq_in_num;
      irq_last_src = irq_in_src;
    end
    if (s_req) s_count++;
  end

  // One word access; cyc is the number of cycles from request to acknowledge.
  task automatic access(input bit we, input logic [31:0] addr, input logic [31:0] wd,
                        output logic [31:0] rd, output int cyc);
    int start_cyc;
    @(negedge clk);
    m_req = 1'b1; m_we = we; m_addr = addr; m_wdata = wd;
    start_cyc = cycle;
    @(posedge clk);
    while (!m_ack) @(posedge clk);
    rd = m_rdata;
    @(negedge clk);
    m_req = 1'b0;
    cyc = ack_cyc - start_cyc;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] wd);
    logic [31:0] rd;
    int cyc;
    access(1'b1, addr, wd, rd, cyc);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] rd);
    int cyc;
    access(1'b0, addr, 32'h0, rd, cyc);
  endtask

endmodule
