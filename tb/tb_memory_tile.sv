// tb_memory_tile: the global memory tile behind a master network interface
// wired back to back with it. Writes random words, reads them back against a
// model (also across the wrap of the address at the array size), and checks
// that a read and a write each take 5 cycles from request to acknowledge (one
// cycle of SRAM access inside the interface round trip).
module tb_memory_tile;
  import noc_pkg::*;

  localparam int unsigned WORDS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t               ab_flit [NUM_PRIO];
  flit_t               ba_flit [NUM_PRIO];

  logic        m_req = 1'b0, m_we = 1'b0, m_ack;
  logic [31:0] m_addr = '0, m_wdata = '0, m_rdata;

  noc_ni #(.NODE(NODE_AMBA), .HAS_MASTER(1'b1)) u_master (
    .clk, .rst_n,
    .tx_valid(ab_valid), .tx_flit(ab_flit), .tx_ready(ab_ready),
    .rx_valid(ba_valid), .rx_flit(ba_flit), .rx_ready(ba_ready),
    .m_req, .m_we, .m_addr, .m_wdata, .m_prio(PRIO_SINGLE), .m_ack, .m_rdata,
    .s_req(), .s_we(), .s_addr(), .s_wdata(), .s_src(), .s_ack(1'b0), .s_rdata('0),
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  memory_tile #(.NODE(NODE_GMT), .WORDS(WORDS)) dut (
    .clk, .rst_n,
    .tx_valid(ba_valid), .tx_flit(ba_flit), .tx_ready(ba_ready),
    .rx_valid(ab_valid), .rx_flit(ab_flit), .rx_ready(ab_ready)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int start_cyc, ack_cyc;
  always @(posedge clk) if (m_ack) ack_cyc = cycle;

  task automatic access(bit we, logic [31:0] addr, logic [31:0] wd,
                        output logic [31:0] rd, output int cyc);
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

  logic [31:0] model [WORDS];
  logic [31:0] rd;
  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      access(1'b1, {4'(NODE_GMT), 28'(i * 4)}, model[i], rd, cyc);
      if (i == 0) check(cyc == 5, $sformatf("write takes %0d cycles", cyc));
    end
    for (int i = 0; i < WORDS; i++) begin
      access(1'b0, {4'(NODE_GMT), 28'(i * 4)}, 32'h0, rd, cyc);
      check(rd == model[i], $sformatf("word %0d: %h expected %h", i, rd, model[i]));
      if (i == 0) check(cyc == 5, $sformatf("read takes %0d cycles", cyc));
    end
    // Offsets wrap at the array size.
    access(1'b1, {4'(NODE_GMT), 28'(WORDS * 4 + 8)}, 32'hFACE_0FF0, rd, cyc);
    access(1'b0, {4'(NODE_GMT), 28'(8)}, 32'h0, rd, cyc);
    check(rd == 32'hFACE_0FF0, "address wraps at the array size");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
