// tb_noc_ni: two network interfaces wired back to back, class by class: a
// master/slave interface A (node 3) and a slave-only interface B (node 4).
// The testbench is the master behind A and a memory behind B. It checks that
// writes and reads arrive with the right address and data, that packet heads
// name the right destination, source and command, that block-priority
// requests travel on class 2 and single ones on class 3, the round-trip
// cycle counts with a zero-wait memory, and interrupt messages.
module tb_noc_ni;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // A -> B and B -> A links
  logic [NUM_PRIO-1:0] ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t               ab_flit [NUM_PRIO];
  flit_t               ba_flit [NUM_PRIO];

  logic        m_req = 1'b0, m_we = 1'b0, m_ack;
  logic [31:0] m_addr = '0, m_wdata = '0, m_rdata;
  logic [1:0]  m_prio = PRIO_SINGLE;
  logic        a_s_req, a_s_we;
  logic [27:0] a_s_addr;
  logic [31:0] a_s_wdata;
  node_t       a_s_src;
  logic        irq_req = 1'b0, irq_ack;
  logic        b_irq_valid;
  logic [7:0]  b_irq_num;
  node_t       b_irq_src;

  logic        s_req, s_we, s_ack;
  logic [27:0] s_addr;
  logic [31:0] s_wdata, s_rdata;
  node_t       s_src;

  noc_ni #(.NODE(NODE_XEN0), .HAS_MASTER(1'b1)) u_a (
    .clk, .rst_n,
    .tx_valid(ab_valid), .tx_flit(ab_flit), .tx_ready(ab_ready),
    .rx_valid(ba_valid), .rx_flit(ba_flit), .rx_ready(ba_ready),
    .m_req, .m_we, .m_addr, .m_wdata, .m_prio, .m_ack, .m_rdata,
    .s_req(a_s_req), .s_we(a_s_we), .s_addr(a_s_addr), .s_wdata(a_s_wdata), .s_src(a_s_src),
    .s_ack(1'b0), .s_rdata('0),
    .irq_req, .irq_dst(NODE_GMT), .irq_num(8'h5A), .irq_ack,
    .irq_in_valid(), .irq_in_num(), .irq_in_src()
  );

  noc_ni #(.NODE(NODE_GMT), .HAS_MASTER(1'b0)) u_b (
    .clk, .rst_n,
    .tx_valid(ba_valid), .tx_flit(ba_flit), .tx_ready(ba_ready),
    .rx_valid(ab_valid), .rx_flit(ab_flit), .rx_ready(ab_ready),
    .m_req(1'b0), .m_we(1'b0), .m_addr('0), .m_wdata('0), .m_prio(2'd0), .m_ack(), .m_rdata(),
    .s_req, .s_we, .s_addr, .s_wdata, .s_src, .s_ack, .s_rdata,
    .irq_req(1'b0), .irq_dst('0), .irq_num('0), .irq_ack(),
    .irq_in_valid(b_irq_valid), .irq_in_num(b_irq_num), .irq_in_src(b_irq_src)
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

  // Memory behind B with a programmable wait.
  logic [31:0] mem [logic [27:0]];
  int wait_max = 0, waited = 0;
  assign s_ack   = s_req && (waited >= wait_max);
  assign s_rdata = mem.exists(s_addr) ? mem[s_addr] : 32'h0;
  always @(posedge clk) begin
    if (s_req && s_ack) begin
      if (s_we) mem[s_addr] = s_wdata;
      if (s_src != NODE_XEN0) begin failures++; $display("FAIL: s_src"); end
      waited = 0;
      wait_max = ($urandom % 2) ? int'($urandom % 4) : 0;
      if (zero_wait) wait_max = 0;
    end else if (s_req) waited++;
  end
  bit zero_wait = 1'b1;

  // Monitor heads on A -> B: class and fields.
  int heads_seen [NUM_PRIO];
  logic [1:0] exp_cls;
  always @(posedge clk) if (rst_n)
    for (int v = 0; v < NUM_PRIO; v++)
      if (ab_valid[v] && ab_ready[v] && ab_flit[v].head) begin
        heads_seen[v]++;
        if (v != 0) begin
          if (v != exp_cls) begin failures++; $display("FAIL: request on class %0d", v); end
          if (head_dst(ab_flit[v]) != NODE_GMT || head_src(ab_flit[v]) != NODE_XEN0) begin
            failures++; $display("FAIL: head fields %h", ab_flit[v].data);
          end
        end
      end

  int start_cyc, ack_cyc;
  always @(posedge clk) if (m_ack) ack_cyc = cycle;

  task automatic access(bit we, logic [31:0] addr, logic [31:0] wd, logic [1:0] prio,
                        output logic [31:0] rd, output int cyc);
    @(negedge clk);
    m_req = 1'b1; m_we = we; m_addr = addr; m_wdata = wd; m_prio = prio;
    exp_cls = (prio == PRIO_BLOCK) ? PRIO_BLOCK : PRIO_SINGLE;
    start_cyc = cycle;
    @(posedge clk);
    while (!m_ack) @(posedge clk);
    rd = m_rdata;
    @(negedge clk);
    m_req = 1'b0;
    cyc = ack_cyc - start_cyc;
  endtask

  logic [31:0] rd;
  int cyc;
  logic [31:0] model [int];

  initial begin
    for (int v = 0; v < NUM_PRIO; v++) heads_seen[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Zero-wait round trips.
    access(1'b1, 32'h4000_0010, 32'h1234_5678, PRIO_SINGLE, rd, cyc);
    check(mem.exists(28'h10) && mem[28'h10] == 32'h1234_5678, "write reached memory");
    check(cyc == 4, $sformatf("write round trip %0d cycles, expected 4", cyc));
    access(1'b0, 32'h4000_0010, 32'h0, PRIO_BLOCK, rd, cyc);
    check(rd == 32'h1234_5678, "read back");
    check(cyc == 4, $sformatf("read round trip %0d cycles, expected 4", cyc));

    // Random accesses with random memory waits.
    zero_wait = 1'b0;
    for (int i = 0; i < 60; i++) begin
      logic [31:0] a, d;
      logic [1:0]  p;
      a = {4'h4, 20'h0, 6'($urandom), 2'b00};
      d = $urandom;
      p = 2'($urandom);
      if ($urandom % 2) begin
        access(1'b1, a, d, p, rd, cyc);
        model[int'(a[27:0])] = d;
      end else begin
        access(1'b0, a, 32'h0, p, rd, cyc);
        check(rd == (model.exists(int'(a[27:0])) ? model[int'(a[27:0])] :
                     (mem.exists(a[27:0]) ? mem[a[27:0]] : 32'h0)),
              $sformatf("random read %h", a));
      end
    end
    check(heads_seen[2] > 0 && heads_seen[3] > 0, "both request classes used");

    // Interrupt message A -> B.
    @(negedge clk);
    irq_req = 1'b1;
    @(posedge clk);
    while (!irq_ack) @(posedge clk);
    @(negedge clk);
    irq_req = 1'b0;
    check(irq_seen == 1 && irq_num_seen == 8'h5A && irq_src_seen == NODE_XEN0, "interrupt delivered");
    check(heads_seen[0] == 1, "interrupt on class 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int irq_seen = 0;
  logic [7:0] irq_num_seen;
  node_t irq_src_seen;
  always @(posedge clk) if (b_irq_valid) begin
    irq_seen++;
    irq_num_seen = b_irq_num;
    irq_src_seen = b_irq_src;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
