// tb_xentium_tile: a Xentium tile (node 3) with a test master (node 6)
// wired back to back with its network interface; the testbench drives the
// core port. Checks one-cycle local memory access by the core, network
// access to the same memory (also while the core is busy on it), the timer
// and its interrupt, a core access that leaves the tile, and an interrupt
// message sent by the core.
module tb_xentium_tile;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t               ab_flit [NUM_PRIO];
  flit_t               ba_flit [NUM_PRIO];

  logic        core_req = 1'b0, core_we = 1'b0, core_ack;
  logic [31:0] core_addr = '0, core_wdata = '0, core_rdata;
  logic        timer_irq, net_irq_valid, core_irq_req = 1'b0, core_irq_ack;
  logic [7:0]  net_irq_num;
  node_t       net_irq_src;

  tb_net_master #(.NODE(NODE_AMBA)) u_m (
    .clk, .rst_n,
    .tx_valid(ab_valid), .tx_flit(ab_flit), .tx_ready(ab_ready),
    .rx_valid(ba_valid), .rx_flit(ba_flit), .rx_ready(ba_ready)
  );

  xentium_tile #(.NODE(NODE_XEN0)) dut (
    .clk, .rst_n,
    .tx_valid(ba_valid), .tx_flit(ba_flit), .tx_ready(ba_ready),
    .rx_valid(ab_valid), .rx_flit(ab_flit), .rx_ready(ab_ready),
    .core_req, .core_we, .core_addr, .core_wdata, .core_prio(PRIO_SINGLE),
    .core_ack, .core_rdata,
    .timer_irq, .net_irq_valid, .net_irq_num, .net_irq_src,
    .core_irq_req, .core_irq_dst(NODE_AMBA), .core_irq_num(8'h42), .core_irq_ack
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic core_access(bit we, logic [31:0] a, logic [31:0] d,
                             output logic [31:0] rd, output int cyc);
    int c0;
    @(negedge clk);
    core_req = 1'b1; core_we = we; core_addr = a; core_wdata = d;
    c0 = cycle;
    @(posedge clk);
    while (!core_ack) @(posedge clk);
    rd = core_rdata;
    cyc = cycle - c0;
    @(negedge clk);
    core_req = 1'b0;
  endtask

  localparam logic [31:0] XEN = 32'h3000_0000;
  logic [31:0] model [64];
  logic [31:0] rd;
  int cyc, irq_cycle, t_en;

  always @(posedge clk) if (timer_irq && irq_cycle < 0) irq_cycle = cycle;

  initial begin
    irq_cycle = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Core writes, network reads; network writes, core reads.
    for (int i = 0; i < 64; i++) begin
      model[i] = $urandom;
      if (i < 32) core_access(1'b1, XEN + 32'(i * 4), model[i], rd, cyc);
      else        u_m.write(XEN + 32'(i * 4), model[i]);
    end
    for (int i = 0; i < 64; i++) begin
      if (i < 32) u_m.read(XEN + 32'(i * 4), rd);
      else        core_access(1'b0, XEN + 32'(i * 4), 0, rd, cyc);
      check(rd == model[i], $sformatf("word %0d %h exp %h", i, rd, model[i]));
      if (i == 32) check(cyc == 1, $sformatf("core local access %0d cycles", cyc));
    end
    // Top of the 32 KiB memory.
    core_access(1'b1, XEN + 32'h7FFC, 32'h1357_9BDF, rd, cyc);
    u_m.read(XEN + 32'h7FFC, rd);
    check(rd == 32'h1357_9BDF, "last word of the data memory");

    // Core and network on the local bus at the same time.
    fork
      for (int i = 0; i < 20; i++) core_access(1'b1, XEN + 32'h100 + 32'(i * 4), 32'(i), rd, cyc);
      for (int i = 0; i < 5; i++)  u_m.write(XEN + 32'h200 + 32'(i * 4), 32'(100 + i));
    join
    for (int i = 0; i < 20; i++) begin
      u_m.read(XEN + 32'h100 + 32'(i * 4), rd);
      check(rd == 32'(i), "core write under contention");
    end
    for (int i = 0; i < 5; i++) begin
      core_access(1'b0, XEN + 32'h200 + 32'(i * 4), 0, rd, cyc);
      check(rd == 32'(100 + i), "network write under contention");
    end

    // Timer: count from 0, compare 20, interrupt enabled. The interrupt must
    // rise exactly 20 cycles after the enabling write is acknowledged.
    core_access(1'b1, XEN + 32'h8000, 32'd0, rd, cyc);
    core_access(1'b1, XEN + 32'h8004, 32'd20, rd, cyc);
    check(!timer_irq, "no timer interrupt before enable");
    core_access(1'b1, XEN + 32'h8008, 32'h3, rd, cyc);
    t_en = cycle;
    repeat (40) @(posedge clk);
    check(timer_irq, "timer interrupt");
    check(irq_cycle - t_en == 20,
          $sformatf("timer interrupt after %0d cycles", irq_cycle - t_en));
    u_m.read(XEN + 32'h8008, rd);
    check(rd[2:0] == 3'b111, "TCTRL shows pending");
    core_access(1'b1, XEN + 32'h8008, 32'h0, rd, cyc);
    @(negedge clk);
    check(!timer_irq, "interrupt cleared");
    core_access(1'b0, XEN + 32'h8000, 0, rd, cyc);
    check(rd >= 32'd40 && rd < 32'd80, $sformatf("TCOUNT counted %0d", rd));

    // Core access to another node goes out over the network.
    core_access(1'b0, 32'h6000_0040, 0, rd, cyc);
    check(u_m.s_count == 1 && rd == 32'h0, "remote access reached node 6");

    // Interrupt message from the core.
    @(negedge clk) core_irq_req = 1'b1;
    @(posedge clk);
    while (!core_irq_ack) @(posedge clk);
    @(negedge clk) core_irq_req = 1'b0;
    repeat (3) @(posedge clk);
    check(u_m.irq_count == 1 && u_m.irq_last_num == 8'h42 && u_m.irq_last_src == NODE_XEN0,
          "core interrupt message");

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
