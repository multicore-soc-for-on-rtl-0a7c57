// tb_rtc_cuc: the real-time clock with a 200 kHz clock so that a simulated
// second is short. Checks the preamble octet, that after setting the seconds
// the fine time has advanced by exactly floor(k * 2^16 / CLK_HZ) after k
// cycles (the ideal clock rounded down), including across a whole second into
// the coarse count, and that a COARSE read captures the matching fine time.
module tb_rtc_cuc;
  localparam int unsigned CLK_HZ = 200_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [7:0]  paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic        pready, pslverr;
  logic [31:0] coarse;
  logic [15:0] fine;

  rtc_cuc #(.CLK_HZ(CLK_HZ)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // APB transfer: setup phase, then access phase; data sampled at the end of
  // the access phase.
  task automatic apb(bit we, logic [7:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; pwrite = we; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1'b1;
    @(posedge clk);
    r = prdata;
    @(negedge clk);
    psel = 1'b0; penable = 1'b0;
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [31:0] r;
  int t0;
  logic [47:0] expect_t, got_t;

  task automatic check_time_at(int k);
    longint steps;
    while (cycle - t0 < k) @(negedge clk);
    steps = (longint'(cycle - t0) * 65536) / CLK_HZ;
    expect_t = {32'h1234_5678, 16'h0} + 48'(steps);
    got_t = {coarse, fine};
    check(got_t == expect_t, $sformatf("after %0d cycles time %h expected %h", cycle - t0, got_t, expect_t));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apb(1'b0, 8'h00, 0, r);
    check(r == 32'h2E, $sformatf("preamble %h", r));
    check(pready && !pslverr, "pready, no error");

    apb(1'b1, 8'h04, 32'h1234_5678, r);
    t0 = cycle;               // counting starts after the write edge
    check({coarse, fine} == {32'h1234_5678, 16'h0}, "seconds set, fine cleared");
    check_time_at(1);
    check_time_at(3);
    check_time_at(1000);
    check_time_at(CLK_HZ - 1);
    check_time_at(CLK_HZ);
    check(coarse == 32'h1234_5679 && fine == 16'h0, "exactly one second later");
    check_time_at(CLK_HZ + 777);

    // Coherent capture: COARSE read captures the fine time of the same edge.
    @(negedge clk);
    psel = 1'b1; pwrite = 1'b0; paddr = 8'h04;
    @(negedge clk);
    penable = 1'b1;
    @(posedge clk);
    #1 got_t = {prdata, 16'h0};
    @(negedge clk);
    psel = 1'b0; penable = 1'b0;
    apb(1'b0, 8'h08, 0, r);
    got_t[15:0] = r[15:0];
    apb(1'b0, 8'h0C, 0, r);
    check(got_t[47:16] == 32'h1234_5679, "captured seconds");
    check(16'(r - 32'(got_t[15:0])) <= 16'd3 && r[15:0] != got_t[15:0], $sformatf("live fine %h ahead of captured %h", r[15:0], got_t[15:0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * CLK_HZ + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
