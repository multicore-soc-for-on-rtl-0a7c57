// tb_adc_dac_bridge: the converter bridge behind a master interface wired
// back to back with it. ADC samples arrive at 1 of every 5 cycles (10 MS/s
// against 50 MHz, the rate one outstanding single-word read keeps up with;
// the queue itself takes a sample every cycle); the master reads packed pairs and compares them with
// sign-extended model samples. A read issued before any sample waits for
// one. Then the ADC queue is left to overflow, and the DAC path unpacks
// written words into 12-bit samples and reports underflow when starved.
module tb_adc_dac_bridge;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t               ab_flit [NUM_PRIO];
  flit_t               ba_flit [NUM_PRIO];

  logic        adc_valid = 1'b0;
  logic [13:0] adc_data = '0;
  logic        dac_strobe = 1'b0;
  logic [11:0] dac_data;
  logic        adc_overflow, dac_underflow;

  tb_net_master #(.NODE(NODE_DMA)) u_m (
    .clk, .rst_n,
    .tx_valid(ab_valid), .tx_flit(ab_flit), .tx_ready(ab_ready),
    .rx_valid(ba_valid), .rx_flit(ba_flit), .rx_ready(ba_ready)
  );

  adc_dac_bridge #(.NODE(NODE_ADCDAC)) dut (
    .clk, .rst_n,
    .tx_valid(ba_valid), .tx_flit(ba_flit), .tx_ready(ba_ready),
    .rx_valid(ab_valid), .rx_flit(ab_flit), .rx_ready(ab_ready),
    .adc_valid, .adc_data, .dac_strobe, .dac_data, .adc_overflow, .dac_underflow
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [31:0] BR = 32'h0000_0000;
  logic [15:0] adc_model [$];
  bit adc_run = 1'b0;
  bit fast = 1'b0;
  int phase = 0;

  // ADC source: 1 sample in every 5 cycles.
  always @(negedge clk) begin
    adc_valid = 1'b0;
    if (adc_run) begin
      phase = (phase + 1) % 5;
      if (phase == 0 || fast) begin
        adc_valid = 1'b1;
        adc_data  = 14'($urandom);
        adc_model.push_back(16'($signed(adc_data)));
      end
    end
  end

  logic [31:0] rd;
  int cyc;
  int words_read;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    u_m.write(BR + 32'h0C, 32'h3);

    // A read before any sample waits until a pair is there.
    fork
      u_m.read(BR + 32'h00, rd);
      begin
        repeat (30) @(posedge clk);
        check(u_m.m_req, "read waits while the queue is empty");
        adc_run = 1'b1;
      end
    join
    check(rd == {adc_model[1], adc_model[0]}, $sformatf("first pair %h", rd));
    void'(adc_model.pop_front());
    void'(adc_model.pop_front());

    // Stream 40 more pairs.
    for (int i = 0; i < 40; i++) begin
      u_m.read(BR + 32'h00, rd);
      check(rd == {adc_model[1], adc_model[0]}, $sformatf("pair %0d: %h exp %h", i, rd, {adc_model[1], adc_model[0]}));
      void'(adc_model.pop_front());
      void'(adc_model.pop_front());
    end
    // The master keeps up at this rate: no overflow so far.
    check(!adc_overflow, "no overflow while read fast enough");

    // Stop reading, samples every cycle: the queue fills and overflows.
    fast = 1'b1;
    repeat (60) @(posedge clk);
    check(adc_overflow, "overflow when not read");
    u_m.read(BR + 32'h08, rd);
    check(rd[16] == 1'b1 && rd[7:0] == 8'd16, $sformatf("STATUS %h", rd));
    adc_run = 1'b0;
    u_m.write(BR + 32'h0C, 32'h2);   // ADC off, flags cleared
    check(!adc_overflow, "flags cleared by CTRL write");

    // DAC: two words, four samples.
    u_m.write(BR + 32'h04, 32'h0ABC_0123);
    u_m.write(BR + 32'h04, 32'h0FFF_0800);
    begin
      logic [11:0] exp [4] = '{12'h123, 12'hABC, 12'h800, 12'hFFF};
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) dac_strobe = 1'b1;
        @(negedge clk) dac_strobe = 1'b0;
        check(dac_data == exp[i], $sformatf("DAC sample %0d %h", i, dac_data));
      end
    end
    check(!dac_underflow, "no underflow while fed");
    @(negedge clk) dac_strobe = 1'b1;
    @(negedge clk) dac_strobe = 1'b0;
    check(dac_underflow && dac_data == 12'hFFF, "underflow holds the last sample");

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
