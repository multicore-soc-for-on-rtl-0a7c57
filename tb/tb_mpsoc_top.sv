// tb_mpsoc_top: end-to-end run of the network subsystem at its default
// sizes. The testbench plays the devices outside it: the control processor
// behind the AMBA node, an SDRAM behind the SDRAM node, two SpaceWire links
// and the gigabit link, the two Xentium cores and the converters.
// One payload-processing pass:
//   1. the control master writes kernel parameters into Xentium 0's memory
//      and starts it with an interrupt message;
//   2. it programs the DMA to move 32 words of packed ADC samples into the
//      global memory, with a completion interrupt to Xentium 0;
//   3. Xentium 0 reads the block from global memory, adds the two samples of
//      every word (reference computed here from the samples sent), writes the
//      results to its own memory and, as block transfers, to SDRAM, then
//      interrupts the control master;
//   4. Xentium 1 reads Xentium 0's results directly from its memory;
//   5. a SpaceWire link writes into global memory while three other masters
//      read it, and the gigabit link reads the new data back; the DMA then feeds two words to the DAC;
//   6. an access to an unmapped address is absorbed by the default slave;
//   7. the real-time clock answers on its bus and has been counting.
// Every mechanism is counted and must occur: interrupt messages, DMA
// completions, ADC reads that waited for samples, block and single class
// requests, accesses to an external slave, unmapped accesses, DAC samples,
// two request classes competing at the global memory (class order),
// tiles holding flits back in the network (flow control) and fine-time
// ticks of the real-time clock.
module tb_mpsoc_top;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        adc_valid = 1'b0;
  logic [13:0] adc_data = '0;
  logic        dac_strobe = 1'b0;
  logic [11:0] dac_data;
  logic        adc_overflow, dac_underflow;
  mreq_t       xen_m [2];
  rsp_t        xen_rsp [2];
  logic        xen_timer_irq [2];
  irq_msg_t    xen_irq_in [2];
  logic        xen_irq_req [2];
  node_t       xen_irq_dst [2];
  logic [7:0]  xen_irq_num [2];
  logic        xen_irq_ack [2];
  mreq_t       ext_m [5];
  rsp_t        ext_m_rsp [5];
  sreq_t       ext_s [5];
  rsp_t        ext_s_rsp [5];
  logic        ext_irq_req [5];
  node_t       ext_irq_dst [5];
  logic [7:0]  ext_irq_num [5];
  logic        ext_irq_ack [5];
  irq_msg_t    ext_irq_in [5];
  logic        dma_busy, dma_done;
  logic [15:0] unmapped_count;
  logic [27:0] unmapped_addr;
  logic        rtc_psel = 1'b0, rtc_penable = 1'b0, rtc_pwrite = 1'b0;
  logic [7:0]  rtc_paddr = '0;
  logic [31:0] rtc_pwdata = '0, rtc_prdata;
  logic        rtc_pready, rtc_pslverr;
  logic [31:0] rtc_coarse;
  logic [15:0] rtc_fine;

  mpsoc_top dut (.*);

  localparam int AMBA = 0, SDRAM = 1, SPW1 = 2, SPW2 = 3, GBIF = 4;
  localparam logic [31:0] A_ADC  = 32'h0000_0000;
  localparam logic [31:0] A_DMA  = 32'h2000_0000;
  localparam logic [31:0] A_XEN0 = 32'h3000_0000;
  localparam logic [31:0] A_GMT  = 32'h4000_0000;
  localparam logic [31:0] A_SDR  = 32'h7000_0000;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- masters ----------------
  task automatic ext_access(int e, bit we, logic [31:0] a, logic [31:0] d,
                            logic [1:0] prio, output logic [31:0] rd);
    @(negedge clk);
    ext_m[e] = '{req: 1'b1, we: we, addr: a, wdata: d, prio: prio};
    @(posedge clk);
    while (!ext_m_rsp[e].ack) @(posedge clk);
    rd = ext_m_rsp[e].rdata;
    @(negedge clk);
    ext_m[e].req = 1'b0;
  endtask

  task automatic xen_access(int k, bit we, logic [31:0] a, logic [31:0] d,
                            logic [1:0] prio, output logic [31:0] rd);
    @(negedge clk);
    xen_m[k] = '{req: 1'b1, we: we, addr: a, wdata: d, prio: prio};
    @(posedge clk);
    while (!xen_rsp[k].ack) @(posedge clk);
    rd = xen_rsp[k].rdata;
    @(negedge clk);
    xen_m[k].req = 1'b0;
  endtask

  task automatic ext_irq(int e, node_t dst, logic [7:0] num);
    @(negedge clk);
    ext_irq_req[e] = 1'b1; ext_irq_dst[e] = dst; ext_irq_num[e] = num;
    @(posedge clk);
    while (!ext_irq_ack[e]) @(posedge clk);
    @(negedge clk);
    ext_irq_req[e] = 1'b0;
  endtask

  task automatic xen_irq(int k, node_t dst, logic [7:0] num);
    @(negedge clk);
    xen_irq_req[k] = 1'b1; xen_irq_dst[k] = dst; xen_irq_num[k] = num;
    @(posedge clk);
    while (!xen_irq_ack[k]) @(posedge clk);
    @(negedge clk);
    xen_irq_req[k] = 1'b0;
  endtask

  // ---------------- SDRAM model behind the SDRAM node ----------------
  logic [31:0] sdram [logic [27:0]];
  int sd_wait = 0;
  int n_ext_slave = 0;
  always @(posedge clk) begin
    ext_s_rsp[SDRAM].ack <= 1'b0;
    if (ext_s[SDRAM].req && !ext_s_rsp[SDRAM].ack) begin
      if (sd_wait == 2) begin
        if (ext_s[SDRAM].we) sdram[ext_s[SDRAM].addr] = ext_s[SDRAM].wdata;
        ext_s_rsp[SDRAM].rdata <= sdram.exists(ext_s[SDRAM].addr) ? sdram[ext_s[SDRAM].addr] : 32'h0;
        ext_s_rsp[SDRAM].ack   <= 1'b1;
        n_ext_slave++;
        sd_wait = 0;
      end else sd_wait++;
    end
  end

  // ---------------- event counters ----------------
  int n_irq = 0, n_dma_done = 0, n_adc_wait = 0, n_block = 0, n_single = 0, n_dac = 0;
  int n_contend = 0, n_backpressure = 0;
  int dma_busy_cyc = 0;
  int n_rtc_tick = 0;
  logic [15:0] rtc_fine_q = '0;
  logic dma_done_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) if (xen_irq_in[k].valid) n_irq++;
    for (int e = 0; e < 5; e++) if (ext_irq_in[e].valid) n_irq++;
    dma_done_q <= dma_done;
    if (dma_done && !dma_done_q) n_dma_done++;
    if (dut.u_adcdac.s_req && !dut.u_adcdac.s_ack) n_adc_wait++;
    for (int n = 0; n < NUM_NODES; n++) begin
      if (dut.li_valid[n][PRIO_BLOCK]  && dut.li_ready[n][PRIO_BLOCK]  && dut.li_flit[n][PRIO_BLOCK].head)  n_block++;
      if (dut.li_valid[n][PRIO_SINGLE] && dut.li_ready[n][PRIO_SINGLE] && dut.li_flit[n][PRIO_SINGLE].head) n_single++;
    end
    if (dac_strobe) n_dac++;
    if (dma_busy) dma_busy_cyc++;
    if (rtc_fine != rtc_fine_q) n_rtc_tick++;
    rtc_fine_q <= rtc_fine;
    // Two request classes waiting at the global memory at once: the block
    // class is served first.
    if (dut.lo_valid[NODE_GMT][PRIO_BLOCK] && dut.lo_valid[NODE_GMT][PRIO_SINGLE]) n_contend++;
    for (int n = 0; n < NUM_NODES; n++)
      if ((dut.lo_valid[n] & ~dut.lo_ready[n]) != '0) n_backpressure++;
  end

  // Interrupt mailboxes for the two cores and the control master.
  int xen0_irqs = 0, amba_irqs = 0;
  logic [7:0] xen0_last_irq;
  always @(posedge clk) begin
    if (xen_irq_in[0].valid) begin xen0_irqs++; xen0_last_irq = xen_irq_in[0].num; end
    if (ext_irq_in[AMBA].valid) amba_irqs++;
  end

  // ---------------- ADC source ----------------
  logic [15:0] adc_sent [$];
  bit adc_run = 1'b0;
  int adc_ph = 0;
  always @(negedge clk) begin
    adc_valid = 1'b0;
    if (adc_run) begin
      adc_ph = (adc_ph + 1) % 8;
      if (adc_ph == 0) begin
        adc_valid = 1'b1;
        adc_data  = 14'($urandom);
        adc_sent.push_back(16'($signed(adc_data)));
      end
    end
  end

  localparam int N = 32;
  logic [31:0] rd;
  logic [31:0] expect_sum [N];
  logic [15:0] lo, hi;
  int xen0_start;

  initial begin
    for (int k = 0; k < 2; k++) begin
      xen_m[k] = '0; xen_irq_req[k] = 1'b0; xen_irq_dst[k] = '0; xen_irq_num[k] = '0;
    end
    for (int e = 0; e < 5; e++) begin
      ext_m[e] = '0; ext_s_rsp[e] = '0;
      ext_irq_req[e] = 1'b0; ext_irq_dst[e] = '0; ext_irq_num[e] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1. Parameters into Xentium 0, start message.
    ext_access(AMBA, 1'b1, A_XEN0 + 32'h0, 32'(N), PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_XEN0 + 32'h4, A_GMT, PRIO_SINGLE, rd);
    ext_irq(AMBA, NODE_XEN0, 8'h01);
    wait (xen0_irqs == 1);
    check(xen0_last_irq == 8'h01, "Xentium 0 start message");

    // 2. ADC -> global memory by DMA, completion to Xentium 0.
    ext_access(AMBA, 1'b1, A_ADC + 32'h0C, 32'h3, PRIO_SINGLE, rd);
    adc_run = 1'b1;
    ext_access(AMBA, 1'b1, A_DMA + 32'h00, A_ADC, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h04, A_GMT, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h08, 32'(N), PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h0C, {8'h0, 8'h02, 4'h0, 4'(NODE_XEN0), 4'h0, 4'b1101},
               PRIO_SINGLE, rd);

    // 3. Xentium 0 waits for the DMA, processes, reports.
    wait (xen0_irqs == 2);
    check(xen0_last_irq == 8'h02, "DMA completion message to Xentium 0");
    adc_run = 1'b0;
    check(!adc_overflow, "no ADC overflow");
    for (int i = 0; i < N; i++) begin
      lo = adc_sent[2*i]; hi = adc_sent[2*i + 1];
      expect_sum[i] = 32'($signed(lo)) + 32'($signed(hi));
    end
    xen_access(0, 1'b0, A_XEN0 + 32'h0, 0, PRIO_SINGLE, rd);
    check(rd == 32'(N), "parameter in local memory");
    for (int i = 0; i < N; i++) begin
      logic [31:0] w, s;
      xen_access(0, 1'b0, A_GMT + 32'(i * 4), 0, PRIO_SINGLE, w);
      check(w == {adc_sent[2*i + 1], adc_sent[2*i]}, $sformatf("ADC word %0d in global memory", i));
      s = 32'($signed(w[15:0])) + 32'($signed(w[31:16]));
      xen_access(0, 1'b1, A_XEN0 + 32'h100 + 32'(i * 4), s, PRIO_SINGLE, rd);
      xen_access(0, 1'b1, A_SDR + 32'(i * 4), s, PRIO_BLOCK, rd);
    end
    xen_irq(0, NODE_AMBA, 8'h03);
    wait (amba_irqs == 1);

    // 4. Xentium 1 reads Xentium 0's results; the control master reads SDRAM.
    for (int i = 0; i < N; i++) begin
      xen_access(1, 1'b0, A_XEN0 + 32'h100 + 32'(i * 4), 0, PRIO_SINGLE, rd);
      check(rd == expect_sum[i], $sformatf("result %0d seen by Xentium 1", i));
      ext_access(AMBA, 1'b0, A_SDR + 32'(i * 4), 0, PRIO_SINGLE, rd);
      check(rd == expect_sum[i], $sformatf("result %0d in SDRAM", i));
    end

    // 5. SpaceWire 1 writes global memory, gigabit link reads; DAC by DMA.
    fork
      for (int i = 0; i < 8; i++) begin
        logic [31:0] r1;
        ext_access(SPW1, 1'b1, A_GMT + 32'h1000 + 32'(i * 4), 32'hC0DE_0000 + 32'(i), PRIO_BLOCK, r1);
      end
      for (int i = 0; i < 8; i++) begin
        logic [31:0] r2;
        ext_access(SPW2, 1'b0, A_GMT + 32'(i * 4), 0, PRIO_SINGLE, r2);
      end
      for (int i = 0; i < 8; i++) begin
        logic [31:0] r3;
        xen_access(1, 1'b0, A_GMT + 32'(i * 4), 0, PRIO_BLOCK, r3);
      end
      for (int i = 0; i < 8; i++) begin
        logic [31:0] r4;
        ext_access(AMBA, 1'b0, A_GMT + 32'(i * 4), 0, PRIO_SINGLE, r4);
      end
    join
    for (int i = 0; i < 8; i++) begin
      ext_access(GBIF, 1'b0, A_GMT + 32'h1000 + 32'(i * 4), 0, PRIO_SINGLE, rd);
      check(rd == 32'hC0DE_0000 + 32'(i), "SpaceWire data read over the gigabit link");
    end
    ext_access(AMBA, 1'b1, A_GMT + 32'h2000, 32'h0456_0123, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_GMT + 32'h2004, 32'h0FED_0ABC, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h00, A_GMT + 32'h2000, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h04, A_ADC + 32'h04, PRIO_SINGLE, rd);
    ext_access(AMBA, 1'b1, A_DMA + 32'h08, 32'd2, PRIO_SINGLE, rd);
    dma_busy_cyc = 0;
    ext_access(AMBA, 1'b1, A_DMA + 32'h0C, {8'h0, 8'h04, 4'h0, 4'(NODE_AMBA), 4'h0, 4'b1011}, PRIO_SINGLE, rd);
    wait (amba_irqs == 2);
    $display("DMA memory-to-DAC copy of 2 words: %0d busy cycles", dma_busy_cyc);
    begin
      logic [11:0] exp [4] = '{12'h123, 12'h456, 12'hABC, 12'hFED};
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) dac_strobe = 1'b1;
        @(negedge clk) dac_strobe = 1'b0;
        check(dac_data == exp[i], $sformatf("DAC sample %0d = %h", i, dac_data));
      end
    end

    // 6. Unmapped address.
    ext_access(AMBA, 1'b0, 32'hE000_0010, 0, PRIO_SINGLE, rd);
    check(rd == 32'hDEAD_BEEF && unmapped_count == 1 && unmapped_addr == 28'h10, "unmapped access absorbed");

    // Real-time clock: preamble over its bus, and it has been counting.
    @(negedge clk);
    rtc_psel = 1'b1; rtc_paddr = 8'h00;
    @(negedge clk);
    rtc_penable = 1'b1;
    @(posedge clk);
    check(rtc_prdata == 32'h2E && rtc_pready, "real-time clock preamble");
    @(negedge clk);
    rtc_psel = 1'b0; rtc_penable = 1'b0;

    // Mechanisms.
    check(n_irq == 4, $sformatf("interrupt messages %0d", n_irq));
    check(n_dma_done >= 2, $sformatf("DMA completions %0d", n_dma_done));
    check(n_adc_wait > 0, $sformatf("ADC reads that waited %0d", n_adc_wait));
    check(n_block > 0, $sformatf("block-class requests %0d", n_block));
    check(n_single > 0, $sformatf("single-class requests %0d", n_single));
    check(n_ext_slave >= 2 * N, $sformatf("external slave accesses %0d", n_ext_slave));
    check(n_dac == 4, "DAC samples");
    check(n_rtc_tick > 0 && (int'(rtc_fine) - n_rtc_tick) inside {0, 1}, $sformatf("real-time clock fine ticks %0d", n_rtc_tick));
    check(n_contend > 0, $sformatf("cycles with two request classes at global memory %0d", n_contend));
    check(n_backpressure > 0, $sformatf("cycles a tile held the network back %0d", n_backpressure));
    $display("mechanisms: irq=%0d dma_done=%0d adc_wait=%0d block=%0d single=%0d ext_slave=%0d unmapped=%0d contend=%0d backpressure=%0d rtc_ticks=%0d",
             n_irq, n_dma_done, n_adc_wait, n_block, n_single, n_ext_slave, unmapped_count, n_contend, n_backpressure, n_rtc_tick);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
