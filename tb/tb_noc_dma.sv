// tb_noc_dma: the DMA engine, a memory tile and a test master on the
// twelve-router network (DMA at node 2, memory at node 4, master at node 6).
// The master fills a block of memory, programs the DMA, waits for the
// completion interrupt and checks the copied block; then a copy with a fixed
// destination (only the last word must remain) and a zero-length start.
module tb_noc_dma;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] li_valid [NUM_NODES];
  flit_t               li_flit  [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] li_ready [NUM_NODES];
  logic [NUM_PRIO-1:0] lo_valid [NUM_NODES];
  flit_t               lo_flit  [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] lo_ready [NUM_NODES];
  logic                busy, done;

  noc_mesh u_mesh (
    .clk, .rst_n,
    .loc_in_valid(li_valid), .loc_in_flit(li_flit), .loc_in_ready(li_ready),
    .loc_out_valid(lo_valid), .loc_out_flit(lo_flit), .loc_out_ready(lo_ready)
  );

  noc_dma #(.NODE(NODE_DMA)) dut (
    .clk, .rst_n,
    .tx_valid(li_valid[NODE_DMA]), .tx_flit(li_flit[NODE_DMA]), .tx_ready(li_ready[NODE_DMA]),
    .rx_valid(lo_valid[NODE_DMA]), .rx_flit(lo_flit[NODE_DMA]), .rx_ready(lo_ready[NODE_DMA]),
    .busy, .done
  );

  memory_tile #(.NODE(NODE_GMT), .WORDS(1024)) u_mem (
    .clk, .rst_n,
    .tx_valid(li_valid[NODE_GMT]), .tx_flit(li_flit[NODE_GMT]), .tx_ready(li_ready[NODE_GMT]),
    .rx_valid(lo_valid[NODE_GMT]), .rx_flit(lo_flit[NODE_GMT]), .rx_ready(lo_ready[NODE_GMT])
  );

  tb_net_master #(.NODE(NODE_AMBA)) u_m (
    .clk, .rst_n,
    .tx_valid(li_valid[NODE_AMBA]), .tx_flit(li_flit[NODE_AMBA]), .tx_ready(li_ready[NODE_AMBA]),
    .rx_valid(lo_valid[NODE_AMBA]), .rx_flit(lo_flit[NODE_AMBA]), .rx_ready(lo_ready[NODE_AMBA])
  );

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_idle
    if (n != NODE_DMA && n != NODE_GMT && n != NODE_AMBA) begin : g_t
      assign li_valid[n] = '0;
      assign li_flit[n]  = '{default: '0};
      assign lo_ready[n] = '1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [31:0] GMT = 32'h4000_0000;
  localparam logic [31:0] DMA = 32'h2000_0000;
  logic [31:0] rd, model [16];
  bit saw_busy;
  always @(posedge clk) if (busy) saw_busy = 1'b1;

  initial begin
    saw_busy = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 16; i++) begin
      model[i] = $urandom;
      u_m.write(GMT + 32'(i * 4), model[i]);
    end
    u_m.write(DMA + 32'h00, GMT);
    u_m.write(DMA + 32'h04, GMT + 32'h400);
    u_m.write(DMA + 32'h08, 32'd16);
    u_m.read (DMA + 32'h08, rd);
    check(rd == 32'd16, "LEN register reads back");
    u_m.write(DMA + 32'h0C, {8'h0, 8'h77, 4'h0, 4'(NODE_AMBA), 4'h0, 4'b1111});
    wait (u_m.irq_count == 1);
    check(u_m.irq_last_num == 8'h77 && u_m.irq_last_src == NODE_DMA, "completion interrupt");
    check(saw_busy && done && !busy, "busy then done");
    u_m.read(DMA + 32'h10, rd);
    check(rd[1:0] == 2'b10 && rd[31:16] == 16'd0, $sformatf("STATUS %h", rd));
    for (int i = 0; i < 16; i++) begin
      u_m.read(GMT + 32'h400 + 32'(i * 4), rd);
      check(rd == model[i], $sformatf("copied word %0d", i));
    end

    // Fixed destination: only the last word remains there.
    u_m.write(DMA + 32'h00, GMT);
    u_m.write(DMA + 32'h04, GMT + 32'h800);
    u_m.write(DMA + 32'h08, 32'd5);
    u_m.write(DMA + 32'h0C, 32'b0011);
    repeat (5) @(posedge clk);
    check(busy, "busy during copy");
    wait (done);
    u_m.read(GMT + 32'h800, rd);
    check(rd == model[4], "fixed destination holds the last word");
    u_m.read(DMA + 32'h00, rd);
    check(rd == GMT + 32'd20, "source advanced by five words");
    u_m.read(DMA + 32'h04, rd);
    check(rd == GMT + 32'h800, "fixed destination not advanced");

    // Zero length: done at once, nothing moved.
    u_m.write(DMA + 32'h08, 32'd0);
    u_m.write(DMA + 32'h0C, 32'b0111);
    @(posedge clk);
    check(done && !busy, "zero-length copy completes");

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
