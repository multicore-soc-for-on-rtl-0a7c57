// tb_default_slave: the default slave behind a master interface wired back to
// back with it. Reads must return the fixed pattern, writes must complete,
// and the block must count the accesses and keep the latest offset, direction
// and source node.
module tb_default_slave;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t               ab_flit [NUM_PRIO];
  flit_t               ba_flit [NUM_PRIO];
  logic [15:0]         err_count;
  logic [27:0]         err_addr;
  logic                err_we;
  node_t               err_src;

  tb_net_master #(.NODE(NODE_SPW1)) u_m (
    .clk, .rst_n,
    .tx_valid(ab_valid), .tx_flit(ab_flit), .tx_ready(ab_ready),
    .rx_valid(ba_valid), .rx_flit(ba_flit), .rx_ready(ba_ready)
  );

  default_slave #(.NODE(NODE_DEFAULT), .READ_VALUE(32'hDEAD_BEEF)) dut (
    .clk, .rst_n,
    .tx_valid(ba_valid), .tx_flit(ba_flit), .tx_ready(ba_ready),
    .rx_valid(ab_valid), .rx_flit(ab_flit), .rx_ready(ab_ready),
    .err_count, .err_addr, .err_we, .err_src
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] rd;
  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(err_count == 0, "count starts at zero");
    for (int i = 0; i < 10; i++) begin
      logic [27:0] a;
      a = 28'($urandom) & 28'hFFF_FFFC;
      if (i % 2) begin
        u_m.access(1'b1, {4'hC, a}, $urandom, rd, cyc);
        check(err_we == 1'b1, "write recorded");
      end else begin
        u_m.access(1'b0, {4'hD, a}, 32'h0, rd, cyc);
        check(rd == 32'hDEAD_BEEF, $sformatf("read returns pattern, got %h", rd));
        check(err_we == 1'b0, "read recorded");
        check(cyc == 5, $sformatf("read answered in %0d cycles", cyc));
      end
      check(err_addr == a, "offset recorded");
      check(err_src == NODE_SPW1, "source recorded");
      check(err_count == 16'(i + 1), $sformatf("count %0d", err_count));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
