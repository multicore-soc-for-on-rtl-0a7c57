// tb_noc_mesh: all-to-all traffic over the twelve-router network.
// Every node sends a three-flit packet to every other node, all nodes at once,
// on a class that depends on the pair, while receivers stall at random. Each
// packet must arrive exactly once, at the right node, on the link of its
// class, with its flits complete and in order. Also checks the hop latency of
// an idle network between two corner-linked routers.
module tb_noc_mesh;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRIO-1:0] loc_in_valid  [NUM_NODES];
  flit_t               loc_in_flit   [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] loc_in_ready  [NUM_NODES];
  logic [NUM_PRIO-1:0] loc_out_valid [NUM_NODES];
  flit_t               loc_out_flit  [NUM_NODES][NUM_PRIO];
  logic [NUM_PRIO-1:0] loc_out_ready [NUM_NODES];

  noc_mesh #(.FIFO_DEPTH(4)) dut (.*);

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

  bit stall_en = 1'b0;
  int got [NUM_NODES][NUM_NODES];     // [dst][src] packets received
  int part [NUM_NODES][NUM_PRIO];     // flits of the packet being received
  node_t cur_src [NUM_NODES][NUM_PRIO];
  int last_arrival;

  // Receivers.
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NUM_NODES; n++)
      for (int v = 0; v < NUM_PRIO; v++)
        if (loc_out_valid[n][v] && loc_out_ready[n][v]) begin
          flit_t f;
          f = loc_out_flit[n][v];
          last_arrival = cycle;
          case (part[n][v])
            0: begin
              if (!f.head || head_dst(f) != node_t'(n)) begin
                failures++; $display("FAIL: node %0d class %0d bad head %h", n, v, f);
              end
              cur_src[n][v] = head_src(f);
              if ((int'(head_src(f)) + n) % 4 != v) begin
                failures++; $display("FAIL: node %0d wrong class %0d", n, v);
              end
            end
            1: if (f.head || f.tail || f.data != {16'hBEEF, 4'(cur_src[n][v]), 4'(n), 8'h01}) begin
                 failures++; $display("FAIL: node %0d body %h", n, f.data);
               end
            default: begin
              checks++;
              if (f.head || !f.tail || f.data != {16'hCAFE, 4'(cur_src[n][v]), 4'(n), 8'h02}) begin
                failures++; $display("FAIL: node %0d tail %h", n, f.data);
              end
              got[n][cur_src[n][v]]++;
            end
          endcase
          part[n][v] = (part[n][v] == 2) ? 0 : part[n][v] + 1;
        end
  end

  always @(negedge clk)
    for (int n = 0; n < NUM_NODES; n++)
      loc_out_ready[n] = stall_en ? 4'($urandom) : '1;

  task automatic send(int s, int v, flit_t fl[3]);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      loc_in_valid[s][v] = 1'b1;
      loc_in_flit[s][v]  = fl[i];
      while (!loc_in_ready[s][v]) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    loc_in_valid[s][v] = 1'b0;
  endtask

  task automatic source(int s);
    for (int k = 1; k < NUM_NODES; k++) begin
      int d, v;
      d = (s + k) % NUM_NODES;
      v = (s + d) % 4;
      send(s, v, '{make_head(node_t'(d), node_t'(s), CMD_WRITE, 8'd0, 1'b0),
                   '{head: 1'b0, tail: 1'b0, data: {16'hBEEF, 4'(s), 4'(d), 8'h01}},
                   '{head: 1'b0, tail: 1'b1, data: {16'hCAFE, 4'(s), 4'(d), 8'h02}}});
    end
  endtask

  int t_send;
  always @(posedge clk)
    if (!stall_en && loc_in_valid[0][2] && loc_in_ready[0][2]) t_send = cycle;

  initial begin
    for (int n = 0; n < NUM_NODES; n++) begin
      loc_in_valid[n] = '0;
      for (int v = 0; v < NUM_PRIO; v++) begin
        loc_in_flit[n][v] = '0;
        part[n][v] = 0;
        cur_src[n][v] = '0;
      end
      for (int m = 0; m < NUM_NODES; m++) got[n][m] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Latency on an idle network: node 0 (top row) to node 6 (column 0,
    // row 2) goes R0 -> R2 over the corner link, then R2 -> R6: three
    // routers, so the single flit leaves the last one 3 cycles after it
    // enters the first.
    @(negedge clk);
    loc_in_valid[0][2] = 1'b1;
    loc_in_flit[0][2]  = make_head(NODE_AMBA, NODE_ADCDAC, CMD_IRQ, 8'd0, 1'b1);
    @(negedge clk);
    loc_in_valid[0][2] = 1'b0;
    repeat (8) @(posedge clk);
    check(last_arrival - t_send == 3, $sformatf("idle latency %0d", last_arrival - t_send));
    part[6][2] = 0;

    // All-to-all with random receiver stalls.
    stall_en = 1'b1;
    for (int s = 0; s < NUM_NODES; s++) begin
      automatic int ss = s;
      fork source(ss); join_none
    end
    wait fork;
    repeat (200) @(posedge clk);
    stall_en = 1'b0;
    repeat (50) @(posedge clk);

    for (int d = 0; d < NUM_NODES; d++)
      for (int s = 0; s < NUM_NODES; s++)
        if (s != d) check(got[d][s] == 1, $sformatf("packet %0d->%0d received %0d times", s, d, got[d][s]));

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
