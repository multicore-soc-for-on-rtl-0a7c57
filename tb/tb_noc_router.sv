// tb_noc_router: self-checking test of one router (at column 1, row 1).
// Checks x-first routing to every port, one-cycle hop latency, strict
// priority between classes on a shared link, per-class back-pressure, and
// that wormhole packets of one class never interleave.
module tb_noc_router;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t               nb_in        [4];
  logic [NUM_PRIO-1:0] nb_in_ready  [4];
  link_t               nb_out       [4];
  logic [NUM_PRIO-1:0] nb_out_ready [4];
  logic [NUM_PRIO-1:0] loc_in_valid;
  flit_t               loc_in_flit  [NUM_PRIO];
  logic [NUM_PRIO-1:0] loc_in_ready;
  logic [NUM_PRIO-1:0] loc_out_valid;
  flit_t               loc_out_flit [NUM_PRIO];
  logic [NUM_PRIO-1:0] loc_out_ready;

  noc_router #(.X(2'd1), .Y(2'd1), .FIFO_DEPTH(4)) dut (.*);

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

  // Output log: port (0..3 neighbours, 4+v local links), class, flit, cycle.
  typedef struct {int port; int prio; flit_t f; int cyc;} rec_t;
  rec_t log_q[$];
  int acc_cyc;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++)
      if (nb_out[o].valid) begin
        if (!nb_out_ready[o][nb_out[o].prio]) begin
          failures++; $display("FAIL: sent to a full class");
        end
        log_q.push_back('{o, int'(nb_out[o].prio), nb_out[o].flit, cycle});
      end
    for (int v = 0; v < 4; v++)
      if (loc_out_valid[v] && loc_out_ready[v])
        log_q.push_back('{4, v, loc_out_flit[v], cycle});
    if (loc_in_valid[1] && loc_in_ready[1]) acc_cyc = cycle;
  end

  function automatic flit_t hd(node_t dst, logic [7:0] tag, bit tail);
    return make_head(dst, NODE_XEN0, CMD_WRITE, tag, tail);
  endfunction
  function automatic flit_t bd(logic [31:0] d, bit tail);
    return '{head: 1'b0, tail: tail, data: d};
  endfunction

  task automatic send_loc(int v, flit_t fl[$]);
    foreach (fl[i]) begin
      @(negedge clk);
      loc_in_valid[v] = 1'b1;
      loc_in_flit[v]  = fl[i];
      while (!loc_in_ready[v]) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    loc_in_valid[v] = 1'b0;
  endtask

  // A neighbour port carries one flit per cycle for all classes, so the
  // testbench drives one neighbour stream at a time per port.
  task automatic send_nb(int p, int v, flit_t fl[$]);
    foreach (fl[i]) begin
      @(negedge clk);
      nb_in[p].valid = 1'b0;
      while (!nb_in_ready[p][v]) @(negedge clk);
      nb_in[p].valid = 1'b1;
      nb_in[p].prio  = 2'(v);
      nb_in[p].flit  = fl[i];
      @(posedge clk);
    end
    @(negedge clk);
    nb_in[p].valid = 1'b0;
  endtask

  task automatic drain(int n);
    repeat (n) @(posedge clk);
  endtask

  int t0;

  initial begin
    for (int p = 0; p < 4; p++) begin
      nb_in[p] = '0;
      nb_out_ready[p] = '1;
    end
    loc_in_valid  = '0;
    for (int v = 0; v < 4; v++) loc_in_flit[v] = '0;
    loc_out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Routing from the local port to each direction, one flit each.
    //    node 4 (2,1) -> E; node 2 (0,1) -> W; node 0 (1,0) -> N;
    //    node 7 (1,2) -> S; node 10 (1,3) -> S.
    begin
      node_t dsts [5] = '{NODE_GMT, NODE_DMA, NODE_ADCDAC, NODE_SDRAM, NODE_GBIF};
      int    exp  [5] = '{P_E, P_W, P_N, P_S, P_S};
      for (int k = 0; k < 5; k++) begin
        log_q.delete();
        send_loc(3, '{hd(dsts[k], 8'(k), 1'b1)});
        drain(3);
        check(log_q.size() == 1, $sformatf("route %0d: one flit out", k));
        if (log_q.size() > 0)
          check(log_q[0].port == exp[k] && log_q[0].prio == 3,
                $sformatf("route %0d: port %0d exp %0d", k, log_q[0].port, exp[k]));
      end
    end

    // 2. From the west neighbour to this node: arrives on local link of its class.
    log_q.delete();
    send_nb(P_W, 2, '{hd(NODE_XEN0, 8'h11, 1'b0), bd(32'hA5A5_0001, 1'b0), bd(32'hA5A5_0002, 1'b1)});
    drain(4);
    check(log_q.size() == 3, "west->local: three flits");
    foreach (log_q[i]) check(log_q[i].port == 4 && log_q[i].prio == 2, "west->local: link of class 2");
    if (log_q.size() == 3) check(log_q[2].f.data == 32'hA5A5_0002 && log_q[2].f.tail, "west->local: tail last");

    // 3. Hop latency: flit accepted at edge t leaves at edge t+1.
    log_q.delete();
    @(negedge clk);
    loc_in_valid[1] = 1'b1;
    loc_in_flit[1]  = hd(NODE_GMT, 8'h22, 1'b1);
    @(negedge clk);
    loc_in_valid[1] = 1'b0;
    drain(3);
    t0 = acc_cyc;
    check(log_q.size() == 1 && log_q[0].cyc == t0 + 1,
          $sformatf("latency: accepted %0d left %0d", t0, log_q.size() ? log_q[0].cyc : -1));

    // 4. Priority: block the east link, queue a class-3 and a class-0 packet
    //    from two inputs, release: class 0 must leave first.
    log_q.delete();
    nb_out_ready[P_E] = '0;
    fork
      send_nb(P_N, 3, '{hd(NODE_GMT, 8'h33, 1'b1)});
      send_nb(P_S, 0, '{hd(NODE_GMT, 8'h00, 1'b1)});
    join
    drain(2);
    check(log_q.size() == 0, "back-pressure: nothing sent while not ready");
    @(negedge clk);
    nb_out_ready[P_E] = '1;
    drain(4);
    check(log_q.size() == 2, "priority: both sent");
    if (log_q.size() == 2) begin
      check(log_q[0].prio == 0 && log_q[1].prio == 3, "priority: class 0 before class 3");
      check(log_q[1].cyc == log_q[0].cyc + 1, "priority: one flit per cycle on the link");
    end

    // 5. Per-class back-pressure: class 3 blocked, class 2 still passes.
    log_q.delete();
    nb_out_ready[P_E] = 4'b0111;
    send_loc(3, '{hd(NODE_GMT, 8'h44, 1'b1)});
    send_loc(2, '{hd(NODE_GMT, 8'h55, 1'b1)});
    drain(3);
    check(log_q.size() == 1 && log_q[0].prio == 2, "class 2 passes a blocked class 3");
    @(negedge clk);
    nb_out_ready[P_E] = '1;
    drain(3);
    check(log_q.size() == 2 && log_q[1].prio == 3, "class 3 resumes");

    // 6. Wormhole: two 4-flit packets of the same class from two inputs to the
    //    same output must not interleave.
    log_q.delete();
    fork
      send_nb(P_W, 3, '{hd(NODE_GMT, 8'hA0, 1'b0), bd(32'hA1, 1'b0), bd(32'hA2, 1'b0), bd(32'hA3, 1'b1)});
      send_loc(3, '{hd(NODE_GMT, 8'hB0, 1'b0), bd(32'hB1, 1'b0), bd(32'hB2, 1'b0), bd(32'hB3, 1'b1)});
    join
    drain(6);
    check(log_q.size() == 8, $sformatf("wormhole: 8 flits (%0d)", log_q.size()));
    if (log_q.size() == 8) begin
      logic [7:0] first;
      first = log_q[0].f.data[7:0];
      check(log_q[0].f.head && log_q[4].f.head, "wormhole: heads at 0 and 4");
      for (int i = 1; i < 4; i++)
        check(log_q[i].f.data[7:4] == first[7:4], $sformatf("wormhole: flit %0d same packet", i));
      check(log_q[3].f.tail && log_q[7].f.tail, "wormhole: tails at 3 and 7");
    end

    // 7. Local outputs deliver several classes in the same cycle.
    log_q.delete();
    loc_out_ready = '0;
    send_nb(P_E, 1, '{hd(NODE_XEN0, 8'h61, 1'b1)});
    send_nb(P_N, 2, '{hd(NODE_XEN0, 8'h62, 1'b1)});
    drain(2);
    @(negedge clk);
    loc_out_ready = '1;
    drain(3);
    check(log_q.size() == 2 && log_q[0].cyc == log_q[1].cyc, "local links run in parallel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
