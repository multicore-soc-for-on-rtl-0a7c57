// noc_router: packet-switched five-port router of the network-on-chip.
//
// Four ports (N, E, S, W) go to neighbouring routers over one 32-bit
// full-duplex link each; the fifth, local port goes to the tile over four
// 32-bit full-duplex links, one per priority class. This split, the 32-bit
// width and the four priorities are the platform's; the rest is this design's
// own choice, kept simple:
//  * Every input port has one FIFO per priority class (FIFO_DEPTH flits).
//  * Wormhole switching: the head flit picks the output, body flits follow on
//    the same output and priority class, the tail flit releases it.
//  * Dimension-order routing, column (x) first, then row (y). On the 4x4 grid
//    without corners the corner links of the mesh stand in for the missing
//    corner routers (see noc_mesh), so x-first routing never needs them to
//    turn.
//  * Each neighbour output sends one flit per cycle: the highest-priority class
//    (0 first) that has a flit waiting and room downstream wins. Within one
//    class, new packets from different inputs are served round-robin.
//  * The local output sends up to four flits per cycle, one per class.
// Flow control: a link carries valid, priority and flit; the receiver returns
// one ready bit per class, which is "that class's input FIFO is not full" and
// comes from registers. A flit moves when valid and the ready bit of its class
// are both high. A flit crosses a router in one cycle (FIFO write, then read
// in the next cycle), so the latency per hop is one cycle plus queueing.
module noc_router
  import noc_pkg::*;
#(
  parameter logic [1:0]  X          = 2'd0,
  parameter logic [1:0]  Y          = 2'd0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // neighbour links, indexed by P_N, P_E, P_S, P_W
  input  link_t               nb_in        [4],
  output logic [NUM_PRIO-1:0] nb_in_ready  [4],
  output link_t               nb_out       [4],
  input  logic [NUM_PRIO-1:0] nb_out_ready [4],
  // local links, one per priority class
  input  logic [NUM_PRIO-1:0] loc_in_valid,
  input  flit_t               loc_in_flit  [NUM_PRIO],
  output logic [NUM_PRIO-1:0] loc_in_ready,
  output logic [NUM_PRIO-1:0] loc_out_valid,
  output flit_t               loc_out_flit [NUM_PRIO],
  input  logic [NUM_PRIO-1:0] loc_out_ready
);
  localparam int unsigned NP = 5;  // ports
  localparam int unsigned NV = NUM_PRIO;

  typedef logic [2:0] port_t;

  // --------------------------------------------------------------------
  // Input FIFOs
  // --------------------------------------------------------------------
  logic  push   [NP][NV];
  logic  pop    [NP][NV];
  logic  full   [NP][NV];
  logic  empty  [NP][NV];
  flit_t head_f [NP][NV];
  flit_t in_f   [NP][NV];

  for (genvar i = 0; i < NP; i++) begin : g_in
    for (genvar v = 0; v < NV; v++) begin : g_vc
      if (i < 4) begin : g_nb
        assign push[i][v] = nb_in[i].valid && (nb_in[i].prio == 2'(v));
        assign in_f[i][v] = nb_in[i].flit;
        assign nb_in_ready[i][v] = !full[i][v];
      end else begin : g_loc
        assign push[i][v] = loc_in_valid[v];
        assign in_f[i][v] = loc_in_flit[v];
        assign loc_in_ready[v] = !full[i][v];
      end
      noc_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .push    (push[i][v]),
        .wr_data (in_f[i][v]),
        .pop     (pop[i][v]),
        .rd_data (head_f[i][v]),
        .full    (full[i][v]),
        .empty   (empty[i][v])
      );
    end
  end

  // --------------------------------------------------------------------
  // Route computation
  // --------------------------------------------------------------------
  function automatic port_t xy_route(node_t dst);
    logic [1:0] dx, dy;
    dx = node_x(dst);
    dy = node_y(dst);
    if (dx < X)      return port_t'(P_W);
    else if (dx > X) return port_t'(P_E);
    else if (dy < Y) return port_t'(P_N);
    else if (dy > Y) return port_t'(P_S);
    else             return port_t'(P_L);
  endfunction

  port_t route_reg [NP][NV];  // output of the packet in progress
  port_t route_cur [NP][NV];

  always_comb begin
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NV; v++)
        route_cur[i][v] = head_f[i][v].head ? xy_route(head_dst(head_f[i][v]))
                                            : route_reg[i][v];
  end

  // --------------------------------------------------------------------
  // Output allocation
  // --------------------------------------------------------------------
  logic  lock_valid [NP][NV];
  port_t lock_owner [NP][NV];
  port_t rr_ptr     [NP][NV];

  logic  cand_valid [NP][NV];
  port_t cand_in    [NP][NV];
  logic  grant      [NP][NV];

  always_comb begin
    port_t idx;
    idx = '0;
    for (int o = 0; o < NP; o++) begin
      for (int v = 0; v < NV; v++) begin
        cand_valid[o][v] = 1'b0;
        cand_in[o][v]    = '0;
        if (lock_valid[o][v]) begin
          cand_in[o][v]    = lock_owner[o][v];
          cand_valid[o][v] = !empty[lock_owner[o][v]][v] &&
                             (route_cur[lock_owner[o][v]][v] == port_t'(o));
        end else begin
          for (int k = NP - 1; k >= 0; k--) begin
            idx = port_t'((int'(rr_ptr[o][v]) + k) % NP);
            if (!empty[idx][v] && head_f[idx][v].head &&
                route_cur[idx][v] == port_t'(o)) begin
              cand_valid[o][v] = 1'b1;
              cand_in[o][v]    = idx;
            end
          end
        end
      end
    end
  end

  // Neighbour outputs: one class per cycle, highest priority first.
  always_comb begin
    for (int o = 0; o < 4; o++) begin
      nb_out[o] = '0;
      for (int v = 0; v < NV; v++) grant[o][v] = 1'b0;
      for (int v = NV - 1; v >= 0; v--) begin
        if (cand_valid[o][v] && nb_out_ready[o][v]) begin
          nb_out[o].valid = 1'b1;
          nb_out[o].prio  = 2'(v);
          nb_out[o].flit  = head_f[cand_in[o][v]][v];
          for (int w = 0; w < NV; w++) grant[o][w] = (w == v);
        end
      end
    end
    // Local output: one link per class.
    for (int v = 0; v < NV; v++) begin
      loc_out_valid[v] = cand_valid[P_L][v];
      loc_out_flit[v]  = head_f[cand_in[P_L][v]][v];
      grant[P_L][v]    = cand_valid[P_L][v] && loc_out_ready[v];
    end
  end

  always_comb begin
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NV; v++) begin
        pop[i][v] = 1'b0;
        for (int o = 0; o < NP; o++)
          if (grant[o][v] && cand_in[o][v] == port_t'(i)) pop[i][v] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NV; v++) begin
          lock_valid[o][v] <= 1'b0;
          lock_owner[o][v] <= '0;
          rr_ptr[o][v]     <= '0;
          route_reg[o][v]  <= '0;
        end
    end else begin
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NV; v++)
          if (grant[o][v]) begin
            if (head_f[cand_in[o][v]][v].tail) begin
              lock_valid[o][v] <= 1'b0;
            end else if (head_f[cand_in[o][v]][v].head) begin
              lock_valid[o][v] <= 1'b1;
              lock_owner[o][v] <= cand_in[o][v];
            end
            if (head_f[cand_in[o][v]][v].head)
              rr_ptr[o][v] <= (cand_in[o][v] == port_t'(NP - 1)) ? '0 : cand_in[o][v] + 1'b1;
          end
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NV; v++)
          if (pop[i][v] && head_f[i][v].head) route_reg[i][v] <= route_cur[i][v];
    end
  end

  // --------------------------------------------------------------------
  // Link rules
  // --------------------------------------------------------------------
  for (genvar p = 0; p < 4; p++) begin : g_chk
    // A neighbour only sends a flit when its class has room here.
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      nb_in[p].valid |-> !full[p][nb_in[p].prio]);
  end
  for (genvar v = 0; v < NV; v++) begin : g_chk_loc
    // The tile holds a flit until the router takes it.
    a_loc_hold: assert property (@(posedge clk) disable iff (!rst_n)
      loc_in_valid[v] && !loc_in_ready[v] |=> loc_in_valid[v]);
  end

endmodule
