// noc_mesh: the platform's network-on-chip, twelve routers on a 4x4 grid
// whose four corner positions are empty.
//
// Router n sits at column node_x(n), row node_y(n) (noc_pkg); rows are
// numbered from the top:
//
//            col0   col1   col2   col3
//   row 0           R0     R1
//   row 1    R2     R3     R4     R5
//   row 2    R6     R7     R8     R9
//   row 3           R10    R11
//
// Neighbours in a row or column are joined by one full-duplex link. Each
// missing corner is bridged by a diagonal link: R0.W-R2.N, R1.E-R5.N,
// R10.W-R6.S and R11.E-R9.S. With column-first routing a packet that must go
// west from R0 takes the R0-R2 link and arrives in column 0 one row down,
// which is where the missing corner router would have sent it next, so the
// routing rule needs no exception. The floor plan (routers, tiles and the
// diagonal links) follows the platform's network drawing; numbering and
// routing are this design's own.
//
// The local port of every router is brought out, one link per priority class
// in each direction (see noc_router for the handshake). Router 5 has no tile
// in the platform; its local port is still brought out.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_PRIO-1:0] loc_in_valid  [NUM_NODES],
  input  flit_t               loc_in_flit   [NUM_NODES][NUM_PRIO],
  output logic [NUM_PRIO-1:0] loc_in_ready  [NUM_NODES],
  output logic [NUM_PRIO-1:0] loc_out_valid [NUM_NODES],
  output flit_t               loc_out_flit  [NUM_NODES][NUM_PRIO],
  input  logic [NUM_PRIO-1:0] loc_out_ready [NUM_NODES]
);

  // Neighbour of router n through its port d, or -1 at the edge.
  function automatic int nb_node(int n, int d);
    int x, y, nx, ny;
    // diagonal corner links
    if (n == 0  && d == P_W) return 2;
    if (n == 2  && d == P_N) return 0;
    if (n == 1  && d == P_E) return 5;
    if (n == 5  && d == P_N) return 1;
    if (n == 10 && d == P_W) return 6;
    if (n == 6  && d == P_S) return 10;
    if (n == 11 && d == P_E) return 9;
    if (n == 9  && d == P_S) return 11;
    x = int'(node_x(node_t'(n)));
    y = int'(node_y(node_t'(n)));
    nx = x; ny = y;
    case (d)
      P_N: ny = y - 1;
      P_E: nx = x + 1;
      P_S: ny = y + 1;
      default: nx = x - 1;
    endcase
    for (int m = 0; m < int'(NUM_NODES); m++)
      if (int'(node_x(node_t'(m))) == nx && int'(node_y(node_t'(m))) == ny) return m;
    return -1;
  endfunction

  // Port of the neighbour at which the link from router n, port d, arrives.
  function automatic int nb_port(int n, int d);
    if (n == 0  && d == P_W) return P_N;
    if (n == 2  && d == P_N) return P_W;
    if (n == 1  && d == P_E) return P_N;
    if (n == 5  && d == P_N) return P_E;
    if (n == 10 && d == P_W) return P_S;
    if (n == 6  && d == P_S) return P_W;
    if (n == 11 && d == P_E) return P_S;
    if (n == 9  && d == P_S) return P_E;
    return (d + 2) % 4;
  endfunction

  link_t               r_in        [NUM_NODES][4];
  link_t               r_out       [NUM_NODES][4];
  logic [NUM_PRIO-1:0] r_in_ready  [NUM_NODES][4];
  logic [NUM_PRIO-1:0] r_out_ready [NUM_NODES][4];

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    for (genvar d = 0; d < 4; d++) begin : g_dir
      localparam int NB = nb_node(n, d);
      localparam int NP = nb_port(n, d);
      if (NB >= 0) begin : g_link
        assign r_in[n][d]        = r_out[NB][NP];
        assign r_out_ready[n][d] = r_in_ready[NB][NP];
      end else begin : g_edge
        assign r_in[n][d]        = '0;
        assign r_out_ready[n][d] = '0;
      end
    end

    noc_router #(
      .X          (node_x(node_t'(n))),
      .Y          (node_y(node_t'(n))),
      .FIFO_DEPTH (FIFO_DEPTH)
    ) u_router (
      .clk, .rst_n,
      .nb_in         (r_in[n]),
      .nb_in_ready   (r_in_ready[n]),
      .nb_out        (r_out[n]),
      .nb_out_ready  (r_out_ready[n]),
      .loc_in_valid  (loc_in_valid[n]),
      .loc_in_flit   (loc_in_flit[n]),
      .loc_in_ready  (loc_in_ready[n]),
      .loc_out_valid (loc_out_valid[n]),
      .loc_out_flit  (loc_out_flit[n]),
      .loc_out_ready (loc_out_ready[n])
    );
  end

endmodule
