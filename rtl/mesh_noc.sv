// mesh_noc: the 64-node hard NoC, an 8x8 mesh of vc_router instances.
//
// Router (x, y) is node y*MESH_W + x; y = 0 is the north (top) row and
// x = 0 the west column.  Neighbouring routers are joined by hard links:
// one 64-bit flit channel in each direction plus the credit wires running
// against it.  The links carry no extra pipeline registers; a flit
// registered in one router's output port is written into the neighbour's
// input buffer at the next clock edge.  Ports on the mesh edge have no
// neighbour: their inputs are tied off and routing never uses them.
// The local port of every router is brought out (node-indexed arrays) for
// the fabric ports.  Mesh size, link width and the mesh topology follow the
// document; the wiring conventions are this design's own.
module mesh_noc
  import hns_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // local (fabric port) side of each router
  input  flit_t   inj_flit   [MESH_W*MESH_H],  // into the router's local input
  output credit_t inj_credit [MESH_W*MESH_H],  // credits for inj_flit
  output flit_t   ej_flit    [MESH_W*MESH_H],  // out of the router's local output
  input  credit_t ej_credit  [MESH_W*MESH_H]   // credits for ej_flit
);

  localparam int N = MESH_W * MESH_H;

  flit_t   r_in_flit   [N][RPORTS];
  credit_t r_out_cred  [N][RPORTS];
  flit_t   r_out_flit  [N][RPORTS];
  credit_t r_in_cred   [N][RPORTS];

  for (genvar y = 0; y < MESH_H; y++) begin : g_row
    for (genvar x = 0; x < MESH_W; x++) begin : g_col
      localparam int n = y * MESH_W + x;

      // north neighbour is (x, y-1); its south port faces us
      if (y > 0) begin : g_n
        assign r_in_flit[n][P_NORTH] = r_out_flit[n - MESH_W][P_SOUTH];
        assign r_in_cred[n][P_NORTH] = r_out_cred[n - MESH_W][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_flit[n][P_NORTH] = '0;
        assign r_in_cred[n][P_NORTH] = '0;
      end
      if (y < MESH_H - 1) begin : g_s
        assign r_in_flit[n][P_SOUTH] = r_out_flit[n + MESH_W][P_NORTH];
        assign r_in_cred[n][P_SOUTH] = r_out_cred[n + MESH_W][P_NORTH];
      end else begin : g_s_edge
        assign r_in_flit[n][P_SOUTH] = '0;
        assign r_in_cred[n][P_SOUTH] = '0;
      end
      if (x < MESH_W - 1) begin : g_e
        assign r_in_flit[n][P_EAST] = r_out_flit[n + 1][P_WEST];
        assign r_in_cred[n][P_EAST] = r_out_cred[n + 1][P_WEST];
      end else begin : g_e_edge
        assign r_in_flit[n][P_EAST] = '0;
        assign r_in_cred[n][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_flit[n][P_WEST] = r_out_flit[n - 1][P_EAST];
        assign r_in_cred[n][P_WEST] = r_out_cred[n - 1][P_EAST];
      end else begin : g_w_edge
        assign r_in_flit[n][P_WEST] = '0;
        assign r_in_cred[n][P_WEST] = '0;
      end

      assign r_in_flit[n][P_LOCAL] = inj_flit[n];
      assign r_in_cred[n][P_LOCAL] = ej_credit[n];
      assign inj_credit[n]         = r_out_cred[n][P_LOCAL];
      assign ej_flit[n]            = r_out_flit[n][P_LOCAL];

      vc_router u_router (
        .here       ('{y: CW'(y), x: CW'(x)}),
        .clk        (clk),
        .rst_n      (rst_n),
        .in_flit    (r_in_flit[n]),
        .out_credit (r_out_cred[n]),
        .out_flit   (r_out_flit[n]),
        .in_credit  (r_in_cred[n])
      );
    end
  end

endmodule
