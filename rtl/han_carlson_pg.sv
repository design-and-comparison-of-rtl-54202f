// han_carlson_pg: Han-Carlson parallel prefix (PG) network.
//
// Input: per-bit generate g[i] and propagate p[i] for positions 0 .. N-1.
// Output: gx[i] = G[i:0]. gx[0] is g[0] itself, since
// position 0 needs no cell.
// A hybrid of Brent-Kung and Kogge-Stone. Level 1 joins each odd position
// with the even position below it (the first Brent-Kung step). Levels
// 2 .. ceil(log2 N) run a Kogge-Stone network on the odd positions only
// (odd node i > 2^(l-1) joins i - 2^(l-1)). A last level joins each even
// position i >= 2 with the finished odd prefix at i - 1. Half the cells
// and wires of Kogge-Stone for one extra level. For N = 24: 6 levels,
// 23 grey and 33 black cells. Purely combinational.
// The hybrid structure follows the design; the code form is this RTL's.
module han_carlson_pg
  import tri_add_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gx
);
  localparam int unsigned L = prefix_levels(HAN_CARLSON, N);

  // Node values after each level; index 0 is the network input.
  // A node's P is carried but never read once its group reaches bit 0.
  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 1; l <= L; l++) begin : g_level
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      localparam bit ODD = (i % 2) == 1;
      // partner, whether a cell sits here, whether the partner reaches bit 0
      localparam int unsigned J = (l == 1 || l == L) ? i - 1 : i - D;
      localparam bit JOIN = (l == 1) ? ODD
                          : (l == L) ? (!ODD && i >= 2)
                          : (ODD && i > D);
      localparam bit LOW0 = (l == 1) ? (i == 1)
                          : (l == L) ? 1'b1
                          : (i < 2 * D);
      if (JOIN && LOW0) begin : g_grey
        grey_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][J]),
                          .g_out(gl[l][i]));
        assign pl[l][i] = pl[l-1][i];
      end else if (JOIN) begin : g_black
        black_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][J]),
                           .p_lo(pl[l-1][J]), .g_out(gl[l][i]), .p_out(pl[l][i]));
      end else begin : g_pass
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end
    end
  end

  assign gx = gl[L];
endmodule
