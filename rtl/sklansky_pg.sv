// sklansky_pg: Sklansky (divide-and-conquer) parallel prefix (PG) network.
//
// Input: per-bit generate g[i] and propagate p[i] for positions 0 .. N-1.
// Output: gx[i] = G[i:0]. gx[0] is g[0] itself, since
// position 0 needs no cell.
// Level l (l = 1 .. ceil(log2 N)) cuts the word into blocks of 2^l bits;
// every node in the upper half of a block joins the top node of the lower
// half. Minimum depth with the fewest cells of the minimum-depth networks,
// at the price of a fan-out that doubles each level (2^(l-1) at level l).
// Grey cells where the lower half starts at bit 0, black cells elsewhere.
// For N = 24: 5 levels, 23 grey and 29 black cells. Purely combinational.
// The topology and its cell counts for 24 bits match the design; the code
// form is this RTL's.
module sklansky_pg
  import tri_add_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gx
);
  localparam int unsigned L = prefix_levels(SKLANSKY, N);

  // Node values after each level; index 0 is the network input.
  // A node's P is carried but never read once its group reaches bit 0.
  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 1; l <= L; l++) begin : g_level
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      // top node of the lower half of i's 2^l block
      localparam int unsigned J = ((i >> l) << l) + D - 1;
      if (((i >> (l - 1)) & 1) == 1 && i < 2 * D) begin : g_grey
        grey_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][J]),
                          .g_out(gl[l][i]));
        assign pl[l][i] = pl[l-1][i];
      end else if (((i >> (l - 1)) & 1) == 1) begin : g_black
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
