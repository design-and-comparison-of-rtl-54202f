// kogge_stone_pg: Kogge-Stone parallel prefix (PG) network.
//
// Input: per-bit generate g[i] and propagate p[i] for positions 0 .. N-1.
// Output: gx[i] = G[i:0], the carry out of position i; gx[0] is g[0]
// itself, since position 0 needs no cell.
// Level l (l = 1 .. ceil(log2 N)) joins every node i >= 2^(l-1) with node
// i - 2^(l-1), so each group doubles its span per level and every node is
// busy on every level: minimum depth, fan-out of two, most cells and wires.
// A join whose lower half already reaches bit 0 needs only a grey cell;
// the others are black cells. For N = 24 this is 5 levels, 23 grey and 66
// black cells. Purely combinational.
// The topology is the classic Kogge-Stone one the design names; the level
// numbering and the grey/black rule written as code are this RTL's.
module kogge_stone_pg
  import tri_add_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gx
);
  localparam int unsigned L = prefix_levels(KOGGE_STONE, N);

  // Node values after each level; index 0 is the network input.
  // A node's P is carried but never read once its group reaches bit 0.
  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 1; l <= L; l++) begin : g_level
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= D && i < 2 * D) begin : g_grey
        grey_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][i-D]),
                          .g_out(gl[l][i]));
        assign pl[l][i] = pl[l-1][i];
      end else if (i >= 2 * D) begin : g_black
        black_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][i-D]),
                           .p_lo(pl[l-1][i-D]), .g_out(gl[l][i]), .p_out(pl[l][i]));
      end else begin : g_pass
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end
    end
  end

  assign gx = gl[L];
endmodule
