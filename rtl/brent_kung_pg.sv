// brent_kung_pg: Brent-Kung parallel prefix (PG) network.
//
// Input: per-bit generate g[i] and propagate p[i] for positions 0 .. N-1.
// Output: gx[i] = G[i:0]. gx[0] is g[0] itself, since
// position 0 needs no cell.
// Up-sweep, levels u = 1 .. floor(log2 N): node i with i mod 2^u = 2^u - 1
// joins node i - 2^(u-1), building a binary tree of groups; node 2^u - 1
// then holds a complete prefix. Down-sweep, for d from the largest useful
// value down to 1: node i >= 2^d with i mod 2^d = 2^(d-1) - 1 joins the
// complete prefix at i - 2^(d-1). Few cells and fan-out of two, but about
// twice the depth of Kogge-Stone. For N = 24: 8 levels, 23 grey and 18
// black cells. Purely combinational.
// The up/down tree is the classic Brent-Kung one the design names; the code
// form is this RTL's.
module brent_kung_pg
  import tri_add_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gx
);
  localparam int unsigned LU = bk_up_levels(N);
  localparam int unsigned LD = bk_down_levels(N);
  localparam int unsigned L  = LU + LD;

  // Node values after each level; index 0 is the network input.
  // A node's P is carried but never read once its group reaches bit 0.
  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 1; l <= L; l++) begin : g_level
    // up-sweep levels first, then the down-sweep with falling block size
    localparam bit          UP = (l <= LU);
    localparam int unsigned B  = UP ? l : (LD - (l - LU) + 1);  // block exponent
    localparam int unsigned H  = 1 << (B - 1);                  // half block
    for (genvar i = 0; i < N; i++) begin : g_node
      localparam bit JOIN = UP ? ((i % (2 * H)) == 2 * H - 1)
                               : ((i % (2 * H)) == H - 1 && i >= 2 * H);
      localparam bit LOW0 = UP ? (i == 2 * H - 1) : 1'b1;  // lower half reaches bit 0
      if (JOIN && LOW0) begin : g_grey
        grey_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][i-H]),
                          .g_out(gl[l][i]));
        assign pl[l][i] = pl[l-1][i];
      end else if (JOIN) begin : g_black
        black_cell u_cell (.g_hi(gl[l-1][i]), .p_hi(pl[l-1][i]), .g_lo(gl[l-1][i-H]),
                           .p_lo(pl[l-1][i-H]), .g_out(gl[l][i]), .p_out(pl[l][i]));
      end else begin : g_pass
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end
    end
  end

  assign gx = gl[L];
endmodule
