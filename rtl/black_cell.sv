// black_cell: prefix operator cell that produces both the group generate and
// the group propagate of the span [i:j] from its two halves [i:k] and
// [k-1:j]:
//   G[i:j] = G[i:k] | P[i:k] & G[k-1:j]
//   P[i:j] = P[i:k] & P[k-1:j]
// Pure combinational logic, one AND-OR and one AND. The equations and the
// gate arrangement are those of the design; the port names are this RTL's.
module black_cell (
  input  logic g_hi,   // G[i:k]
  input  logic p_hi,   // P[i:k]
  input  logic g_lo,   // G[k-1:j]
  input  logic p_lo,   // P[k-1:j]
  output logic g_out,  // G[i:j]
  output logic p_out   // P[i:j]
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
