// grey_cell: prefix operator cell used where the lower half [k-1:0] already
// reaches bit 0, so only the group generate is needed:
//   G[i:0] = G[i:k] | P[i:k] & G[k-1:0]
// Pure combinational logic, one AND-OR. The equation follows the design;
// the port names are this RTL's.
module grey_cell (
  input  logic g_hi,   // G[i:k]
  input  logic p_hi,   // P[i:k]
  input  logic g_lo,   // G[k-1:0]
  output logic g_out   // G[i:0]
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
