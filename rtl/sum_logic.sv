// sum_logic: last stage of the three-operand adder.
//   sum[0] = p[0]
//   sum[i] = p[i] ^ G[i-1:0]          for i = 1 .. N
//   cout   = G[N:0] = g[N] | p[N] & G[N-1:0]
// gx[i] is the group generate G[i:0] from the prefix network, which spans
// positions 0 .. N-1. The top position N (carry of the top full adder) is
// closed here by one grey cell, which yields cout. Together {cout, sum} is
// the exact N+2-bit value a + b + c + cin. Purely combinational.
// The equations follow the design; closing position N inside this stage
// rather than inside the prefix network is this RTL's choice.
module sum_logic #(
  parameter int unsigned N = 24
) (
  input  logic [N:0]   p,     // bit propagates, positions 0 .. N
  input  logic         g_top, // bit generate of position N
  input  logic [N-1:0] gx,    // G[i:0] for i = 0 .. N-1
  output logic [N:0]   sum,
  output logic         cout
);
  assign sum = p ^ {gx, 1'b0};

  grey_cell u_cout (
    .g_hi (g_top),
    .p_hi (p[N]),
    .g_lo (gx[N-1]),
    .g_out(cout)
  );
endmodule
