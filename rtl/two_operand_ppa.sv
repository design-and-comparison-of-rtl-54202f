// two_operand_ppa: conventional two-operand parallel prefix adder,
// {cout, sum} = a + b + cin, in three combinational stages:
//   pre-computation   g[i] = a[i] & b[i], p[i] = a[i] ^ b[i]; cin is folded
//                     into position 0: g[0] = a[0]&b[0] | p[0]&cin;
//   prefix stage      one of the five prefix networks (TOPOLOGY) forms
//                     G[i:0] for every position;
//   post-computation  sum[0] = p[0] ^ cin, sum[i] = p[i] ^ G[i-1:0],
//                     cout = G[W-1:0].
// It is the final carry-propagate adder of each Wallace multiplier. The
// three-stage structure is the design's; folding cin into g[0] and Sklansky
// as the default network are this RTL's choices.
module two_operand_ppa
  import tri_add_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter prefix_e     TOPOLOGY = SKLANSKY
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p, gx;

  always_comb begin
    p    = a ^ b;
    g    = a & b;
    g[0] = (a[0] & b[0]) | (p[0] & cin);
  end

  prefix_network #(.N(W), .TOPOLOGY(TOPOLOGY)) u_pg (.g, .p, .gx);

  assign sum  = p ^ {gx[W-2:0], cin};
  assign cout = gx[W-1];
endmodule
