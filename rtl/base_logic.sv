// base_logic: second stage of the three-operand adder, N+1 "saltire" cells
// that turn the carry-save pair (sum_p, carry) into per-bit generate and
// propagate signals of an ordinary two-operand prefix problem:
//   g[i] = sum_p[i] & carry[i-1],  p[i] = sum_p[i] ^ carry[i-1]
//   g[0] = sum_p[0] & cin,         p[0] = sum_p[0] ^ cin
// Position N has no operand bit (sum_p[N] = 0): it only receives the carry
// of the top full adder, so p[N] = carry[N-1] and g[N] = 0, a constant kept
// so that every position has the same g/p pair. Purely combinational.
// The equations and the use of the external carry input in cell 0 follow
// the design; naming the extra top cell explicitly is this
// RTL's way of giving the sum its full N+2-bit range.
module base_logic #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] sum_p,
  input  logic [N-1:0] carry,
  input  logic         cin,
  output logic [N:0]   g,
  output logic [N:0]   p
);
  logic [N:0] s_ext;   // sum_p with the empty position N
  logic [N:0] c_shift; // carry moved to the weight it belongs to, cin at bit 0

  assign s_ext   = {1'b0, sum_p};
  assign c_shift = {carry, cin};

  for (genvar i = 0; i <= N; i++) begin : g_saltire
    assign g[i] = s_ext[i] & c_shift[i];
    assign p[i] = s_ext[i] ^ c_shift[i];
  end
endmodule
