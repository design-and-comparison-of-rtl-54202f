// bit_addition_logic: first stage of the three-operand adder, a row of N
// independent full adders (a 3:2 carry-save compressor).
//   sum_p[i] = a[i] ^ b[i] ^ c[i]
//   carry[i] = a[i]&b[i] | b[i]&c[i] | c[i]&a[i]
// carry[i] has weight 2^(i+1); the base logic that follows pairs it with
// sum_p[i+1]. No carry travels between bit positions, so the delay is one
// full adder whatever N is. Purely combinational.
// The equations are the design's; N defaults to the 24-bit operand size.
// The same row also serves as the 3:2 compressor of the Wallace multiplier.
module bit_addition_logic #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] sum_p,  // bitwise sum, weight 2^i
  output logic [N-1:0] carry   // bitwise carry, weight 2^(i+1)
);
  assign sum_p = a ^ b ^ c;
  assign carry = (a & b) | (b & c) | (c & a);
endmodule
