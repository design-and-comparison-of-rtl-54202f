// three_operand_multiplier: cascaded three-operand multiplier,
// product = a * b * c for unsigned W-bit operands, fully combinational.
// A first Wallace multiplier forms the 2W-bit a*b, ending in a 2W-bit
// parallel prefix adder (16 bits for W = 8); a second Wallace multiplier
// takes that product and c and forms the 3W-bit result, ending in a 3W-bit
// prefix adder (24 bits). The cascade, the 8-bit operands and the 16- and
// 24-bit widths are the design's; the prefix network inside the two final
// adders (Sklansky by default) is this RTL's choice.
module three_operand_multiplier
  import tri_add_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter prefix_e     TOPOLOGY = SKLANSKY
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  output logic [3*W-1:0] product
);
  logic [2*W-1:0] ab;

  wallace_multiplier #(.WA(W), .WB(W), .TOPOLOGY(TOPOLOGY)) u_mul_ab (
    .a, .b, .product(ab)
  );

  wallace_multiplier #(.WA(2*W), .WB(W), .TOPOLOGY(TOPOLOGY)) u_mul_abc (
    .a(ab), .b(c), .product
  );
endmodule
