// tri_add_top: the complete design. Two independent parts stand side by
// side, each with its own ports:
//   * five N-bit three-operand adders, one per prefix network (index by
//     tri_add_pkg::prefix_e: 0 Kogge-Stone, 1 Brent-Kung, 2 Sklansky,
//     3 Ladner-Fischer, 4 Han-Carlson), all fed with the same a, b, c, cin.
//     Each returns the exact sum {cout[t], sum[t]} = a + b + c + cin, so the
//     five results are always equal; they differ only in area and delay.
//   * the cascaded three-operand multiplier, mul_product = mul_a*mul_b*mul_c.
// Everything is combinational: outputs follow the inputs after one
// combinational delay, with no clock or reset.
// Holding all five adders in one top follows the design's side-by-side
// comparison of the five networks at 24 bits; the port names are this RTL's.
module tri_add_top
  import tri_add_pkg::*;
#(
  parameter int unsigned N  = OPERAND_WIDTH,
  parameter int unsigned MW = 8
) (
  input  logic [N-1:0]                    a,
  input  logic [N-1:0]                    b,
  input  logic [N-1:0]                    c,
  input  logic                            cin,
  output logic [NUM_TOPOLOGIES-1:0][N:0]  sum,
  output logic [NUM_TOPOLOGIES-1:0]       cout,
  input  logic [MW-1:0]                   mul_a,
  input  logic [MW-1:0]                   mul_b,
  input  logic [MW-1:0]                   mul_c,
  output logic [3*MW-1:0]                 mul_product
);
  for (genvar t = 0; t < NUM_TOPOLOGIES; t++) begin : g_adder
    three_operand_adder #(.N(N), .TOPOLOGY(prefix_e'(t))) u_adder (
      .a, .b, .c, .cin, .sum(sum[t]), .cout(cout[t])
    );
  end

  three_operand_multiplier #(.W(MW)) u_mul (
    .a(mul_a), .b(mul_b), .c(mul_c), .product(mul_product)
  );
endmodule
