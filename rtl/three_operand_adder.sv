// three_operand_adder: adds three N-bit operands and a carry input,
// {cout, sum} = a + b + c + cin, in four combinational stages:
//   1. bit addition logic  N full adders reduce a, b, c to a bitwise sum
//                          and a bitwise carry (carry-save form);
//   2. base logic          N+1 saltire cells turn that pair, with cin in
//                          cell 0, into per-bit generate/propagate;
//   3. PG logic            a parallel prefix network (TOPOLOGY) forms the
//                          group generates G[i:0] of positions 0 .. N-1;
//   4. sum logic           sum[i] = p[i] ^ G[i-1:0]; a grey cell closes
//                          position N and gives cout.
// The carry chain of an ordinary adder is replaced by the prefix network,
// so the delay grows with log2(N) rather than N, and the three operands
// cost only one full-adder delay more than two would.
// Interface: sum is N+1 bits and cout is bit N+1 of the result, so no
// input combination overflows. No clock: the result is valid one
// combinational delay after the inputs.
// The four stages and their equations are the design's; N = 24 and the
// five topologies are its; the N+1-bit sum and Sklansky as the default
// topology (the one the design's comparison favours) are this RTL's choices.
module three_operand_adder
  import tri_add_pkg::*;
#(
  parameter int unsigned N        = OPERAND_WIDTH,
  parameter prefix_e     TOPOLOGY = SKLANSKY
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   sum,
  output logic         cout
);
  logic [N-1:0] sum_p, carry;  // stage 1
  logic [N:0]   g, p;          // stage 2
  logic [N-1:0] gx;            // stage 3

  bit_addition_logic #(.N(N)) u_bal (
    .a, .b, .c, .sum_p, .carry
  );

  base_logic #(.N(N)) u_base (
    .sum_p, .carry, .cin, .g, .p
  );

  prefix_network #(.N(N), .TOPOLOGY(TOPOLOGY)) u_pg (
    .g(g[N-1:0]), .p(p[N-1:0]), .gx
  );

  sum_logic #(.N(N)) u_sum (
    .p, .g_top(g[N]), .gx, .sum, .cout
  );
endmodule
