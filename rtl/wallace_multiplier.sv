// wallace_multiplier: unsigned WA x WB multiplier, product = a * b, fully
// combinational.
// Partial products: row j is (a AND b[j]) shifted left by j, WA+WB bits
// wide. Wallace reduction: in every stage the rows are taken three at a
// time and each group is compressed by a row of full adders
// (bit_addition_logic) into a sum row and a carry row (shifted left by
// one); rows left over pass to the next stage. Stages repeat until two rows
// remain, so an 8-row matrix needs 4 stages. A two-operand parallel prefix
// adder (two_operand_ppa, TOPOLOGY) adds the last two rows.
// Full adders whose inputs are constant zero become half adders or wires
// in synthesis. Bits above WA+WB that a carry row would shift out are
// dropped; they are always zero because the product fits in WA+WB bits.
// The three-rows-at-a-time reduction and the final prefix adder follow the
// design; the row-level formulation is this RTL's.
module wallace_multiplier
  import tri_add_pkg::*;
#(
  parameter int unsigned WA       = 8,
  parameter int unsigned WB       = 8,
  parameter prefix_e     TOPOLOGY = SKLANSKY
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] product
);
  localparam int unsigned W = WA + WB;

  // Rows after one 3:2 stage.
  function automatic int unsigned next_rows(input int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  // Rows present before stage s.
  function automatic int unsigned rows_at(input int unsigned s);
    int unsigned r = WB;
    for (int unsigned k = 0; k < s; k++) r = next_rows(r);
    return r;
  endfunction

  // Number of 3:2 stages until at most two rows are left.
  function automatic int unsigned num_stages();
    int unsigned r = WB;
    int unsigned s = 0;
    while (r > 2) begin
      r = next_rows(r);
      s++;
    end
    return s;
  endfunction

  localparam int unsigned S = num_stages();

  // Partial-product matrix, the rows before stage 0.
  logic [W-1:0] pp [WB];
  for (genvar j = 0; j < WB; j++) begin : g_pp
    assign pp[j] = W'({{WA{b[j]}} & a}) << j;
  end

  // Stage s reads the rows of stage s-1 (or the matrix) and holds the rows
  // it produces in its own array, rows[0 .. next_rows(R)-1].
  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned R  = rows_at(s);
    localparam int unsigned NG = R / 3;
    logic [W-1:0] rin  [WB];
    logic [W-1:0] rows [WB];
    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rows;
    end
    for (genvar k = 0; k < NG; k++) begin : g_csa
      logic [W-1:0] sum_p, carry;
      bit_addition_logic #(.N(W)) u_fa_row (
        .a(rin[3*k]), .b(rin[3*k+1]), .c(rin[3*k+2]),
        .sum_p, .carry
      );
      // carry[W-1] would land above the product width; it is always zero
      assign rows[2*k]   = sum_p;
      assign rows[2*k+1] = {carry[W-2:0], 1'b0};
    end
    for (genvar r = 3 * NG; r < R; r++) begin : g_pass
      assign rows[2*NG + (r - 3*NG)] = rin[r];
    end
    for (genvar r = next_rows(R); r < WB; r++) begin : g_unused
      assign rows[r] = '0;
    end
  end

  logic [W-1:0] op_a, op_b;
  logic         cout_unused;

  if (S == 0) begin : g_no_stage
    assign op_a = pp[0];
    assign op_b = (WB >= 2) ? pp[WB-1] : '0;
  end else begin : g_last
    assign op_a = g_stage[S-1].rows[0];
    assign op_b = g_stage[S-1].rows[1];
  end

  two_operand_ppa #(.W(W), .TOPOLOGY(TOPOLOGY)) u_cpa (
    .a(op_a), .b(op_b), .cin(1'b0), .sum(product), .cout(cout_unused)
  );
endmodule
