// tri_add_top_tb: end-to-end test of the whole design at its default sizes
// (24-bit adders, 8-bit multiplier operands); no parameter is overridden.
// Adders: the six consecutive vectors a = 348.., b = 1372.., c = 2744..
// (a steps by 1, b by 4, c by 8) must give 4464, 4477, 4490, 4503, 4516,
// 4529; then corners and random operands, where all five adders must
// return a + b + c + cin. Multiplier: random and corner triples against
// a * b * c. The testbench counts how often each mechanism of the adders
// was used (carry input set, the extra sum bit N set, carry output set,
// a carry rippling through all 24 positions) and how often the
// multiplier produced a full 24-bit product; a mechanism never reached
// counts as a failure.
module tri_add_top_tb;
  import tri_add_pkg::*;
  localparam int unsigned N  = OPERAND_WIDTH;
  localparam int unsigned MW = 8;
  localparam int unsigned NT = NUM_TOPOLOGIES;

  logic [N-1:0]               a, b, c;
  logic                       cin;
  logic [NT-1:0][N:0]         sum;
  logic [NT-1:0]              cout;
  logic [MW-1:0]              mul_a, mul_b, mul_c;
  logic [3*MW-1:0]            mul_product;

  int checks = 0, failures = 0;
  int n_cin = 0, n_top_bit = 0, n_cout = 0, n_full_ripple = 0, n_mul_full = 0;

  tri_add_top dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_add();
    longint unsigned want;
    logic [N-1:0] s_p, cy;
    #1;
    want = longint'(a) + longint'(b) + longint'(c) + longint'(cin);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if ({cout[t], sum[t]} != (N+2)'(want)) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s %0d+%0d+%0d+%0d got %0d want %0d", prefix_e'(t),
                   a, b, c, cin, {cout[t], sum[t]}, want);
      end
    end
    if (cin) n_cin++;
    if (want[N]) n_top_bit++;
    if (want[N+1]) n_cout++;
    // carry-save form; a full ripple is a carry generated at bit 0 that
    // propagates through every position up to N-1
    s_p = a ^ b ^ c;
    cy  = (a & b) | (b & c) | (c & a);
    if ((s_p[0] & cin) && ((s_p[N-1:1] ^ cy[N-2:0]) == '1)) n_full_ripple++;
  endtask

  task automatic check_mul();
    #1;
    checks++;
    if (mul_product != 24'(int'(mul_a) * int'(mul_b) * int'(mul_c))) begin
      failures++;
      if (failures < 20)
        $display("FAIL mul %0d*%0d*%0d=%0d", mul_a, mul_b, mul_c, mul_product);
    end
    if (mul_product[3*MW-1]) n_mul_full++;
  endtask

  localparam int unsigned FIG_SUM [6] = '{4464, 4477, 4490, 4503, 4516, 4529};

  initial begin
    mul_a = '0; mul_b = '0; mul_c = '0;
    cin = 1'b0;
    for (int k = 0; k < 6; k++) begin
      a = N'(348 + k); b = N'(1372 + 4 * k); c = N'(2744 + 8 * k);
      check_add();
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (sum[t] != (N+1)'(FIG_SUM[k]) || cout[t]) begin
          failures++;
          $display("FAIL vector %0d: %s sum=%0d", k, prefix_e'(t), sum[t]);
        end
      end
    end

    // full ripple: one carry from bit 0 through all positions
    a = N'(1); b = ~N'(1); c = '0; cin = 1'b1;
    check_add();
    a = '1; b = '1; c = '1; cin = 1'b1;
    check_add();

    for (int t = 0; t < 20000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom); cin = 1'($urandom);
      mul_a = MW'($urandom); mul_b = MW'($urandom); mul_c = MW'($urandom);
      if (t % 100 == 0) begin mul_a = '1; mul_b = '1; end
      check_add();
      check_mul();
    end

    $display("mechanisms: cin=%0d top_sum_bit=%0d cout=%0d full_ripple=%0d mul_full=%0d",
             n_cin, n_top_bit, n_cout, n_full_ripple, n_mul_full);
    checks += 5;
    if (n_cin == 0)         begin failures++; $display("FAIL carry input never used"); end
    if (n_top_bit == 0)     begin failures++; $display("FAIL sum bit N never set"); end
    if (n_cout == 0)        begin failures++; $display("FAIL carry output never set"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-length carry"); end
    if (n_mul_full == 0)    begin failures++; $display("FAIL no full-width product"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
