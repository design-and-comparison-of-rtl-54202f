// three_operand_adder_tb: checks {cout, sum} == a + b + c + cin for all
// five prefix networks at 24 bits, plus a 3-bit Kogge-Stone instance.
// Directed cases: the 3-bit worked example 4 + 3 + 7 + 1 = 15 with cout 0;
// the three 24-bit vectors 348 + 1372 + 2744 = 4464 (and the two that
// follow it, 4477 and 4490) with cin 0; the largest result, where cout
// is set. Then random operands, with exhaustive coverage at 3 bits.
module three_operand_adder_tb;
  import tri_add_pkg::*;
  localparam int unsigned N = 24;
  localparam int unsigned NT = NUM_TOPOLOGIES;

  logic [N-1:0] a, b, c;
  logic         cin;
  logic [N:0]   sum [NT];
  logic         cout [NT];

  logic [2:0] a3, b3, c3;
  logic       cin3;
  logic [3:0] sum3;
  logic       cout3;

  int checks = 0, failures = 0;
  int cout_seen = 0;

  for (genvar t = 0; t < NT; t++) begin : g_dut
    three_operand_adder #(.N(N), .TOPOLOGY(prefix_e'(t))) u_dut (
      .a, .b, .c, .cin, .sum(sum[t]), .cout(cout[t])
    );
  end

  three_operand_adder #(.N(3), .TOPOLOGY(KOGGE_STONE)) u_dut3 (
    .a(a3), .b(b3), .c(c3), .cin(cin3), .sum(sum3), .cout(cout3)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check24();
    longint unsigned want;
    #1;
    want = longint'(a) + longint'(b) + longint'(c) + longint'(cin);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if ({cout[t], sum[t]} != (N+2)'(want)) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s a=%0d b=%0d c=%0d cin=%0d got %0d want %0d",
                   prefix_e'(t), a, b, c, cin, {cout[t], sum[t]}, want);
      end
      if (cout[t]) cout_seen++;
    end
  endtask

  task automatic check3();
    int want;
    #1;
    want = int'(a3) + int'(b3) + int'(c3) + int'(cin3);
    checks++;
    if ({cout3, sum3} != 5'(want)) begin
      failures++;
      $display("FAIL 3-bit %0d+%0d+%0d+%0d got %0d", a3, b3, c3, cin3, {cout3, sum3});
    end
  endtask

  initial begin
    // 3-bit worked example: S = 1111, Cout = 0
    a3 = 3'd4; b3 = 3'd3; c3 = 3'd7; cin3 = 1'b1;
    check3();
    checks++;
    if (sum3 != 4'b1111 || cout3 != 1'b0) begin
      failures++;
      $display("FAIL worked example: sum=%b cout=%b", sum3, cout3);
    end
    for (int v = 0; v < 1024; v++) begin
      {cin3, a3, b3, c3} = 10'(v);
      check3();
    end

    // 24-bit vectors with known sums
    cin = 1'b0;
    a = 24'd348; b = 24'd1372; c = 24'd2744; check24();
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (sum[t] != 25'd4464) begin failures++; $display("FAIL 4464"); end
    end
    a = 24'd349; b = 24'd1376; c = 24'd2752; check24();
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (sum[t] != 25'd4477) begin failures++; $display("FAIL 4477"); end
    end
    a = 24'd350; b = 24'd1380; c = 24'd2760; check24();
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (sum[t] != 25'd4490) begin failures++; $display("FAIL 4490"); end
    end

    // corners
    a = '1; b = '1; c = '1; cin = 1'b1; check24();
    a = '1; b = '0; c = '0; cin = 1'b1; check24();
    a = '1; b = '1; c = '0; cin = 1'b0; check24();
    a = '0; b = '0; c = '0; cin = 1'b0; check24();

    for (int t = 0; t < 20000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom); cin = 1'($urandom);
      check24();
    end

    checks++;
    if (cout_seen == 0) begin
      failures++;
      $display("FAIL cout never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
