// bit_addition_logic_tb: the full-adder row must preserve the value of its
// three operands, sum_p + 2*carry == a + b + c, and each bit must follow
// the full-adder truth table. All 8 bit patterns, corners and random
// 24-bit operands.
module bit_addition_logic_tb;
  localparam int unsigned N = 24;
  logic [N-1:0] a, b, c, sum_p, carry;
  int checks = 0, failures = 0;

  bit_addition_logic #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned want, got;
    #1;
    want = longint'(a) + longint'(b) + longint'(c);
    got  = longint'(sum_p) + 2 * longint'(carry);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h sum_p=%h carry=%h", a, b, c, sum_p, carry);
    end
    for (int i = 0; i < N; i++) begin
      int ones;
      ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
      checks++;
      if (sum_p[i] != ones[0] || carry[i] != (ones >= 2)) begin
        failures++;
        $display("FAIL bit %0d ones=%0d s=%b c=%b", i, ones, sum_p[i], carry[i]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      a = {N{v[0]}}; b = {N{v[1]}}; c = {N{v[2]}};
      check();
    end
    for (int t = 0; t < 2000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
