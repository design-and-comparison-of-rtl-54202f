// base_logic_tb: checks the saltire cells bit by bit against
// g[i] = s[i] & c[i-1], p[i] = s[i] ^ c[i-1] (cin at bit 0, s[N] = 0), and
// checks that p + 2*g carries the value sum_p + 2*carry + cin.
module base_logic_tb;
  localparam int unsigned N = 24;
  logic [N-1:0] sum_p, carry;
  logic         cin;
  logic [N:0]   g, p;
  int checks = 0, failures = 0;

  base_logic #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic s_i, c_im1;
    longint unsigned want, got;
    #1;
    for (int i = 0; i <= N; i++) begin
      s_i   = (i < N) ? sum_p[i] : 1'b0;
      c_im1 = (i == 0) ? cin : carry[i-1];
      checks++;
      if (g[i] != (s_i & c_im1) || p[i] != (s_i ^ c_im1)) begin
        failures++;
        $display("FAIL bit %0d g=%b p=%b", i, g[i], p[i]);
      end
    end
    want = longint'(sum_p) + 2 * longint'(carry) + longint'(cin);
    got  = longint'(p) + 2 * longint'(g);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL value %0d != %0d", got, want);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      sum_p = N'($urandom); carry = N'($urandom); cin = 1'($urandom);
      if (t < 4) begin
        sum_p = {N{t[0]}}; carry = {N{t[1]}}; cin = t[0];
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
