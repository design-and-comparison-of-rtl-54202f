// sum_logic_tb: random and corner inputs; sum[0] = p[0],
// sum[i] = p[i] ^ gx[i-1], cout = g_top | p[N] & gx[N-1], computed bit by
// bit in the testbench.
module sum_logic_tb;
  localparam int unsigned N = 24;
  logic [N:0]   p, sum;
  logic         g_top, cout;
  logic [N-1:0] gx;
  int checks = 0, failures = 0;

  sum_logic #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      p = (N+1)'({$urandom, $urandom}); gx = N'($urandom); g_top = 1'($urandom);
      if (t < 8) begin
        p = {(N+1){t[0]}}; gx = {N{t[1]}}; g_top = t[2];
      end
      #1;
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (sum[i] != ((i == 0) ? p[0] : (p[i] ^ gx[i-1]))) begin
          failures++;
          $display("FAIL sum bit %0d", i);
        end
      end
      checks++;
      if (cout != (g_top | (p[N] & gx[N-1]))) begin
        failures++;
        $display("FAIL cout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
