// kogge_stone_pg_tb: checks the Kogge-Stone prefix network at the 24-bit default and
// at sizes 1, 2, 3, 5, 8, 13, 16, 17 and 32, which exercise partial
// blocks and the edges of each level. Every output gx[i] must equal the
// ripple-carry value G[i:0] = g[i] | p[i] & G[i-1:0], worked out in the
// testbench, for random and corner generate/propagate vectors. The
// 24-bit instance must also have 5 prefix levels (ceil(log2 n)).
module kogge_stone_pg_tb;
  localparam int unsigned NS = 10;
  localparam int unsigned NMAX = 32;
  localparam int unsigned SIZES [NS] = '{24, 1, 2, 3, 5, 8, 13, 16, 17, 32};

  logic [NMAX-1:0] g, p;
  logic [NMAX-1:0] gx [NS];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NS; k++) begin : g_dut
    kogge_stone_pg #(.N(SIZES[k])) u_dut (
      .g(g[SIZES[k]-1:0]), .p(p[SIZES[k]-1:0]), .gx(gx[k][SIZES[k]-1:0])
    );
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [NMAX-1:0] ref_g;
    #1;
    ref_g[0] = g[0];
    for (int i = 1; i < NMAX; i++) ref_g[i] = g[i] | (p[i] & ref_g[i-1]);
    for (int k = 0; k < NS; k++) begin
      for (int i = 0; i < SIZES[k]; i++) begin
        checks++;
        if (gx[k][i] !== ref_g[i]) begin
          failures++;
          if (failures < 20)
            $display("FAIL N=%0d bit %0d g=%h p=%h gx=%b want %b", SIZES[k], i, g, p,
                     gx[k][i], ref_g[i]);
        end
      end
    end
  endtask

  initial begin
    checks++;
    if (g_dut[0].u_dut.L != 5) begin
      failures++;
      $display("FAIL 24-bit network has %0d levels, want 5", g_dut[0].u_dut.L);
    end
    // all propagate with a generate at bit 0: the longest carry path
    g = 1; p = '1; check();
    g = 0; p = '1; check();
    g = '1; p = '0; check();
    for (int b = 0; b < NMAX; b++) begin
      g = NMAX'(1) << b; p = '1; check();
      g = 1; p = ~(NMAX'(1) << b); check();
    end
    for (int t = 0; t < 3000; t++) begin
      g = $urandom; p = $urandom;
      if (t % 3 == 0) p = p | $urandom;   // long propagate runs
      if (t % 2 == 0) g = g & ~p;         // generate and propagate exclusive, as in the adder
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
