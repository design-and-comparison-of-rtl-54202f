// two_operand_ppa_tb: checks {cout, sum} == a + b + cin for all five
// prefix networks at 16 and 24 bits (the widths of the multiplier's final
// adders) and exhaustively at 4 bits, with random and corner operands.
module two_operand_ppa_tb;
  import tri_add_pkg::*;
  localparam int unsigned NT = NUM_TOPOLOGIES;

  logic [23:0] a, b;
  logic        cin;
  logic [15:0] s16 [NT];
  logic [23:0] s24 [NT];
  logic [3:0]  s4  [NT];
  logic        c16 [NT], c24 [NT], c4 [NT];
  int checks = 0, failures = 0;

  for (genvar t = 0; t < NT; t++) begin : g_dut
    two_operand_ppa #(.W(16), .TOPOLOGY(prefix_e'(t))) u16 (
      .a(a[15:0]), .b(b[15:0]), .cin, .sum(s16[t]), .cout(c16[t]));
    two_operand_ppa #(.W(24), .TOPOLOGY(prefix_e'(t))) u24 (
      .a, .b, .cin, .sum(s24[t]), .cout(c24[t]));
    two_operand_ppa #(.W(4), .TOPOLOGY(prefix_e'(t))) u4 (
      .a(a[3:0]), .b(b[3:0]), .cin, .sum(s4[t]), .cout(c4[t]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned w16, w24, w4;
    #1;
    w16 = longint'(a[15:0]) + longint'(b[15:0]) + longint'(cin);
    w24 = longint'(a) + longint'(b) + longint'(cin);
    w4  = longint'(a[3:0]) + longint'(b[3:0]) + longint'(cin);
    for (int t = 0; t < NT; t++) begin
      checks += 3;
      if ({c16[t], s16[t]} != 17'(w16) || {c24[t], s24[t]} != 25'(w24) ||
          {c4[t], s4[t]} != 5'(w4)) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s a=%h b=%h cin=%b", prefix_e'(t), a, b, cin);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      a = 24'(v & 15); b = 24'((v >> 4) & 15); cin = v[8];
      check();
    end
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    for (int t = 0; t < 10000; t++) begin
      a = 24'($urandom); b = 24'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
