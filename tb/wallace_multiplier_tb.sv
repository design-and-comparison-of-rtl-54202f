// wallace_multiplier_tb: product == a * b for the two multipliers of the
// cascade, 8 x 8 (all 65536 operand pairs) and 16 x 8 (corners and random
// pairs), and for the edge shapes 5 x 1, 5 x 2 and 4 x 3 (exhaustive),
// which have no or one reduction stage.
module wallace_multiplier_tb;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16;
  logic [7:0]  b16;
  logic [23:0] p16;
  logic [4:0]  ae;
  logic        b1;
  logic [1:0]  b2;
  logic [2:0]  b3;
  logic [5:0]  p51;
  logic [6:0]  p52, p43;
  int checks = 0, failures = 0;

  wallace_multiplier #(.WA(8),  .WB(8)) u_8x8  (.a(a8),  .b(b8),  .product(p8));
  wallace_multiplier #(.WA(16), .WB(8)) u_16x8 (.a(a16), .b(b16), .product(p16));
  wallace_multiplier #(.WA(5),  .WB(1)) u_5x1  (.a(ae),  .b(b1),  .product(p51));
  wallace_multiplier #(.WA(5),  .WB(2)) u_5x2  (.a(ae),  .b(b2),  .product(p52));
  wallace_multiplier #(.WA(4),  .WB(3)) u_4x3  (.a(ae[3:0]), .b(b3), .product(p43));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; ae = '0; b1 = '0; b2 = '0; b3 = '0;
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 20) $display("FAIL 8x8 %0d*%0d=%0d", a8, b8, p8);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 8'($urandom);
      if (t == 0) begin a16 = '1; b16 = '1; end
      if (t == 1) begin a16 = '1; b16 = 8'd1; end
      #1;
      checks++;
      if (p16 != 24'(int'(a16) * int'(b16))) begin
        failures++;
        if (failures < 20) $display("FAIL 16x8 %0d*%0d=%0d", a16, b16, p16);
      end
    end
    for (int v = 0; v < 256; v++) begin
      ae = 5'(v); b1 = v[5]; b2 = 2'(v >> 5); b3 = 3'(v >> 4);
      #1;
      checks += 3;
      if (p51 != 6'(int'(ae) * int'(b1)) || p52 != 7'(int'(ae) * int'(b2)) ||
          p43 != 7'(int'(ae[3:0]) * int'(b3))) begin
        failures++;
        $display("FAIL edge v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
