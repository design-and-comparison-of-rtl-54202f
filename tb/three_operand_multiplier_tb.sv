// three_operand_multiplier_tb: product == a * b * c for 8-bit operands,
// corners (zeros, ones, all-ones giving the largest 24-bit product) and
// random operand triples, plus exhaustive coverage of a 3-bit instance.
module three_operand_multiplier_tb;
  logic [7:0]  a, b, c;
  logic [23:0] product;
  logic [2:0]  a3, b3, c3;
  logic [8:0]  product3;
  int checks = 0, failures = 0;

  three_operand_multiplier #(.W(8)) u_dut  (.a, .b, .c, .product);
  three_operand_multiplier #(.W(3)) u_dut3 (.a(a3), .b(b3), .c(c3), .product(product3));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (product != 24'(int'(a) * int'(b) * int'(c))) begin
      failures++;
      if (failures < 20) $display("FAIL %0d*%0d*%0d=%0d", a, b, c, product);
    end
  endtask

  initial begin
    a3 = '0; b3 = '0; c3 = '0;
    a = 8'hff; b = 8'hff; c = 8'hff; check();
    a = 8'h00; b = 8'hff; c = 8'hff; check();
    a = 8'h01; b = 8'h01; c = 8'h01; check();
    a = 8'h80; b = 8'h80; c = 8'h80; check();
    for (int t = 0; t < 30000; t++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      check();
    end
    for (int v = 0; v < 512; v++) begin
      {a3, b3, c3} = 9'(v);
      #1;
      checks++;
      if (product3 != 9'(int'(a3) * int'(b3) * int'(c3))) begin
        failures++;
        $display("FAIL 3-bit %0d*%0d*%0d=%0d", a3, b3, c3, product3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
