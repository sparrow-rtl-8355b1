// tb_sparrow_mul8: exhaustive check of all 8x8 operand pairs, signed and
// unsigned, against the '*' operator on integers.
module tb_sparrow_mul8;
  logic [7:0]  a, b;
  logic        is_signed;
  logic [15:0] p;
  int checks = 0, failures = 0;

  sparrow_mul8 dut (.a(a), .b(b), .is_signed(is_signed), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          int ex;
          a = 8'(x); b = 8'(y); is_signed = 1'(s);
          ex = s ? (int'($signed(8'(x))) * int'($signed(8'(y)))) : x * y;
          #1;
          checks++;
          if (p !== 16'(ex)) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d a=%0d b=%0d p=%h exp=%h", s, x, y, p, 16'(ex));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
