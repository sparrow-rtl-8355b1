// tb_sparrow_reduce: each reduction, signed and unsigned, saturated or not,
// and the packing of a stage-2 nop, against hand-worked values and the
// reference model.
module tb_sparrow_reduce;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;
  logic [3:0][15:0] a;
  op2_e op;
  logic is_signed, sat;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sparrow_reduce #(.LANES(4)) dut (.a(a), .op(op), .is_signed(is_signed), .sat(sat), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] ex, input string what);
    checks++;
    if (y !== ex) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h op=%0d s=%0d sat=%0d y=%h exp=%h",
                                  what, a, op, is_signed, sat, y, ex);
    end
  endtask

  initial begin
    a = {16'd100, 16'd90, 16'hFFF6, 16'd5};   // 100, 90, -10, 5
    op = OP2_SUM; is_signed = 1; sat = 0; #1 chk(32'd185, "sum");
    sat = 1; #1 chk(32'd127, "sum sat (clamp only at the end)");
    op = OP2_MIN; sat = 0; #1 chk(32'hFFFF_FFF6, "min signed");
    is_signed = 0; #1 chk(32'd5, "min unsigned");
    op = OP2_MAX; #1 chk(32'h0000_FFF6, "max unsigned");
    sat = 1; #1 chk(32'd255, "max unsigned sat");
    op = OP2_XOR; sat = 0; #1 chk(32'(16'd100 ^ 16'd90 ^ 16'hFFF6 ^ 16'd5), "xor");
    op = OP2_NOP; #1 chk(32'h64_5A_F6_05, "nop packs low bytes");
    // sum whose partial results overflow 16 bits
    a = {4{16'h7FFF}}; op = OP2_SUM; is_signed = 1; sat = 0; #1 chk(32'h0001_FFFC, "wide sum");
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      a = w; op = op2_e'($urandom_range(0, 4)); is_signed = 1'($urandom); sat = 1'($urandom);
      #1 chk(ref_stage2(w, op, is_signed, sat), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
