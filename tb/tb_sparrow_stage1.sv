// tb_sparrow_stage1: random operands, controls and %scr settings against
// the reference model; also a few hand-worked cases of swizzle, immediate
// and both mask selections.
module tb_sparrow_stage1;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;
  logic [31:0] op1, op2;
  ctrl_t ctrl;
  scr_t  scr;
  logic [3:0][15:0] c;
  int checks = 0, failures = 0;

  sparrow_stage1 #(.LANES(4)) dut (.op1(op1), .op2(op2), .ctrl(ctrl), .scr(scr), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] ex, input string what);
    checks++;
    if (c !== ex) begin
      failures++;
      if (failures < 20) $display("FAIL %s op1=%h op2=%h ctrl=%h scr=%h c=%h exp=%h",
                                  what, op1, op2, ctrl, scr, c, ex);
    end
  endtask

  initial begin
    // hand-worked: unsigned add with reversed first source, mask lane 2 -> original
    op1 = 32'h04_03_02_01; op2 = 32'h10_20_30_40;
    ctrl = '0; ctrl.op1 = OP1_ADD;
    scr = SCR_RESET; scr.swz_a = 8'b00_01_10_11; scr.mask = 4'b1011; scr.mask_sel = 1'b1;
    #1 chk({16'h0011, 16'h0003, 16'h0033, 16'h0044}, "swizzle+mask original");
    scr.mask_sel = 1'b0;
    #1 chk({16'h0011, 16'h0000, 16'h0033, 16'h0044}, "mask zero");
    // signed multiply by immediate -2 (code 01_001), lane 0 replicated
    op1 = 32'h7F_80_05_FD; ctrl = '0; ctrl.op1 = OP1_MUL; ctrl.is_signed = 1'b1;
    ctrl.use_imm = 1'b1; ctrl.imm_code = 5'b01001;
    scr = SCR_RESET; scr.swz_a = 8'b00_00_00_00;
    #1 chk({4{16'h0006}}, "imm mul broadcast");
    // stage-1 nop ignores swizzle, keeps mask
    ctrl = '0; ctrl.is_signed = 1'b1; scr.mask = 4'b0111;
    #1 chk({16'h0000, 16'hFF80, 16'h0005, 16'hFFFD}, "nop pass");
    for (int n = 0; n < 20000; n++) begin
      op1 = rand_word(); op2 = rand_word();
      ctrl = rand_ctrl(); scr = rand_scr();
      #1 chk(ref_stage1(op1, op2, ctrl, scr), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
