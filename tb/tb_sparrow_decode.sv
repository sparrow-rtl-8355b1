// tb_sparrow_decode: encodes random SPARROW instructions, %scr accesses
// and ordinary SPARC instructions and checks what the decoder extracts.
module tb_sparrow_decode;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;
  logic [31:0] inst;
  logic is_vec, is_scr_wr, is_scr_rd;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  sparrow_decode #(.SCR_ASR(5'd20)) dut (.inst(inst), .is_vec(is_vec), .is_scr_wr(is_scr_wr),
                                         .is_scr_rd(is_scr_rd), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] ex, input string what);
    checks++;
    if (got !== ex) begin
      failures++;
      $display("FAIL %s inst=%h got=%h exp=%h", what, inst, got, ex);
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      ctrl_t c;
      c = rand_ctrl();
      inst = enc_vec(c, 5'($urandom), 5'($urandom));
      #1;
      chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b100, "kind vec");
      chk(32'(ctrl), 32'(c), "ctrl");
    end
    // codes above the defined ones decode as nop
    inst = 32'h8160_1FC0;  // op3 0x2C, op1 field 15, op2 field 7
    #1;
    chk({28'b0, 4'(ctrl.op1)}, 32'(OP1_NOP), "op1 out of range");
    chk({29'b0, 3'(ctrl.op2)}, 32'(OP2_NOP), "op2 out of range");
    inst = enc_wrasr(5'd20, 5'd3); #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b010, "wr scr");
    inst = enc_rdasr(5'd20, 5'd3); #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b001, "rd scr");
    inst = enc_wrasr(5'd17, 5'd3); #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b000, "wr other asr");
    inst = enc_rdasr(5'd21, 5'd3); #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b000, "rd other asr");
    // ordinary SPARC add, sll, and an op=3 load using the same op3 bits
    inst = 32'h8600_4002; #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b000, "add");
    inst = 32'h8B28_6002; #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b000, "sll");
    inst = 32'hC160_4002; #1;
    chk({29'b0, is_vec, is_scr_wr, is_scr_rd}, 32'b000, "op3 with op=3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
