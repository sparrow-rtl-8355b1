// sparrow_decode: instruction decoder for SPARROW.
//
// Looks at a SPARC v8 format-3 word (op = 2) in the execute stage and
// recognises three kinds of instruction:
//   * SPARROW vector instructions, op3 = 0x2C..0x2F, with op3[1] = signed
//     and op3[0] = stage-1 saturation;
//   * rd %scr  (rd %asr, op3 = 0x28, rs1 field = SCR_ASR);
//   * wr %scr  (wr %asr, op3 = 0x30, rd field  = SCR_ASR).
// In a vector instruction the 13 immediate bits of the SPARC format carry
// the opcodes, as the SPARROW description states: bits 12:9 stage-1 op,
// bits 8:6 stage-2 op, bit 5 stage-2 saturation, bits 4:0 rs2 or, when the
// i bit (13) is set, a 5-bit immediate code.  Unused operation codes
// decode as nop.  The concrete op3 values, the bit positions and the ASR
// number are this design's choices.  Purely combinational.
module sparrow_decode
  import sparrow_pkg::*;
#(
  parameter logic [4:0] SCR_ASR = 5'd20
) (
  input  logic [31:0] inst,
  output logic        is_vec,
  output logic        is_scr_wr,
  output logic        is_scr_rd,
  output ctrl_t       ctrl
);
  logic [1:0] op;
  logic [5:0] op3;
  logic [4:0] rd, rs1;

  assign op  = inst[31:30];
  assign rd  = inst[29:25];
  assign op3 = inst[24:19];
  assign rs1 = inst[18:14];

  assign is_vec    = (op == SPARC_OP_ARITH) && (op3[5:2] == OP3_VEC_HI);
  assign is_scr_rd = (op == SPARC_OP_ARITH) && (op3 == OP3_RDASR) && (rs1 == SCR_ASR);
  assign is_scr_wr = (op == SPARC_OP_ARITH) && (op3 == OP3_WRASR) && (rd  == SCR_ASR);

  always_comb begin
    ctrl           = '0;
    ctrl.is_signed = op3[1];
    ctrl.sat1      = op3[0];
    ctrl.sat2      = inst[5];
    ctrl.use_imm   = inst[13];
    ctrl.imm_code  = inst[4:0];
    ctrl.op1       = (inst[12:9] <= 4'd13) ? op1_e'(inst[12:9]) : OP1_NOP;
    ctrl.op2       = (inst[8:6]  <= 3'd4)  ? op2_e'(inst[8:6])  : OP2_NOP;
  end
endmodule
