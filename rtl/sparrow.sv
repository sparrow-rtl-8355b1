// sparrow: the SPARROW short-SIMD unit, placed beside the ALU of a LEON3
// integer pipeline.
//
// SPARROW adds 8-bit, four-wide vector instructions to a SPARC v8 core
// without a vector register file: vectors live in the ordinary 32-bit
// integer registers, so this unit receives its operands and returns its
// result through the integer pipeline's existing paths.  It spans two
// pipeline stages:
//
//   EX  decode; stage 1 = swizzle, immediate, four lane ALUs, masking,
//       giving a 4x16-bit intermediate vector C'.  The packed low bytes of
//       C' are offered on ex_result; when the instruction has no
//       reduction (stage-2 nop) this is already the final value and
//       ex_bypass_valid tells the pipeline it may forward it to the next
//       instruction at once.
//   ME  stage 2 = reduction tree or pass-through on the registered vector
//       A'; me_result is the final value to write back.
//
// %scr (masks, mask select, swizzles) is written by wr %scr in EX and is
// visible to the next instruction.  rd %scr returns it on ex_scr_rdata.
// hold freezes the stage register and %scr, like the core's pipeline
// hold.  Reset is synchronous and active low.
//
// The split into two stages, the register between them, the bypass of a
// stage-1-only result and the %scr mechanism follow the SPARROW
// description; the interface to the core (signal names, where the
// write data for %scr is formed, hold) is this design's own.
module sparrow
  import sparrow_pkg::*;
#(
  parameter int unsigned LANES   = 4,
  parameter logic [4:0]  SCR_ASR = 5'd20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  // execute stage
  input  logic        ex_valid,
  input  logic [31:0] ex_inst,
  input  logic [31:0] ex_op1,
  input  logic [31:0] ex_op2,
  output logic        ex_sparrow,
  output logic        ex_bypass_valid,
  output logic [31:0] ex_result,
  output logic        ex_scr_read,
  output logic [31:0] ex_scr_rdata,
  // memory stage
  output logic        me_valid,
  output logic [31:0] me_result
);
  logic  is_vec, is_scr_wr, is_scr_rd;
  ctrl_t ctrl;
  scr_t  scr;
  logic [LANES-1:0][15:0] c_ex, a_me;
  logic [LANES-1:0][7:0]  c_ex_bytes;

  // Stage-register contents besides the vector.
  typedef struct packed {
    logic valid;
    op2_e op2;
    logic is_signed;
    logic sat2;
  } me_ctrl_t;
  me_ctrl_t me_q;

  sparrow_decode #(.SCR_ASR(SCR_ASR)) u_dec (
    .inst(ex_inst), .is_vec(is_vec), .is_scr_wr(is_scr_wr), .is_scr_rd(is_scr_rd), .ctrl(ctrl)
  );

  sparrow_scr u_scr (
    .clk(clk), .rst_n(rst_n), .hold(hold), .we(ex_valid && is_scr_wr),
    .wdata(ex_op1 ^ ex_op2), .rdata(ex_scr_rdata), .scr(scr)
  );

  sparrow_stage1 #(.LANES(LANES)) u_s1 (
    .op1(ex_op1), .op2(ex_op2), .ctrl(ctrl), .scr(scr), .c(c_ex)
  );

  always_comb begin
    for (int i = 0; i < LANES; i++) c_ex_bytes[i] = c_ex[i][7:0];
  end

  assign ex_sparrow      = ex_valid && is_vec;
  assign ex_bypass_valid = ex_sparrow && (ctrl.op2 == OP2_NOP);
  assign ex_result       = 32'(c_ex_bytes);
  assign ex_scr_read     = ex_valid && is_scr_rd;

  // Register between the stages (C' -> A').
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      me_q <= '0;
      a_me <= '0;
    end else if (!hold) begin
      me_q.valid     <= ex_sparrow;
      me_q.op2       <= ctrl.op2;
      me_q.is_signed <= ctrl.is_signed;
      me_q.sat2      <= ctrl.sat2;
      a_me           <= c_ex;
    end
  end

  sparrow_reduce #(.LANES(LANES)) u_s2 (
    .a(a_me), .op(me_q.op2), .is_signed(me_q.is_signed), .sat(me_q.sat2), .y(me_result)
  );

  assign me_valid = me_q.valid;

  // A bypassed result is always a vector instruction's result.
  a_bypass_is_vec: assert property (@(posedge clk) disable iff (!rst_n)
                                    ex_bypass_valid |-> ex_sparrow);
  // An instruction is at most one of the three kinds.
  a_one_kind: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({is_vec, is_scr_wr, is_scr_rd}));
endmodule
