// sparrow_stage1: SPARROW stage 1, the two-operand SIMD stage.
//
// Both 32-bit source registers are split into four 8-bit components and
// passed through the swizzling network, using the selects held in %scr.
// When the instruction carries an immediate, the second operand is
// instead the expanded immediate replicated in all components.  Four lane
// ALUs then work in parallel and produce the 16-bit intermediate vector.
// Finally the mask from %scr is applied: a lane whose mask bit is 0 gets,
// depending on the mask select bit, either 0 or the original (unswizzled)
// component of the first source, extended to 16 bits.  With a stage-1 nop
// the lanes carry the first source without swizzling, still masked.
//
// All of this follows the SPARROW description and its block diagram.
// This design's choices: the masked original component is extended
// according to the instruction's signedness; the immediate is inserted
// after swizzling (a replicated constant is unaffected by it anyway).
// Purely combinational; the caller registers the output.
module sparrow_stage1
  import sparrow_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic [31:0]             op1,
  input  logic [31:0]             op2,
  input  ctrl_t                   ctrl,
  input  scr_t                    scr,
  output logic [LANES-1:0][15:0]  c
);
  logic [LANES-1:0][7:0] a_raw, b_raw, a_swz, b_swz, a_op, b_op;
  logic [LANES-1:0][15:0] y;
  logic [7:0] imm;

  assign a_raw = op1;
  assign b_raw = op2;

  sparrow_swizzle #(.LANES(LANES)) u_swz_a (.vin(a_raw), .sel(scr.swz_a), .vout(a_swz));
  sparrow_swizzle #(.LANES(LANES)) u_swz_b (.vin(b_raw), .sel(scr.swz_b), .vout(b_swz));
  sparrow_imm u_imm (.code(ctrl.imm_code), .value(imm));

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      a_op[i] = (ctrl.op1 == OP1_NOP) ? a_raw[i] : a_swz[i];
      b_op[i] = ctrl.use_imm ? imm : b_swz[i];
    end
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    sparrow_lane u_lane (
      .a(a_op[i]), .b(b_op[i]), .op(ctrl.op1), .is_signed(ctrl.is_signed),
      .sat(ctrl.sat1), .y(y[i])
    );
    assign c[i] = scr.mask[i] ? y[i]
                : (scr.mask_sel ? ext8(a_raw[i], ctrl.is_signed) : 16'd0);
  end
endmodule
