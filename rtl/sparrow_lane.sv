// sparrow_lane: one lane of SPARROW stage 1.
//
// Computes one of the thirteen two-operand operations on a pair of 8-bit
// components and returns a 16-bit extended result, so that a following
// reduction keeps the extra precision.  Operands are sign extended when
// is_signed = 1 and zero extended otherwise.  With sat = 1 the result is
// clamped to the 8-bit range (-128..127 signed, 0..255 unsigned) and then
// extended to 16 bits; without it the low 16 bits of the exact result are
// kept.  Purely combinational: the whole lane fits in the execute stage.
//
// The operation list, the 16-bit intermediate and the per-operation
// saturation follow the SPARROW description.  Its own choices: shift takes
// the second component as a signed amount (left for b >= 0, right by -b
// for b < 0, arithmetic when signed); the bitwise operations work on the
// extended operands; OP1_NOP passes the first operand through.
module sparrow_lane
  import sparrow_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  op1_e        op,
  input  logic        is_signed,
  input  logic        sat,
  output logic [15:0] y
);
  logic signed [31:0] ae, be, r;
  logic [15:0] rc;
  logic [15:0] prod;
  logic [7:0]  amt_r;
  logic [4:0]  amt_l;

  sparrow_mul8 u_mul (.a(a), .b(b), .is_signed(is_signed), .p(prod));

  assign ae = is_signed ? 32'(signed'(a)) : 32'({24'b0, a});
  assign be = is_signed ? 32'(signed'(b)) : 32'({24'b0, b});

  // Left shifts beyond 16 leave the low 16 bits zero; capping the amount at
  // 16 keeps the exact value's sign and magnitude class for saturation.
  assign amt_l   = (b > 8'd16) ? 5'd16 : b[4:0];
  assign amt_r   = 8'(-b);

  always_comb begin
    unique case (op)
      OP1_ADD:  r = ae + be;
      OP1_SUB:  r = ae - be;
      OP1_MUL:  r = is_signed ? 32'(signed'(prod)) : 32'({16'b0, prod});
      OP1_MAX:  r = (ae > be) ? ae : be;
      OP1_MIN:  r = (ae < be) ? ae : be;
      OP1_SHFT: r = b[7] ? (ae >>> amt_r) : (ae <<< amt_l);
      OP1_MOVB: r = be;
      OP1_AND:  r = ae & be;
      OP1_OR:   r = ae | be;
      OP1_XOR:  r = ae ^ be;
      OP1_NAND: r = ~(ae & be);
      OP1_NOR:  r = ~(ae | be);
      OP1_XNOR: r = ~(ae ^ be);
      default:  r = ae;
    endcase
  end

  assign rc = 16'(clamp8(r, is_signed));
  assign y  = sat ? rc : r[15:0];
endmodule
