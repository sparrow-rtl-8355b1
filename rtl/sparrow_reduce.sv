// sparrow_reduce: SPARROW stage 2, reduction and output selection.
//
// Takes the registered 4x16-bit intermediate vector and either reduces it
// to one value (sum, max, min or xor) or passes it on.  The reduction is a
// two-level tree, (a0 op a1) and (a2 op a3) first, then the two partial
// results, as in the block diagram, computed on components extended to
// 32 bits so that no intermediate overflows.  With sat = 1 only the final
// result is clamped to the 8-bit range, so the outcome does not depend on
// the order of the components.  The 32-bit output is then either the
// reduction result (extended to 32 bits) or, for a stage-2 nop, the low
// byte of each component packed back into a register image, unchanged.
//
// The operations, the widened tree and the final-only clamping follow the
// SPARROW description.  This design's choices: components are read as
// signed or unsigned by the instruction's signedness, the clamp range is
// that of an 8-bit component, and xor works on the extended values.
// Purely combinational.
module sparrow_reduce
  import sparrow_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic [LANES-1:0][15:0] a,
  input  op2_e                   op,
  input  logic                   is_signed,
  input  logic                   sat,
  output logic [31:0]            y
);
  logic signed [LANES-1:0][31:0] e;
  logic signed [31:0] l01, l23, r, rc;
  logic [LANES-1:0][7:0] packed_lanes;

  function automatic logic signed [31:0] red2(input op2_e o, input logic signed [31:0] x,
                                              input logic signed [31:0] z);
    unique case (o)
      OP2_SUM: return x + z;
      OP2_MAX: return (x > z) ? x : z;
      OP2_MIN: return (x < z) ? x : z;
      default: return x ^ z;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      e[i]            = ext16(a[i], is_signed);
      packed_lanes[i] = a[i][7:0];
    end
  end

  assign l01 = red2(op, e[0], e[1]);
  assign l23 = red2(op, e[2], e[3]);
  assign r   = red2(op, l01, l23);
  assign rc  = sat ? clamp8(r, is_signed) : r;
  assign y   = (op == OP2_NOP) ? 32'(packed_lanes) : 32'(rc);
endmodule
