// sparrow_mul8: single-cycle 8x8-bit shift-and-add multiplier.
//
// SPARROW fits a four-lane 8-bit multiplication into one pipeline stage by
// writing the product out explicitly as the sum of eight shifted copies of
// the multiplicand, one per multiplier bit, instead of instantiating a
// general multiplier.  For signed operands the multiplicand is sign
// extended and the partial product of bit 7 (weight -128) is subtracted;
// for unsigned operands all partial products are added.  The 16-bit
// result is the exact product in both cases (signed range -16256..16384,
// unsigned 0..65025).  Combinational; the adder structure is this
// design's own, the shift-and-add principle follows the description.
module sparrow_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic        is_signed,
  output logic [15:0] p
);
  logic [15:0] ae;
  logic [7:0][15:0] pp;

  assign ae = is_signed ? 16'(signed'(a)) : {8'b0, a};

  always_comb begin
    for (int i = 0; i < 8; i++) pp[i] = b[i] ? (ae << i) : 16'd0;
    p = pp[0] + pp[1] + pp[2] + pp[3] + pp[4] + pp[5] + pp[6];
    p = is_signed ? (p - pp[7]) : (p + pp[7]);
  end
endmodule
