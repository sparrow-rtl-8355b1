// sparrow_imm: immediate expander.
//
// SPARROW instructions have no room for a normal SPARC immediate, so a
// 5-bit code in the rs2 field selects one of 32 constants that are common
// in inference code: zero, one, powers of two, their negatives and powers
// of two minus one.  The value is later replicated into all four
// components.  The code table is this design's choice (the description
// names the families of values but not the table), and one table serves
// every operation:
//
//   code[4:3] = 00 : 2^k            (1, 2, 4, ... 128)
//   code[4:3] = 01 : -(2^k)         (-1, -2, ... -128)
//   code[4:3] = 10 : 2^k - 1        (0, 1, 3, 7, ... 127)
//   code[4:3] = 11 : k              (0 .. 7, e.g. shift amounts)
//
// with k = code[2:0].  Purely combinational.
module sparrow_imm (
  input  logic [4:0] code,
  output logic [7:0] value
);
  logic [2:0] k;
  logic [7:0] pow2;

  assign k    = code[2:0];
  assign pow2 = 8'd1 << k;

  always_comb begin
    unique case (code[4:3])
      2'b00:   value = pow2;
      2'b01:   value = 8'(-pow2);
      2'b10:   value = pow2 - 8'd1;
      default: value = {5'b0, k};
    endcase
  end
endmodule
