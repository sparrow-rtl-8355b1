// sparrow_swizzle: one half of the swizzling network of stage 1.
//
// Output position i takes input component sel[2i+1:2i], so any
// reordering or replication of the four 8-bit components of a source
// register can be expressed (the identity is sel = 8'b11_10_01_00).
// The selects come from %scr, eight bits per source register, as the
// SPARROW description specifies.  Purely combinational: one 4:1 byte
// multiplexer per position.
module sparrow_swizzle #(
  parameter int unsigned LANES = 4
) (
  input  logic [LANES-1:0][7:0]         vin,
  input  logic [LANES-1:0][$clog2(LANES)-1:0] sel,
  output logic [LANES-1:0][7:0]         vout
);
  always_comb begin
    for (int i = 0; i < LANES; i++) vout[i] = vin[sel[i]];
  end
endmodule
