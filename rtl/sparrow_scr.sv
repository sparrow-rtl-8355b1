// sparrow_scr: the SPARROW Control Register (%scr).
//
// Masking and swizzling are not encoded in the vector instructions; they
// are set up beforehand in this 32-bit special register, written and read
// with the SPARC wr/rd special-register instructions.  Field layout
// (from the SPARROW description): bits 3:0 lane mask, bit 4 mask select,
// bits 12:5 swizzle of the first source, bits 20:13 swizzle of the second
// source; bits 31:21 are reserved, ignored on write and read as zero.
//
// Timing: a write with we = 1 and hold = 0 takes effect at the next clock
// edge, so the very next instruction sees the new value.  Reset
// (synchronous, active low) gives all lanes enabled, mask select 0 and the
// identity swizzle; that reset value is this design's choice.
module sparrow_scr
  import sparrow_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output scr_t        scr
);
  scr_t q;

  always_ff @(posedge clk) begin
    if (!rst_n)          q <= SCR_RESET;
    else if (we && !hold) begin
      q          <= scr_t'(wdata);
      q.reserved <= '0;
    end
  end

  assign scr   = q;
  assign rdata = 32'(q);
endmodule
