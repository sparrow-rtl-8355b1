// sparrow_pkg: types and constants shared by the SPARROW SIMD unit.
//
// SPARROW treats a 32-bit integer register as a vector of four 8-bit
// components.  Stage 1 computes four lane results at 16 bits, stage 2
// optionally reduces them to one value.  This package holds the operation
// codes of both stages, the decoded control bundle, the layout of the
// SPARROW Control Register (%scr), and the instruction encoding.
//
// The list of operations, the %scr field positions (mask in bits 3:0, mask
// select in bit 4, swizzle selects in the next 16 bits) and the 16-bit
// intermediate width follow the SPARROW description.  The numeric operation
// codes, the instruction encoding and the %scr reset value are this design's
// own choices; the description gives none of them.
package sparrow_pkg;

  localparam int unsigned NLANES = 4;   // 8-bit components per 32-bit register
  localparam int unsigned EW     = 8;   // component width
  localparam int unsigned IW     = 16;  // intermediate (extended) component width

  typedef logic [EW-1:0] elem_t;
  typedef logic [IW-1:0] ielem_t;

  // Stage 1: two-operand SIMD operations (13 plus nop).
  typedef enum logic [3:0] {
    OP1_NOP  = 4'd0,
    OP1_ADD  = 4'd1,
    OP1_SUB  = 4'd2,
    OP1_MUL  = 4'd3,
    OP1_MAX  = 4'd4,
    OP1_MIN  = 4'd5,
    OP1_SHFT = 4'd6,   // b >= 0: shift left by b, b < 0: shift right by -b
    OP1_MOVB = 4'd7,
    OP1_AND  = 4'd8,
    OP1_OR   = 4'd9,
    OP1_XOR  = 4'd10,
    OP1_NAND = 4'd11,
    OP1_NOR  = 4'd12,
    OP1_XNOR = 4'd13
  } op1_e;

  // Stage 2: reductions (4 plus nop).
  typedef enum logic [2:0] {
    OP2_NOP = 3'd0,
    OP2_SUM = 3'd1,
    OP2_MAX = 3'd2,
    OP2_MIN = 3'd3,
    OP2_XOR = 3'd4
  } op2_e;

  // Decoded controls of one SPARROW instruction.
  typedef struct packed {
    op1_e       op1;
    op2_e       op2;
    logic       is_signed;
    logic       sat1;       // clamp each lane to 8 bits in stage 1
    logic       sat2;       // clamp the reduction result to 8 bits
    logic       use_imm;    // second operand is the replicated immediate
    logic [4:0] imm_code;   // immediate code carried in the rs2 field
  } ctrl_t;

  // %scr layout, most significant field first.
  typedef struct packed {
    logic [10:0] reserved;   // 31:21, read as zero
    logic [7:0]  swz_b;      // 20:13 swizzle of the second source
    logic [7:0]  swz_a;      // 12:5  swizzle of the first source
    logic        mask_sel;   // 4: masked lane gets 0 (0) or the original first-source component (1)
    logic [3:0]  mask;       // 3:0 lane i operates normally when mask[i] = 1
  } scr_t;

  localparam logic [7:0] SWZ_IDENTITY = 8'b11_10_01_00;
  localparam scr_t SCR_RESET = '{reserved: '0, swz_b: SWZ_IDENTITY, swz_a: SWZ_IDENTITY,
                                 mask_sel: 1'b0, mask: 4'hF};

  // SPARC v8 format 3 (op = 2) opcodes.  SPARROW uses the four unused op3
  // values 0x2C..0x2F: op3[1] = signed, op3[0] = stage-1 saturation.
  localparam logic [1:0] SPARC_OP_ARITH = 2'b10;
  localparam logic [3:0] OP3_VEC_HI     = 4'b1011;     // 0x2C..0x2F
  localparam logic [5:0] OP3_RDASR      = 6'h28;
  localparam logic [5:0] OP3_WRASR      = 6'h30;

  // Clamp a value to the 8-bit signed or unsigned range.
  function automatic logic signed [31:0] clamp8(input logic signed [31:0] v, input logic is_signed);
    logic signed [31:0] lo, hi;
    lo = is_signed ? -32'sd128 : 32'sd0;
    hi = is_signed ?  32'sd127 : 32'sd255;
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  // Extend a 16-bit intermediate component to 32 bits.
  function automatic logic signed [31:0] ext16(input ielem_t v, input logic is_signed);
    return is_signed ? 32'(signed'(v)) : 32'({16'b0, v});
  endfunction

  // Extend an 8-bit component to 16 bits.
  function automatic ielem_t ext8(input elem_t v, input logic is_signed);
    return is_signed ? 16'(signed'(v)) : {8'b0, v};
  endfunction

endpackage
