// sparrow_ref_pkg: behavioural reference of SPARROW for the testbenches.
//
// Written with plain integer arithmetic (multiplication with '*', shifts
// on 64-bit values, explicit comparisons) and independently of the RTL's
// structure, so that a testbench can compare the RTL against it.  Also
// holds an instruction encoder for the encoding the RTL decodes.
package sparrow_ref_pkg;
  import sparrow_pkg::*;

  function automatic longint sx(input longint v, input int bits, input bit sgn);
    longint m;
    m = (64'sd1 <<< bits) - 1;
    v = v & m;
    if (sgn && v[bits-1]) v = v - (64'sd1 <<< bits);
    return v;
  endfunction

  function automatic longint sat8(input longint v, input bit sgn);
    longint lo, hi;
    lo = sgn ? -128 : 0;
    hi = sgn ?  127 : 255;
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic logic [7:0] ref_imm(input logic [4:0] code);
    int k;
    int pw;
    k  = int'(code[2:0]);
    pw = 1;
    repeat (k) pw = pw * 2;
    case (code[4:3])
      2'd0: return 8'(pw);
      2'd1: return 8'(0 - pw);
      2'd2: return 8'(pw - 1);
      default: return 8'(k);
    endcase
  endfunction

  // One lane: exact value first, then saturation or truncation to 16 bits.
  function automatic logic [15:0] ref_lane(input logic [7:0] a, input logic [7:0] b,
                                           input op1_e op, input bit sgn, input bit sat);
    longint av, bv, sb, v;
    av = sx(longint'(a), 8, sgn);
    bv = sx(longint'(b), 8, sgn);
    sb = sx(longint'(b), 8, 1'b1);
    case (op)
      OP1_ADD:  v = av + bv;
      OP1_SUB:  v = av - bv;
      OP1_MUL:  v = av * bv;
      OP1_MAX:  v = (av >= bv) ? av : bv;
      OP1_MIN:  v = (av <= bv) ? av : bv;
      OP1_SHFT: if (sb >= 0) v = av * (64'sd1 <<< ((sb > 40) ? 40 : sb));
                else         v = av >>> ((-sb > 60) ? 60 : -sb);
      OP1_MOVB: v = bv;
      OP1_AND:  v = av & bv;
      OP1_OR:   v = av | bv;
      OP1_XOR:  v = av ^ bv;
      OP1_NAND: v = ~(av & bv);
      OP1_NOR:  v = ~(av | bv);
      OP1_XNOR: v = ~(av ^ bv);
      default:  v = av;
    endcase
    if (sat) v = sat8(v, sgn);
    return 16'(v);
  endfunction

  typedef logic [3:0][15:0] ivec_t;

  function automatic logic [7:0] byte_of(input logic [31:0] w, input int i);
    return w[8*i +: 8];
  endfunction

  // Stage 1 including swizzle, immediate and mask.
  function automatic ivec_t ref_stage1(input logic [31:0] op1, input logic [31:0] op2,
                                       input ctrl_t c, input scr_t s);
    ivec_t r;
    for (int i = 0; i < 4; i++) begin
      logic [7:0] a, b;
      int sa, sbi;
      sa  = int'(s.swz_a[2*i +: 2]);
      sbi = int'(s.swz_b[2*i +: 2]);
      a = (c.op1 == OP1_NOP) ? byte_of(op1, i) : byte_of(op1, sa);
      b = c.use_imm ? ref_imm(c.imm_code) : byte_of(op2, sbi);
      if (s.mask[i]) r[i] = ref_lane(a, b, c.op1, c.is_signed, c.sat1);
      else if (s.mask_sel) r[i] = 16'(sx(longint'(byte_of(op1, i)), 8, c.is_signed));
      else r[i] = 16'd0;
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_stage2(input ivec_t v, input op2_e op, input bit sgn, input bit sat);
    longint e[4];
    longint acc;
    for (int i = 0; i < 4; i++) e[i] = sx(longint'(v[i]), 16, sgn);
    if (op == OP2_NOP) return {v[3][7:0], v[2][7:0], v[1][7:0], v[0][7:0]};
    acc = e[0];
    for (int i = 1; i < 4; i++)
      case (op)
        OP2_SUM: acc = acc + e[i];
        OP2_MAX: acc = (e[i] > acc) ? e[i] : acc;
        OP2_MIN: acc = (e[i] < acc) ? e[i] : acc;
        default: acc = acc ^ e[i];
      endcase
    if (sat) acc = sat8(acc, sgn);
    return 32'(acc);
  endfunction

  function automatic logic [31:0] ref_exec(input logic [31:0] op1, input logic [31:0] op2,
                                           input ctrl_t c, input scr_t s);
    return ref_stage2(ref_stage1(op1, op2, c, s), c.op2, c.is_signed, c.sat2);
  endfunction

  // Instruction encoder (rd, rs1 register numbers; rs2 or immediate code).
  function automatic logic [31:0] enc_vec(input ctrl_t c, input logic [4:0] rd, input logic [4:0] rs1);
    logic [31:0] w;
    w = '0;
    w[31:30] = 2'b10;
    w[29:25] = rd;
    w[24:19] = {4'b1011, c.is_signed, c.sat1};
    w[18:14] = rs1;
    w[13]    = c.use_imm;
    w[12:9]  = 4'(c.op1);
    w[8:6]   = 3'(c.op2);
    w[5]     = c.sat2;
    w[4:0]   = c.imm_code;
    return w;
  endfunction

  function automatic logic [31:0] enc_wrasr(input logic [4:0] asr, input logic [4:0] rs1);
    return {2'b10, asr, 6'h30, rs1, 1'b1, 13'd0};
  endfunction

  function automatic logic [31:0] enc_rdasr(input logic [4:0] asr, input logic [4:0] rd);
    return {2'b10, rd, 6'h28, asr, 14'd0};
  endfunction

  function automatic ctrl_t rand_ctrl();
    ctrl_t c;
    c.op1       = op1_e'($urandom_range(0, 13));
    c.op2       = op2_e'($urandom_range(0, 4));
    c.is_signed = 1'($urandom);
    c.sat1      = 1'($urandom);
    c.sat2      = 1'($urandom);
    c.use_imm   = 1'($urandom);
    c.imm_code  = 5'($urandom);
    return c;
  endfunction

  function automatic scr_t rand_scr();
    scr_t s;
    s = scr_t'($urandom);
    s.reserved = '0;
    return s;
  endfunction

  // Mostly corner values, sometimes random.
  function automatic logic [31:0] rand_word();
    logic [31:0] w;
    for (int i = 0; i < 4; i++)
      case ($urandom_range(0, 5))
        0: w[8*i +: 8] = 8'h00;
        1: w[8*i +: 8] = 8'hFF;
        2: w[8*i +: 8] = 8'h80;
        3: w[8*i +: 8] = 8'h7F;
        default: w[8*i +: 8] = 8'($urandom);
      endcase
    return w;
  endfunction
endpackage
