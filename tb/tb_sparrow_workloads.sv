// tb_sparrow_workloads: runs the inner loops of the evaluated programs on
// the SPARROW unit at its default parameters and compares the outputs
// with plain integer implementations.
//
// The testbench plays the processor: it keeps the data in arrays, packs
// four 8-bit values into a register word, issues one SPARROW instruction
// at a time, takes the result from ex_result (stage-2 nop, same cycle) or
// from me_result one cycle later (reduction), and does the scalar work
// (32-bit accumulation, final shift) itself.  It also checks those two
// latencies.  Programs and sizes:
//   matrix multiplication 120x120, signed 8-bit, mul + sum reduction;
//   grayscale 256x256 RGB pixels, unsigned mul + sum;
//   3x3 edge-detection filter on a 256x256 image, mask hides lane 3;
//   2nd-degree polynomial over 2048 values with saturating arithmetic;
//   ReLU and 2x2 max pooling on a 32x32 map (CIFAR-10 network layers).
module tb_sparrow_workloads;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;

  localparam int MM_N  = 120;
  localparam int IMG   = 256;
  localparam int POLY  = 2048;
  localparam int FMAP  = 32;
  localparam logic [4:0] ASR = 5'd20;

  logic clk = 0, rst_n = 0, hold = 0;
  logic ex_valid = 0;
  logic [31:0] ex_inst = 0, ex_op1 = 0, ex_op2 = 0;
  logic ex_sparrow, ex_bypass_valid, ex_scr_read, me_valid;
  logic [31:0] ex_result, ex_scr_rdata, me_result;

  sparrow dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_instr = 0, n_bypass = 0, n_reduce = 0;

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint ex, input string what);
    checks++;
    if (got != ex) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, ex);
    end
  endtask

  // Issue one vector instruction and return its final result.  A stage-2
  // nop result must be ready in the execute cycle, a reduction result in
  // the following cycle.
  task automatic vop(input op1_e o1, input op2_e o2, input bit sgn, input bit s1, input bit s2,
                     input bit imm, input logic [4:0] code, input logic [31:0] a,
                     input logic [31:0] b, output logic [31:0] y);
    ctrl_t c;
    c = '{op1: o1, op2: o2, is_signed: sgn, sat1: s1, sat2: s2, use_imm: imm, imm_code: code};
    @(negedge clk);
    ex_valid = 1; ex_inst = enc_vec(c, 5'd1, 5'd2); ex_op1 = a; ex_op2 = b;
    #1;
    n_instr++;
    if (o2 == OP2_NOP) begin
      if (!ex_bypass_valid) begin failures++; $display("FAIL no bypass in EX"); end
      y = ex_result;
      n_bypass++;
      @(negedge clk); ex_valid = 0;
    end else begin
      if (ex_bypass_valid) begin failures++; $display("FAIL reduction flagged as bypass"); end
      @(negedge clk); ex_valid = 0; #1;
      if (!me_valid) begin failures++; $display("FAIL reduction not in ME one cycle later"); end
      y = me_result;
      n_reduce++;
    end
  endtask

  task automatic write_scr(input logic [31:0] v);
    @(negedge clk);
    ex_valid = 1; ex_inst = enc_wrasr(ASR, 5'd1); ex_op1 = v; ex_op2 = 0;
    @(negedge clk); ex_valid = 0;
  endtask

  function automatic logic [31:0] pack4(input int b0, input int b1, input int b2, input int b3);
    return {8'(b3), 8'(b2), 8'(b1), 8'(b0)};
  endfunction

  function automatic int s8(input logic [31:0] w, input int i);
    return int'($signed(w[8*i +: 8]));
  endfunction

  function automatic int sat_s8(input int v);
    return (v < -128) ? -128 : (v > 127) ? 127 : v;
  endfunction

  // ---------------------------------------------------------------------
  byte A [MM_N][MM_N];
  byte Bt[MM_N][MM_N];   // B transposed, so a column is contiguous
  byte unsigned img [IMG][IMG];
  byte unsigned rgb [IMG][IMG][3];

  task automatic run_matmul();
    longint t0;
    int bad;
    bad = 0;
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        A[i][j]  = byte'($urandom);
        Bt[i][j] = byte'($urandom);
      end
    t0 = cycles;
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        int acc, ref_acc;
        acc = 0; ref_acc = 0;
        for (int k = 0; k < MM_N; k += 4) begin
          logic [31:0] y;
          vop(OP1_MUL, OP2_SUM, 1, 0, 0, 0, 5'd0,
              pack4(A[i][k], A[i][k+1], A[i][k+2], A[i][k+3]),
              pack4(Bt[j][k], Bt[j][k+1], Bt[j][k+2], Bt[j][k+3]), y);
          acc += int'($signed(y));
        end
        for (int k = 0; k < MM_N; k++) ref_acc += int'(A[i][k]) * int'(Bt[j][k]);
        if (acc != ref_acc) bad++;
        checks++;
      end
    failures += bad;
    $display("matmul %0dx%0d: %0d cycles, %0d wrong elements", MM_N, MM_N, cycles - t0, bad);
  endtask

  task automatic run_grayscale();
    longint t0;
    int bad;
    bad = 0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        for (int k = 0; k < 3; k++) rgb[r][c][k] = byte'($urandom);
    t0 = cycles;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        logic [31:0] y;
        int g, ref_g;
        vop(OP1_MUL, OP2_SUM, 0, 0, 0, 0, 5'd0,
            pack4(rgb[r][c][0], rgb[r][c][1], rgb[r][c][2], 0), pack4(77, 150, 29, 0), y);
        g = int'(y) >> 8;
        ref_g = (77 * rgb[r][c][0] + 150 * rgb[r][c][1] + 29 * rgb[r][c][2]) / 256;
        img[r][c] = byte'(g);
        if (g != ref_g) bad++;
        checks++;
      end
    failures += bad;
    $display("grayscale %0dx%0d: %0d cycles, %0d wrong pixels", IMG, IMG, cycles - t0, bad);
  endtask

  task automatic run_filter();
    longint t0;
    int bad;
    scr_t s;
    bad = 0;
    // lane 3 masked to zero: three pixels per row of the 3x3 window
    s = SCR_RESET; s.mask = 4'b0111; s.mask_sel = 1'b0;
    write_scr(32'(s));
    t0 = cycles;
    for (int r = 1; r < IMG - 1; r++)
      for (int c = 1; c < IMG - 1; c++) begin
        int acc, ref_acc;
        acc = 0; ref_acc = 0;
        for (int dr = -1; dr <= 1; dr++) begin
          logic [31:0] y;
          int p0, p1, p2;
          p0 = img[r+dr][c-1] >> 1; p1 = img[r+dr][c] >> 1; p2 = img[r+dr][c+1] >> 1;
          vop(OP1_MUL, OP2_SUM, 1, 0, 0, 0, 5'd0, pack4(p0, p1, p2, 8'h55),
              (dr == 0) ? pack4(-1, 8, -1, 3) : pack4(-1, -1, -1, 3), y);
          acc += int'($signed(y));
          ref_acc += (dr == 0) ? (8 * p1 - p0 - p2) : (-p0 - p1 - p2);
        end
        if (acc != ref_acc) bad++;
        checks++;
      end
    write_scr(32'(SCR_RESET));
    failures += bad;
    $display("filter %0dx%0d: %0d cycles, %0d wrong pixels", IMG, IMG, cycles - t0, bad);
  endtask

  // y = ((2x - 4) x) + 7 with every step saturated to signed 8 bits,
  // a = 2, b = -4, c = 7 as immediates (codes 00_001, 01_010, 11_111)
  task automatic run_polynomial();
    longint t0;
    int bad;
    bad = 0;
    t0 = cycles;
    for (int n = 0; n < POLY; n += 4) begin
      logic [31:0] x, t;
      x = $urandom;
      vop(OP1_MUL, OP2_NOP, 1, 1, 0, 1, 5'b00001, x, 0, t);
      vop(OP1_ADD, OP2_NOP, 1, 1, 0, 1, 5'b01010, t, 0, t);
      vop(OP1_MUL, OP2_NOP, 1, 1, 0, 0, 5'd0, t, x, t);
      vop(OP1_ADD, OP2_NOP, 1, 1, 0, 1, 5'b11111, t, 0, t);
      for (int i = 0; i < 4; i++) begin
        int xi, r;
        xi = s8(x, i);
        r = sat_s8(sat_s8(sat_s8(sat_s8(2 * xi) - 4) * xi) + 7);
        if (s8(t, i) != r) bad++;
        checks++;
      end
    end
    failures += bad;
    $display("polynomial %0d values: %0d cycles, %0d wrong", POLY, cycles - t0, bad);
  endtask

  // ReLU as max with the immediate 0 (code 10_000), then 2x2 max pooling as
  // a max reduction over the four values of each window.
  task automatic run_relu_pool();
    byte fm [FMAP][FMAP];
    byte rl [FMAP][FMAP];
    int bad;
    bad = 0;
    for (int r = 0; r < FMAP; r++)
      for (int c = 0; c < FMAP; c++) fm[r][c] = byte'($urandom);
    for (int r = 0; r < FMAP; r++)
      for (int c = 0; c < FMAP; c += 4) begin
        logic [31:0] y;
        vop(OP1_MAX, OP2_NOP, 1, 0, 0, 1, 5'b10000,
            pack4(fm[r][c], fm[r][c+1], fm[r][c+2], fm[r][c+3]), 0, y);
        for (int i = 0; i < 4; i++) begin
          rl[r][c+i] = byte'(s8(y, i));
          if (s8(y, i) != ((fm[r][c+i] > 0) ? int'(fm[r][c+i]) : 0)) bad++;
          checks++;
        end
      end
    for (int r = 0; r < FMAP; r += 2)
      for (int c = 0; c < FMAP; c += 2) begin
        logic [31:0] y;
        int m;
        vop(OP1_NOP, OP2_MAX, 1, 0, 0, 0, 5'd0,
            pack4(rl[r][c], rl[r][c+1], rl[r+1][c], rl[r+1][c+1]), 0, y);
        m = rl[r][c];
        if (rl[r][c+1] > m) m = rl[r][c+1];
        if (rl[r+1][c] > m) m = rl[r+1][c];
        if (rl[r+1][c+1] > m) m = rl[r+1][c+1];
        if (int'($signed(y)) != m) bad++;
        checks++;
      end
    failures += bad;
    $display("relu + 2x2 max pool %0dx%0d: %0d wrong", FMAP, FMAP, bad);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_matmul();
    run_grayscale();
    run_filter();
    run_polynomial();
    run_relu_pool();
    chk(n_bypass > 0, 1, "bypassed results seen");
    chk(n_reduce > 0, 1, "reduction results seen");
    $display("instructions=%0d bypassed=%0d reductions=%0d", n_instr, n_bypass, n_reduce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
