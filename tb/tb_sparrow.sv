// tb_sparrow: end-to-end test of the SPARROW unit at its default
// parameters, driven the way the integer pipeline drives it.
//
// The testbench plays the integer pipeline: it keeps a register file,
// issues one instruction per cycle into the execute stage (random SPARROW
// vector instructions, wr %scr and rd %scr), writes results back from the
// memory stage, forwards a stage-1-only result straight from ex_result to
// a dependent next instruction, inserts a one-cycle bubble when the next
// instruction needs a reduction result, and raises hold at random.  A
// second register file, updated only from the reference model, gives the
// expected values.  Every mechanism of the unit is counted and must occur.
module tb_sparrow;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;

  localparam int NINST = 20000;
  localparam logic [4:0] ASR = 5'd20;

  logic clk = 0, rst_n = 0, hold = 0;
  logic ex_valid = 0;
  logic [31:0] ex_inst = 0, ex_op1 = 0, ex_op2 = 0;
  logic ex_sparrow, ex_bypass_valid, ex_scr_read, me_valid;
  logic [31:0] ex_result, ex_scr_rdata, me_result;

  sparrow dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  // mechanism counters
  typedef enum int {M_SWIZZLE, M_MASK_ZERO, M_MASK_ORIG, M_IMM, M_SAT1, M_SAT2, M_SIGNED,
                    M_UNSIGNED, M_S1_NOP, M_BYPASS_FWD, M_INTERLOCK, M_HOLD, M_SCR_WR,
                    M_SCR_RD, M_NUM} mech_e;
  int mech [M_NUM];
  int op1_seen [14];
  int op2_seen [5];

  logic [31:0] dregs [8];   // register file as seen through the DUT
  logic [31:0] rregs [8];   // register file of the reference
  scr_t rscr;

  initial begin
    repeat (20 * NINST) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] ex, input string what);
    checks++;
    if (got !== ex) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s got=%h exp=%h", cycles, what, got, ex);
    end
  endtask

  // state of the instruction now in the memory stage
  typedef struct {
    bit          valid;       // vector instruction
    bit          bypass;      // result was final in EX
    logic [2:0]  rd;
    logic [31:0] exp;
    logic [31:0] ex_val;      // what the DUT offered on ex_result
  } me_t;

  initial begin
    me_t me, cur;
    int issued;
    bit bubble;
    logic [31:0] me_wb, ex_now;
    for (int i = 0; i < 8; i++) begin
      dregs[i] = (i == 0) ? 32'd0 : rand_word();
      rregs[i] = dregs[i];
    end
    rscr = SCR_RESET;
    me = '{default: '0};
    issued = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    while (issued < NINST) begin
      ctrl_t c;
      logic [2:0] rd, rs1, rs2;
      int kind;
      // ---- choose the EX-stage instruction (negedge) ----
      hold = ($urandom_range(0, 9) == 0);
      if (hold) mech[M_HOLD]++;
      if (!hold) begin
        cur = '{default: '0};
        bubble = 0;
        kind = $urandom_range(0, 99);
        rd  = 3'($urandom_range(1, 7));
        rs1 = 3'($urandom_range(1, 7));
        rs2 = 3'($urandom_range(1, 7));
        // A dependent instruction right behind a reduction waits one cycle.
        if (me.valid && !me.bypass && kind >= 12 && (rs1 == me.rd || rs2 == me.rd)) bubble = 1;
        ex_valid = 1'b0;
        if (bubble) begin
          mech[M_INTERLOCK]++;
        end else if (kind < 8) begin
          // wr %scr: value = rs1 xor rs2
          ex_valid = 1'b1;
          ex_inst  = enc_wrasr(ASR, 5'(rs1));
          ex_op1   = rand_scr();
          ex_op2   = 32'($urandom) & 32'h0000_FFFF;
          issued++;
          mech[M_SCR_WR]++;
        end else if (kind < 12) begin
          ex_valid = 1'b1;
          ex_inst  = enc_rdasr(ASR, 5'(rd));
          ex_op1   = $urandom; ex_op2 = $urandom;
          issued++;
          mech[M_SCR_RD]++;
        end else begin
          logic [31:0] a_d, b_d, a_r, b_r;
          c = rand_ctrl();
          // operands through the DUT path: bypass from the previous EX result
          a_d = (me.valid && me.bypass && rs1 == me.rd) ? me.ex_val : dregs[rs1];
          b_d = (me.valid && me.bypass && rs2 == me.rd) ? me.ex_val : dregs[rs2];
          a_r = (me.valid && rs1 == me.rd) ? me.exp : rregs[rs1];
          b_r = (me.valid && rs2 == me.rd) ? me.exp : rregs[rs2];
          if (me.valid && me.bypass && (rs1 == me.rd || (rs2 == me.rd && !c.use_imm))) begin
            mech[M_BYPASS_FWD]++;
            chk(a_d, a_r, "forwarded rs1");
            chk(b_d, b_r, "forwarded rs2");
          end
          ex_valid = 1'b1;
          ex_inst  = enc_vec(c, 5'(rd), 5'(rs1));
          ex_op1   = a_d;
          ex_op2   = b_d;
          cur.valid  = 1;
          cur.bypass = (c.op2 == OP2_NOP);
          cur.rd     = rd;
          cur.exp    = ref_exec(a_r, b_r, c, rscr);
          issued++;
          op1_seen[int'(c.op1)]++;
          op2_seen[int'(c.op2)]++;
          if (c.op1 != OP1_NOP && (rscr.swz_a != SWZ_IDENTITY || (!c.use_imm && rscr.swz_b != SWZ_IDENTITY)))
            mech[M_SWIZZLE]++;
          if (rscr.mask != 4'hF) mech[rscr.mask_sel ? M_MASK_ORIG : M_MASK_ZERO]++;
          if (c.use_imm) mech[M_IMM]++;
          if (c.sat1) mech[M_SAT1]++;
          if (c.sat2 && c.op2 != OP2_NOP) mech[M_SAT2]++;
          mech[c.is_signed ? M_SIGNED : M_UNSIGNED]++;
          if (c.op1 == OP1_NOP) mech[M_S1_NOP]++;
        end
      end
      // ---- check the combinational outputs ----
      #1;
      chk({31'b0, ex_sparrow}, {31'b0, cur.valid && ex_valid}, "ex_sparrow");
      chk({31'b0, ex_bypass_valid}, {31'b0, cur.valid && cur.bypass && ex_valid}, "ex_bypass_valid");
      if (ex_bypass_valid) chk(ex_result, cur.exp, "ex_result (bypass)");
      chk({31'b0, ex_scr_read}, {31'b0, ex_valid && ex_inst[24:19] == 6'h28}, "ex_scr_read");
      if (ex_scr_read) chk(ex_scr_rdata, 32'(rscr), "rd %scr");
      chk({31'b0, me_valid}, {31'b0, me.valid}, "me_valid");
      if (me.valid) chk(me_result, me.exp, "me_result");
      me_wb  = me_result;   // sampled before the edge
      ex_now = ex_result;
      // ---- clock edge: advance the model ----
      @(posedge clk);
      cycles++;
      if (!hold) begin
        if (me.valid) begin
          dregs[me.rd] = me_wb;
          rregs[me.rd] = me.exp;
        end
        if (ex_valid && ex_inst[24:19] == 6'h30) begin
          rscr = scr_t'(ex_op1 ^ ex_op2);
          rscr.reserved = '0;
        end
        if (cur.valid && ex_valid) begin
          cur.ex_val = ex_now;
          me = cur;
        end else begin
          me = '{default: '0};
        end
      end
      @(negedge clk);
    end

    for (int m = 0; m < int'(M_NUM); m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    for (int o = 0; o < 14; o++) begin
      checks++;
      if (op1_seen[o] == 0) begin failures++; $display("FAIL stage-1 op %0d never issued", o); end
    end
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (op2_seen[o] == 0) begin failures++; $display("FAIL stage-2 op %0d never issued", o); end
    end
    $display("instructions=%0d cycles=%0d bypass_fwd=%0d interlocks=%0d holds=%0d swizzle=%0d mask0=%0d maskorig=%0d",
             issued, cycles, mech[M_BYPASS_FWD], mech[M_INTERLOCK], mech[M_HOLD], mech[M_SWIZZLE],
             mech[M_MASK_ZERO], mech[M_MASK_ORIG]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
