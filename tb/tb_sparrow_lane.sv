// tb_sparrow_lane: every stage-1 operation, signed and unsigned, with and
// without saturation, on corner operands and random ones, against the
// reference model.
module tb_sparrow_lane;
  import sparrow_pkg::*;
  import sparrow_ref_pkg::*;
  logic [7:0]  a, b;
  op1_e        op;
  logic        is_signed, sat;
  logic [15:0] y;
  int checks = 0, failures = 0;
  logic [7:0] corners [8] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF, 8'h08, 8'hF8, 8'h10};

  sparrow_lane dut (.a(a), .b(b), .op(op), .is_signed(is_signed), .sat(sat), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1(input logic [7:0] xa, input logic [7:0] xb, input op1_e o,
                        input bit s, input bit t);
    logic [15:0] ex;
    a = xa; b = xb; op = o; is_signed = s; sat = t;
    #1;
    ex = ref_lane(xa, xb, o, s, t);
    checks++;
    if (y !== ex) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%s s=%0d sat=%0d a=%h b=%h y=%h exp=%h", o.name(), s, t, xa, xb, y, ex);
    end
  endtask

  initial begin
    for (int o = 0; o <= 13; o++)
      for (int s = 0; s < 2; s++)
        for (int t = 0; t < 2; t++) begin
          foreach (corners[i])
            foreach (corners[j]) check1(corners[i], corners[j], op1_e'(o), 1'(s), 1'(t));
          repeat (300) check1(8'($urandom), 8'($urandom), op1_e'(o), 1'(s), 1'(t));
        end
    // every shift amount
    for (int k = 0; k < 256; k++) begin
      check1(8'h93, 8'(k), OP1_SHFT, 1'b1, 1'b0);
      check1(8'h93, 8'(k), OP1_SHFT, 1'b0, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
