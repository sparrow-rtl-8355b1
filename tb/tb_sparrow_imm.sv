// tb_sparrow_imm: checks all 32 immediate codes against a hand-written
// list of the expected constants.
module tb_sparrow_imm;
  logic [4:0] code;
  logic [7:0] value;
  int checks = 0, failures = 0;
  logic [7:0] expv [32] = '{
    8'd1, 8'd2, 8'd4, 8'd8, 8'd16, 8'd32, 8'd64, 8'd128,
    8'hFF, 8'hFE, 8'hFC, 8'hF8, 8'hF0, 8'hE0, 8'hC0, 8'h80,
    8'd0, 8'd1, 8'd3, 8'd7, 8'd15, 8'd31, 8'd63, 8'd127,
    8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7};

  sparrow_imm dut (.code(code), .value(value));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      code = 5'(i);
      #1;
      checks++;
      if (value !== expv[i]) begin
        failures++;
        $display("FAIL code=%0d value=%h expected=%h", i, value, expv[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
