// tb_sparrow_scr: reset value, writes (reserved bits dropped), hold and
// the decoded fields of the control register.
module tb_sparrow_scr;
  import sparrow_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0, we = 0;
  logic [31:0] wdata = 0, rdata;
  scr_t scr;
  int checks = 0, failures = 0;
  logic [31:0] model;

  sparrow_scr dut (.clk(clk), .rst_n(rst_n), .hold(hold), .we(we), .wdata(wdata), .rdata(rdata), .scr(scr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] ex, input string what);
    checks++;
    if (got !== ex) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, ex);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // all lanes on, select 0, identity swizzles 0xE4 in 12:5 and 20:13
    chk(rdata, 32'h001C_9C8F, "reset value");
    model = 32'h001C_9C8F;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1'($urandom); hold = ($urandom_range(0, 3) == 0); wdata = $urandom;
      @(posedge clk); #1;
      if (we && !hold) model = wdata & 32'h001F_FFFF;
      chk(rdata, model, "register");
      chk({28'b0, scr.mask}, {28'b0, model[3:0]}, "mask");
      chk({31'b0, scr.mask_sel}, {31'b0, model[4]}, "mask_sel");
      chk({24'b0, scr.swz_a}, {24'b0, model[12:5]}, "swz_a");
      chk({24'b0, scr.swz_b}, {24'b0, model[20:13]}, "swz_b");
    end
    @(negedge clk); rst_n = 0; we = 0;
    @(posedge clk); #1;
    chk(rdata, 32'h001C_9C8F, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
