// tb_sparrow_swizzle: random source words and selects; every output
// position must hold the selected input byte.
module tb_sparrow_swizzle;
  logic [3:0][7:0] vin, vout;
  logic [3:0][1:0] sel;
  int checks = 0, failures = 0;

  sparrow_swizzle #(.LANES(4)) dut (.vin(vin), .sel(sel), .vout(vout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] w;
      w   = $urandom;
      vin = w;
      sel = 8'(n < 256 ? n : $urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        int s;
        s = int'(sel[i]);
        checks++;
        if (vout[i] !== w[8*s +: 8]) begin
          failures++;
          $display("FAIL vin=%h sel=%b pos=%0d got=%h", w, sel, i, vout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
