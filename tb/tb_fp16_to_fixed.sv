// tb_fp16_to_fixed: checks the fp16 -> unsigned Q6.10 conversion against
// floor(|x| * 1024) saturated to 16 bits, over every fp16 code.
module tb_fp16_to_fixed;
  import tb_spa_ref::*;
  logic [15:0] x, y;
  int checks = 0, failures = 0;

  fp16_to_fixed #(.INT_W(6), .FRAC_W(10)) dut (.x, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 65536; n++) begin
      x = 16'(n);
      #1;
      checks++;
      if (int'(y) != to_fix(x)) begin
        failures++;
        if (failures < 10) $display("x=%h y=%0d expected %0d", x, y, to_fix(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
