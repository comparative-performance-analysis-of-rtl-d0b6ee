// tb_fp16_add: checks the fp16 adder against exact double-precision
// sums rounded to nearest-even, on random operands across the normal
// range plus signs, zeros and saturation.
module tb_fp16_add;
  import tb_spa_ref::*;
  logic [15:0] a, b, y, e;
  int checks = 0, failures = 0;

  fp16_add dut (.a, .b, .y);

  task automatic check_one(logic [15:0] aa, logic [15:0] bb);
    a = aa; b = bb;
    #1;
    e = add(aa, bb);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("add %h + %h = %h, expected %h", aa, bb, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'h3C00, 16'h3C00);   // 1+1
    check_one(16'h4000, 16'hC200);   // 2-3
    check_one(16'h0000, 16'h4500);   // 0+x
    check_one(16'h4500, 16'hC500);   // exact cancellation
    check_one(16'h7BFF, 16'h7BFF);   // saturate
    check_one(16'h3C00, 16'h1000);   // far apart
    check_one(16'h3C01, 16'hBC00);   // heavy cancellation
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] ra, rb;
      ra = {1'($urandom), 5'(5 + $urandom % 20), 10'($urandom)};
      rb = {1'($urandom), 5'(5 + $urandom % 20), 10'($urandom)};
      check_one(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
