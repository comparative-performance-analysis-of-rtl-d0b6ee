// tb_atanh_lut: reads every entry of the atanh table and compares it with
// atanh(min(k*0.005, 0.999)) computed from logarithms and rounded to fp16; also checks
// the one-cycle read latency.
module tb_atanh_lut;
  import tb_spa_ref::*;
  logic        clk = 0;
  logic [7:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  atanh_lut #(.DEPTH(256)) dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      @(negedge clk) addr = 8'(k);
      @(negedge clk);
      checks++;
      if (data !== atanh_tab(k)) begin
        failures++;
        if (failures < 10) $display("atanh[%0d] = %h expected %h", k, data, atanh_tab(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
