// tb_tanh_lut: reads every entry of the tanh table and compares it with
// tanh(k*0.01) computed from exponentials and rounded to fp16; also checks
// the one-cycle read latency.
module tb_tanh_lut;
  import tb_spa_ref::*;
  logic        clk = 0;
  logic [8:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  tanh_lut #(.DEPTH(512)) dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 512; k++) begin
      @(negedge clk) addr = 9'(k);
      @(negedge clk);
      checks++;
      if (data !== tanh_tab(k)) begin
        failures++;
        if (failures < 10) $display("tanh[%0d] = %h expected %h", k, data, tanh_tab(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
