// tb_lut_index: checks the table-address unit for the tanh (step 0.01,
// 512 entries) and atanh (step 0.005, 256 entries) configurations against
// round(x * scale / 1024) clamped to the table, over every input.
module tb_lut_index;
  import tb_spa_ref::*;
  logic [15:0] x;
  logic [8:0]  it;
  logic [7:0]  ia;
  int checks = 0, failures = 0;

  lut_index #(.X_W(16), .FRAC_W(10), .SCALE(100), .DEPTH(512)) dut_t (.x, .idx(it));
  lut_index #(.X_W(16), .FRAC_W(10), .SCALE(200), .DEPTH(256)) dut_a (.x, .idx(ia));

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
      checks += 2;
      if (int'(it) != lut_idx(n, 100, 512)) begin
        failures++;
        if (failures < 10) $display("tanh idx x=%0d got %0d exp %0d", n, it, lut_idx(n, 100, 512));
      end
      if (int'(ia) != lut_idx(n, 200, 256)) begin
        failures++;
        if (failures < 10) $display("atanh idx x=%0d got %0d exp %0d", n, ia, lut_idx(n, 200, 256));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
