// tb_spa_ram: random writes and reads of the message RAM against an array
// model, including a read of the address being written (old data expected)
// and the one-cycle read latency.
module tb_spa_ram;
  localparam int DEPTH = 9216;
  logic        clk = 0;
  logic        we;
  logic [13:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [DEPTH];
  logic        valid [DEPTH];
  int checks = 0, failures = 0;

  spa_ram #(.DEPTH(DEPTH), .WIDTH(16)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expct;
    logic        chk;
    for (int i = 0; i < DEPTH; i++) valid[i] = 1'b0;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 14'($urandom % DEPTH);
      wdata = 16'($urandom);
      raddr = (n % 7 == 0) ? waddr : 14'($urandom % DEPTH);
      chk   = valid[raddr];
      expct = model[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1'b1; end
      #1;
      if (chk) begin
        checks++;
        if (rdata !== expct) begin
          failures++;
          if (failures < 10) $display("read %0d = %h expected %h", raddr, rdata, expct);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
