// tb_clip7a_latch: self-checking test of the element address latch: capture
// on ld, hold otherwise, low 12 bits only.
module tb_clip7a_latch;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, ld = 0;
  logic [W-1:0] abus = 0;
  logic [11:0] addr, exp_a;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7a_latch dut (.clk, .rst, .ld, .abus, .addr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_a = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      ld = 1'($urandom); abus = 16'($urandom);
      @(posedge clk);
      if (ld) exp_a = abus[11:0];
      #1;
      checks++;
      if (addr !== exp_a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
