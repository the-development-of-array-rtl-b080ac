// tb_clip7a_edge: self-checking test of an edge register.
module tb_clip7a_edge;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, ld = 0;
  logic [W-1:0] dbus = 0;
  logic [2:0] q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7a_edge dut (.clk, .rst, .ld, .dbus, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      ld = 1'($urandom); dbus = 16'($urandom);
      @(posedge clk);
      if (ld) exp_q = dbus[2:0];
      #1;
      checks++;
      if (q !== exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
