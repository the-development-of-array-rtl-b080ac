// tb_clip7_nout: self-checking test of the N_OUT propagation register.
module tb_clip7_nout;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, load = 0, pout, exp_p;
  logic [W-1:0] bus = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_nout dut (.clk, .rst, .load, .bus, .prop_out(pout));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_p = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      load = 1'($urandom); bus = 16'($urandom);
      @(posedge clk);
      if (load) exp_p = bus[0];
      #1;
      checks++;
      if (pout !== exp_p) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
