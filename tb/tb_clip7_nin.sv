// tb_clip7_nin: self-checking test of the N_IN register: masked capture of
// the eight propagation inputs with global and local masks, and nin_any.
module tb_clip7_nin;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, load = 0, mask_local = 0, nin_any;
  logic [7:0] mg = 0, mc = 0, pin = 0, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_nin dut (.clk, .rst, .load, .mask_local, .mask_global(mg), .mask_cond(mc),
                 .prop_in(pin), .q, .nin_any);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      load = 1'($urandom); mask_local = 1'($urandom);
      mg = 8'($urandom); mc = 8'($urandom); pin = 8'($urandom);
      if (i % 5 == 0) pin = 0;
      @(posedge clk);
      if (load) exp_q = pin & (mask_local ? mc : mg);
      #1;
      checks++;
      if (q !== exp_q || nin_any !== (exp_q != 0)) begin
        failures++;
        if (failures < 10) $display("nin mismatch q=%h exp=%h", q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
