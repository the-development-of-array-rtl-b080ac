// tb_clip7_dreg: self-checking test of the D-register: chain shift, gated
// load from the bus, hold.
module tb_clip7_dreg;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, load_en = 0;
  logic [1:0] op = 0;
  logic [W-1:0] bus = 0, din = 0, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_dreg dut (.clk, .rst, .op(d_op_e'(op)), .load_en, .bus, .data_in(din), .q);

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
      op = 2'($urandom); load_en = 1'($urandom); bus = 16'($urandom); din = 16'($urandom);
      @(posedge clk);
      if (op == 2'd2) exp_q = din;
      else if (op == 2'd1 && load_en) exp_q = bus;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("dreg mismatch q=%h exp=%h", q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
