// tb_clip7_cond: self-checking test of the condition register: loads from
// the bus and from the status word, hold, and the activity output for every
// selectable bit.
module tb_clip7_cond;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, act_en = 0, active;
  logic [1:0] op = 0;
  logic [3:0] act_bit = 0;
  logic [W-1:0] bus = 0, status = 0, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_cond dut (.clk, .rst, .op(cond_op_e'(op)), .bus, .status, .act_en, .act_bit, .q, .active);

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
      op = 2'($urandom); bus = 16'($urandom); status = 16'($urandom % 32);
      act_en = 1'($urandom); act_bit = 4'($urandom);
      @(posedge clk);
      if (op == 2'd1) exp_q = bus;
      else if (op == 2'd2) exp_q = status;
      #1;
      checks++;
      if (q !== exp_q || active !== (!act_en || exp_q[act_bit])) begin
        failures++;
        if (failures < 10) $display("cond mismatch q=%h exp=%h active=%b", q, exp_q, active);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
