// tb_clip7_shift: self-checking test of the shift register: load, shift
// left, shift right, hold and the activity enable, against a reference.
module tb_clip7_shift;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [1:0] op = 0;
  logic [W-1:0] bus = 0, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_shift dut (.clk, .rst, .en, .op(sh_op_e'(op)), .bus, .q);

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
      en = ($urandom % 4) != 0; op = 2'($urandom); bus = 16'($urandom);
      @(posedge clk);
      if (en) case (op)
        2'd1: exp_q = bus;
        2'd2: exp_q = exp_q << 1;
        2'd3: exp_q = exp_q >> 1;
        default: ;
      endcase
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("shift mismatch op=%0d q=%h exp=%h", op, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
