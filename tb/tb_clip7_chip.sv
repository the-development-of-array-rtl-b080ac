// tb_clip7_chip: self-checking test of one CLIP7 chip.
// Random microinstructions, propagation inputs, chain input and memory data
// are applied every clock; the chip's outputs (memory write data, D chain
// output, propagation output, activity) are compared with the behavioural
// reference every cycle. A directed sequence then adds two words from
// "memory" in the way the array does it and checks the sum. Counts show that
// activity gating, local ALU function, local B addressing and local
// connectivity all occurred.
module tb_clip7_chip;
  import clip7_pkg::*;
  import clip7_ref_pkg::*;
  logic clk = 0, rst = 1;
  chip_ctrl_t c;
  logic [7:0] pin;
  logic [W-1:0] din, ext, wd, dout;
  logic pout, act;
  int checks = 0, failures = 0;
  int n_inactive = 0, n_alu_local = 0, n_b_local = 0, n_nin_local = 0;
  chip_ref m;
  always #5 clk = ~clk;

  clip7_chip dut (.clk, .rst, .ctrl(c), .prop_in(pin), .prop_out(pout), .data_in(din),
                  .data_out(dout), .ext_rdata(ext), .ext_wdata(wd), .active(act));

  function automatic chip_ctrl_t rnd_ctrl();
    chip_ctrl_t r;
    r = chip_ctrl_t'({$urandom, $urandom});
    if ($urandom % 4 != 0) r.cond_op = COND_HOLD;
    if ($urandom % 2 == 0) r.act_en = 1'b0;
    return r;
  endfunction

  task automatic compare(string tag);
    checks++;
    if (wd !== m.wdata(c) || dout !== m.d || pout !== m.nout || act !== m.active(c)) begin
      failures++;
      if (failures < 10)
        $display("%s mismatch: wd=%h/%h d=%h/%h p=%b/%b act=%b/%b", tag, wd, m.wdata(c),
                 dout, m.d, pout, m.nout, act, m.active(c));
    end
  endtask

  task automatic cycle();
    #1 compare("cycle");
    @(posedge clk);
    m.step(c, pin, din, ext);
    #2;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new();
    c = '0; pin = 0; din = 0; ext = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      c = rnd_ctrl(); pin = 8'($urandom); din = 16'($urandom); ext = 16'($urandom);
      if (c.act_en && !m.cond[c.act_bit]) n_inactive++;
      if (c.alu_local) n_alu_local++;
      if (c.b_local && (c.b_we || !c.a_nin)) n_b_local++;
      if (c.nin_local && c.nin_load) n_nin_local++;
      cycle();
    end
    // directed: ext word 1234 -> shift -> B0, 0321 -> shift, add, write out
    c = '0; c.bus_src = BUS_EXT; c.sh_op = SH_LOAD; ext = 16'h1234; cycle();
    c = '0; c.bus_src = BUS_EXT; c.sh_op = SH_LOAD; c.b_we = 1; c.b_waddr = 0; ext = 16'h0321; cycle();
    c = '0; c.alu_op = ALU_ADD; c.b_raddr = 0; #1;
    checks++;
    if (wd !== 16'h1555) begin
      failures++;
      $display("directed add gave %h", wd);
    end
    cycle();
    $display("inactive=%0d alu_local=%0d b_local=%0d nin_local=%0d", n_inactive, n_alu_local,
             n_b_local, n_nin_local);
    checks++;
    if (n_inactive == 0 || n_alu_local == 0 || n_b_local == 0 || n_nin_local == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
