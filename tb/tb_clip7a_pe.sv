// tb_clip7a_pe: self-checking test of one CLIP7A processing element.
// After clearing the RAM through the normal data path, random
// microinstructions are applied and the element is compared every cycle with
// a behavioural reference: both chain outputs, the propagation output and
// both buses. A directed sequence then shows local addressing: the
// co-processor computes base+offset, the latch takes it, and the processor
// reads the word stored there.
module tb_clip7a_pe;
  import clip7_pkg::*;
  import clip7_ref_pkg::*;
  localparam int WORDS = 4096;
  logic clk = 0, rst = 1;
  array_ctrl_t c;
  logic pl, pr, pout;
  logic [W-1:0] pin, cin, pdout, cdout;
  int checks = 0, failures = 0;
  int n_coproc_addr = 0, n_xcvr = 0, n_write = 0;
  pe_ref m;
  always #5 clk = ~clk;

  clip7a_pe #(.RAM_WORDS(WORDS)) dut (
    .clk, .rst, .ctrl(c), .prop_l(pl), .prop_r(pr), .prop_out(pout),
    .pdata_in_r(pin), .pdata_out_l(pdout), .cdata_in_l(cin), .cdata_out_r(cdout));

  task automatic cycle();
    logic [15:0] ab, db;
    #1;
    m.buses(c, ab, db);
    checks++;
    if (pdout !== m.pr.d || cdout !== m.cp.d || pout !== m.pr.nout ||
        dut.abus !== ab || dut.dbus !== db) begin
      failures++;
      if (failures < 10)
        $display("pe mismatch pd=%h/%h cd=%h/%h p=%b/%b ab=%h/%h db=%h/%h", pdout, m.pr.d,
                 cdout, m.cp.d, pout, m.pr.nout, dut.abus, ab, dut.dbus, db);
    end
    @(posedge clk);
    m.step(c, pl, pr, pin, cin);
    #2;
  endtask

  function automatic array_ctrl_t rnd_ctrl();
    array_ctrl_t r;
    r = array_ctrl_t'({$urandom, $urandom, $urandom});
    if ($urandom % 4 != 0) r.proc.cond_op = COND_HOLD;
    if ($urandom % 4 != 0) r.coproc.cond_op = COND_HOLD;
    if ($urandom % 2 == 0) r.proc.act_en = 0;
    if ($urandom % 2 == 0) r.coproc.act_en = 0;
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(WORDS);
    c = '0; pl = 0; pr = 0; pin = 0; cin = 0;
    @(posedge clk); #1 rst = 0;
    // clear the RAM: latch address i while writing zero to address i-1
    for (int i = 0; i <= WORDS; i++) begin
      c = '0;
      c.pe.abus_src = AB_GLOBAL; c.gaddr = 16'(i); c.pe.latch_ld = 1;
      c.pe.dbus_src = DB_PROC; c.proc.alu_op = ALU_ZERO; c.pe.ram_we = (i > 0);
      cycle();
    end
    for (int i = 0; i < 12000; i++) begin
      c = rnd_ctrl();
      pl = 1'($urandom); pr = 1'($urandom); pin = 16'($urandom); cin = 16'($urandom);
      if (c.pe.abus_src == AB_COPROC && c.pe.latch_ld) n_coproc_addr++;
      if (c.pe.abus_src == AB_XCVR || c.pe.dbus_src == DB_XCVR) n_xcvr++;
      if (c.pe.ram_we) n_write++;
      cycle();
    end
    // directed local address: store 16'hbeef at 0x123, then reach it as 0x100+0x23
    c = '0; c.pe.abus_src = AB_GLOBAL; c.gaddr = 16'h0123; c.pe.latch_ld = 1; cycle();
    c = '0; c.proc.act_en = 0; c.pe.dbus_src = DB_PROC; c.proc.bus_src = BUS_D;
    c.proc.d_op = D_SHIFT; pin = 16'hbeef; cycle();            // D <= beef
    c = '0; c.pe.dbus_src = DB_PROC; c.proc.bus_src = BUS_D; c.pe.ram_we = 1; cycle();
    // co-processor: shift <= 0x23 (global address via buffer), B0 <= shift, shift <= 0x100
    c = '0; c.pe.abus_src = AB_GLOBAL; c.gaddr = 16'h0023; c.coproc.bus_src = BUS_EXT;
    c.coproc.sh_op = SH_LOAD; cycle();
    c = '0; c.pe.abus_src = AB_GLOBAL; c.gaddr = 16'h0100; c.coproc.bus_src = BUS_EXT;
    c.coproc.sh_op = SH_LOAD; c.coproc.b_we = 1; cycle();
    c = '0; c.coproc.alu_op = ALU_ADD; c.pe.abus_src = AB_COPROC; c.pe.latch_ld = 1; cycle();
    c = '0; c.pe.dbus_src = DB_RAM; c.proc.bus_src = BUS_EXT; c.proc.d_op = D_LOAD; cycle();
    #1;
    checks++;
    if (pdout !== 16'hbeef) begin
      failures++;
      $display("local address read %h", pdout);
    end
    $display("coproc addresses=%0d transceiver=%0d writes=%0d", n_coproc_addr, n_xcvr, n_write);
    checks++;
    if (n_coproc_addr == 0 || n_xcvr == 0 || n_write == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
