// tb_clip7a_array: self-checking test of the linear array (8 elements,
// 64-word memories). Random microinstructions are broadcast and the array is
// compared every cycle with eight behavioural element models wired as a
// line: both chain exits and every propagation bit. A directed part then
// fills the processor chain with 8 words, shifts them out again and checks
// their order.
module tb_clip7a_array;
  import clip7_pkg::*;
  import clip7_ref_pkg::*;
  localparam int N = 8, WORDS = 64;
  logic clk = 0, rst = 1;
  array_ctrl_t c;
  logic [W-1:0] pin, cin, pout, cout;
  logic [N-1:0] prop, eprop;
  int checks = 0, failures = 0;
  pe_ref m [N];
  always #5 clk = ~clk;

  clip7a_array #(.N_PE(N), .RAM_WORDS(WORDS)) dut (.clk, .rst, .ctrl(c), .pdata_in(pin),
    .pdata_out(pout), .cdata_in(cin), .cdata_out(cout), .prop);

  task automatic cycle();
    logic [W-1:0] pd [N];
    logic [W-1:0] cd [N];
    logic         pr [N];
    #1;
    for (int i = 0; i < N; i++) eprop[i] = m[i].pr.nout;
    checks++;
    if (pout !== m[0].pr.d || cout !== m[N-1].cp.d || prop !== eprop) begin
      failures++;
      if (failures < 10) $display("array mismatch p=%h/%h c=%h/%h prop=%b/%b", pout, m[0].pr.d,
                                  cout, m[N-1].cp.d, prop, eprop);
    end
    @(posedge clk);
    for (int i = 0; i < N; i++) begin pd[i] = m[i].pr.d; cd[i] = m[i].cp.d; pr[i] = m[i].pr.nout; end
    for (int i = 0; i < N; i++)
      m[i].step(c, (i == 0) ? 1'b0 : pr[i-1], (i == N-1) ? 1'b0 : pr[i+1],
                (i == N-1) ? pin : pd[i+1], (i == 0) ? cin : cd[i-1]);
    #2;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) m[i] = new(WORDS);
    c = '0; pin = 0; cin = 0;
    @(posedge clk); #1 rst = 0;
    for (int a = 0; a <= WORDS; a++) begin
      c = '0; c.pe.abus_src = AB_GLOBAL; c.gaddr = 16'(a); c.pe.latch_ld = 1;
      c.pe.dbus_src = DB_PROC; c.pe.ram_we = (a > 0);
      cycle();
    end
    for (int k = 0; k < 3000; k++) begin
      c = array_ctrl_t'({$urandom, $urandom, $urandom});
      if ($urandom % 4 != 0) c.proc.cond_op = COND_HOLD;
      if ($urandom % 2 == 0) c.proc.act_en = 0;
      if ($urandom % 3 == 0) c.proc.nout_load = 1;
      pin = 16'($urandom); cin = 16'($urandom);
      cycle();
    end
    // directed chain transfer: words 100..107 in, then out in the same order
    for (int k = 0; k < N; k++) begin
      c = '0; c.proc.d_op = D_SHIFT; pin = 16'(100 + k); cycle();
    end
    for (int k = 0; k < N; k++) begin
      c = '0; c.proc.d_op = D_SHIFT; pin = 0; #1;
      checks++;
      if (pout !== 16'(100 + k)) begin failures++; $display("chain out %0d = %0d", k, pout); end
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
