// tb_clip7a_controller: self-checking test of the CLIP7A controller.
// The host loads a short microprogram, starts it and feeds three words with
// gaps, so the controller must stall on an empty input register; it then
// captures both chain ends into the output register, stalling until the host
// has read the first word. Checked: the order of the words broadcast to the
// array, that each appears one clock after issue, that a stall broadcasts no
// operation, that the array sees each host word while the word that takes it
// executes, and the two captured values.
module tb_clip7a_controller;
  import clip7_pkg::*;
  localparam int UCN = 64;
  logic clk = 0, rst = 1;
  logic uc_we = 0, start = 0, busy, din_we = 0, din_full, dout_valid, dout_rd = 0, stall;
  logic [5:0] uc_addr = 0, start_addr = 0;
  logic [UCW-1:0] uc_wdata = 0;
  logic [W-1:0] din = 0, dout, adin, pd = 16'haaaa, cd = 16'h5555;
  array_ctrl_t ctrl;
  int checks = 0, failures = 0, n_stall = 0, nseen = 0, nin = 0;
  logic [15:0] seen [16];
  logic [15:0] taken [4];
  always #5 clk = ~clk;

  clip7a_controller #(.UC_WORDS(UCN)) dut (
    .clk, .rst, .host_uc_we(uc_we), .host_uc_addr(uc_addr), .host_uc_wdata(uc_wdata),
    .host_start(start), .host_start_addr(start_addr), .host_busy(busy), .host_din(din),
    .host_din_we(din_we), .host_din_full(din_full), .host_dout(dout),
    .host_dout_valid(dout_valid), .host_dout_rd(dout_rd), .ctrl, .array_din(adin),
    .array_pdout(pd), .array_cdout(cd), .stall_out(stall));

  task automatic put(int a, uinstr_t u);
    uc_we = 1; uc_addr = 6'(a); uc_wdata = u;
    @(posedge clk); #1 uc_we = 0;
  endtask

  function automatic uinstr_t w(int g, seq_op_e op, int t);
    uinstr_t u;
    u = '0; u.arr.gaddr = 16'(g); u.seq.op = op; u.seq.target = 14'(t);
    return u;
  endfunction

  // monitor the execute stage
  always @(posedge clk) if (!rst) begin
    if (ctrl.gaddr != 0 && nseen < 16) begin
      seen[nseen] <= ctrl.gaddr; nseen <= nseen + 1;
      if (ctrl.gaddr == 16'h1001 && nin < 4) begin taken[nin] <= adin; nin <= nin + 1; end
    end
    if (stall) n_stall <= n_stall + 1;
  end

  // execute stage must follow the issued word by exactly one clock
  logic prev_issue;
  logic [15:0] prev_g;
  always @(posedge clk) begin
    prev_issue <= dut.issue;
    prev_g     <= dut.ui.arr.gaddr;
  end
  always @(negedge clk) if (!rst && busy) begin
    checks++;
    if (prev_issue ? (ctrl.gaddr !== prev_g) : (ctrl !== '0)) begin
      failures++;
      $display("execute stage wrong: %h", ctrl.gaddr);
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uinstr_t u;
    logic [15:0] exp_seen [7] = '{16'h1000, 16'h1001, 16'h1001, 16'h1001, 16'h1002, 16'h1003, 16'h1004};
    @(posedge clk); #1 rst = 0;
    put(0, w(16'h1000, SEQ_LDCNT, 2));
    u = w(16'h1001, SEQ_LOOP, 1); u.hif.wait_in = 1; u.hif.din_take = 1; put(1, u);
    u = w(16'h1002, SEQ_NEXT, 0); u.hif.wait_out = 1; u.hif.dout_ld = 1; put(2, u);
    u = w(16'h1003, SEQ_NEXT, 0); u.hif.wait_out = 1; u.hif.dout_ld = 1; u.hif.dout_sel = 1; put(3, u);
    put(4, w(16'h1004, SEQ_HALT, 0));
    start = 1; start_addr = 0; @(posedge clk); #1 start = 0;
    for (int k = 0; k < 3; k++) begin
      repeat (3 + k) @(posedge clk);
      #1 din = 16'h0c00 + 16'(k); din_we = 1;
      @(posedge clk); #1 din_we = 0;
      while (din_full) @(posedge clk);
      #1;
    end
    while (!dout_valid) @(posedge clk);
    #1;
    checks++;
    if (dout !== 16'haaaa) begin failures++; $display("first capture %h", dout); end
    repeat (4) @(posedge clk);
    #1 dout_rd = 1; @(posedge clk); #1 dout_rd = 0;
    while (!dout_valid) @(posedge clk);
    #1;
    checks++;
    if (dout !== 16'h5555) begin failures++; $display("second capture %h", dout); end
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (nseen != 7) begin failures++; $display("saw %0d words", nseen); end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (seen[i] !== exp_seen[i]) begin failures++; $display("word %0d = %h", i, seen[i]); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (taken[i] !== 16'h0c00 + 16'(i)) begin failures++; $display("taken %0d = %h", i, taken[i]); end
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("stall cycles=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
