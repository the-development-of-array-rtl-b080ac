// tb_clip7a_sequencer: self-checking test of the microcode sequencer.
// A directed program checks a counted loop (body runs count+1 times, one
// word per clock), a call and return, and halt. Then random programs with
// random stalls are run and the program counter is compared every cycle with
// a reference model of the sequencing rules.
module tb_clip7a_sequencer;
  import clip7_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst = 1, start = 0, stall = 0, running, issue;
  logic [AW-1:0] start_addr = 0, pc;
  seq_ctrl_t prog [64];
  seq_ctrl_t cur;
  int checks = 0, failures = 0, n_stall = 0;
  // reference state
  int rpc, rcnt, rsp, rstack [4];
  bit rrun;
  always #5 clk = ~clk;

  assign cur = prog[pc];
  clip7a_sequencer #(.AW(AW), .DEPTH(4)) dut (.clk, .rst, .start, .start_addr, .seq(cur),
                                              .stall, .pc, .running, .issue);

  function automatic seq_ctrl_t mk(seq_op_e op, int t);
    seq_ctrl_t s;
    s.op = op; s.target = 14'(t);
    return s;
  endfunction

  task automatic ref_step();
    seq_ctrl_t s;
    s = prog[rpc];
    if (!rrun || stall) return;
    case (s.op)
      SEQ_JUMP: rpc = int'(s.target) % 64;
      SEQ_LOOP: if (rcnt != 0) begin rcnt--; rpc = int'(s.target) % 64; end
                else rpc = (rpc + 1) % 64;
      SEQ_CALL: begin
        if (rsp == 4) rstack[3] = (rpc + 1) % 64;
        else begin rstack[rsp] = (rpc + 1) % 64; rsp++; end
        rpc = int'(s.target) % 64;
      end
      SEQ_RET: if (rsp == 0) rpc = 0; else begin rsp--; rpc = rstack[rsp]; end
      SEQ_LDCNT: begin rcnt = int'(s.target) % 64; rpc = (rpc + 1) % 64; end
      SEQ_HALT: rrun = 0;
      default: rpc = (rpc + 1) % 64;
    endcase
  endtask

  task automatic go(int a);
    start = 1; start_addr = AW'(a);
    @(posedge clk); #1 start = 0;
    rpc = a; rsp = 0; rrun = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int body, cyc;
    rcnt = 0; rsp = 0; rrun = 0; rpc = 0;
    foreach (prog[i]) prog[i] = mk(SEQ_NEXT, 0);
    // 0: LDCNT 3; 1: body; 2: LOOP 1; 3: CALL 10; 4: HALT; 10: NEXT; 11: RET
    prog[0] = mk(SEQ_LDCNT, 3); prog[1] = mk(SEQ_NEXT, 0); prog[2] = mk(SEQ_LOOP, 1);
    prog[3] = mk(SEQ_CALL, 10); prog[4] = mk(SEQ_HALT, 0); prog[11] = mk(SEQ_RET, 0);
    @(posedge clk); #1 rst = 0;
    go(0);
    body = 0; cyc = 0;
    while (running && cyc < 100) begin
      if (pc == 1 && issue) body++;
      @(posedge clk); #1 cyc++;
    end
    // words issued: 1 + 4*2 (body+loop) + call + 10 + ret + halt = 13
    checks++;
    if (body != 4) begin failures++; $display("loop body ran %0d times", body); end
    checks++;
    if (cyc != 13) begin failures++; $display("program took %0d cycles, expected 13", cyc); end
    checks++;
    if (pc != 4) begin failures++; $display("halted at %0d", pc); end
    // random programs
    for (int r = 0; r < 40; r++) begin
      foreach (prog[i]) begin
        prog[i] = mk(seq_op_e'($urandom % 6), $urandom % 64);
        if (prog[i].op == SEQ_LDCNT) prog[i].target = 14'($urandom % 4);
        if ($urandom % 40 == 0) prog[i] = mk(SEQ_HALT, 0);
      end
      go($urandom % 64);
      for (int k = 0; k < 300 && rrun; k++) begin
        stall = ($urandom % 5) == 0;
        if (stall) n_stall++;
        #1;
        checks++;
        if (pc != AW'(rpc) || running != rrun) begin
          failures++;
          if (failures < 10) $display("pc %0d exp %0d run %b/%b", pc, rpc, running, rrun);
        end
        ref_step();
        @(posedge clk); #1;
      end
      stall = 0;
      rst = 1;
      @(posedge clk); #1 rst = 0;
      rrun = 0; rcnt = 0;
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
