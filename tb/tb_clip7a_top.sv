// tb_clip7a_top: end-to-end test of the CLIP7A system at its default size
// (256 elements, 4K-word memories, 16K-word microcode store).
//
// Acting as the host, the testbench loads a microprogram, starts it, streams
// four lines of 256 words into the array (operands A and B, a per-element
// control word C and a per-element offset O) and reads back the result
// lines. The program exercises every mechanism of the design:
//   * two-operand addition from memory in four microinstructions (timed),
//   * activity control: a locally chosen function is written only where C[4]=1,
//   * local ALU function from C[15:12],
//   * local B-register addressing from C[11:10] (read) and C[9:8] (write),
//   * propagation between neighbours and edge registers, with a local
//     connectivity mask C[7:0],
//   * local memory addressing: the co-processor forms 0x10+O from an offset it
//     reads through the transceiver, and the processor reads that word,
//   * the global address reaching the processor through the transceiver,
//   * both D chains, subroutine calls, counted loops, and controller stalls
//     on an empty input and a full output register.
// Every returned word is compared with a value computed here from A, B, C, O.
module tb_clip7a_top;
  import clip7_pkg::*;
  import clip7_ref_pkg::*;
  localparam int N = 256;

  logic clk = 0, rst = 1;
  logic uc_we = 0, start = 0, busy, din_we = 0, din_full, dout_valid, dout_rd = 0, stall;
  logic [13:0] uc_addr = 0, start_addr = 0;
  logic [UCW-1:0] uc_wdata = 0;
  logic [W-1:0] din = 0, dout;
  logic [N-1:0] prop;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7a_top dut (
    .clk, .rst, .host_uc_we(uc_we), .host_uc_addr(uc_addr), .host_uc_wdata(uc_wdata),
    .host_start(start), .host_start_addr(start_addr), .host_busy(busy), .host_din(din),
    .host_din_we(din_we), .host_din_full(din_full), .host_dout(dout),
    .host_dout_valid(dout_valid), .host_dout_rd(dout_rd), .prop, .stall);

  // ------------------------------------------------------------------ program
  uinstr_t prog [int];
  int      pc_add0, pc_add3;

  function automatic uinstr_t nop();
    uinstr_t u;
    u = '0;
    return u;
  endfunction

  function automatic uinstr_t latch(int a);
    uinstr_t u;
    u = '0; u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'(a); u.arr.pe.latch_ld = 1;
    return u;
  endfunction

  function automatic uinstr_t call(int t);
    uinstr_t u;
    u = '0; u.seq.op = SEQ_CALL; u.seq.target = 14'(t);
    return u;
  endfunction

  localparam int SHIN = 200, SHOUT = 210, SHOUTC = 220;

  task automatic build();
    uinstr_t u;
    int p;
    int rb [4] = '{2, 4, 5, 6};
    // subroutine: take N words from the host into the processor D chain
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(N - 1); prog[SHIN] = u;
    u = nop(); u.hif.wait_in = 1; u.hif.din_take = 1; u.arr.proc.d_op = D_SHIFT;
    u.seq.op = SEQ_LOOP; u.seq.target = 14'(SHIN + 1); prog[SHIN + 1] = u;
    u = nop(); u.seq.op = SEQ_RET; prog[SHIN + 2] = u;
    // subroutine: send the processor chain to the host, element 0 first
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(N - 1); prog[SHOUT] = u;
    u = nop(); u.hif.wait_out = 1; u.hif.dout_ld = 1; u.arr.proc.d_op = D_SHIFT;
    u.seq.op = SEQ_LOOP; u.seq.target = 14'(SHOUT + 1); prog[SHOUT + 1] = u;
    u = nop(); u.seq.op = SEQ_RET; prog[SHOUT + 2] = u;
    // subroutine: send the co-processor chain to the host, element N-1 first
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(N - 1); prog[SHOUTC] = u;
    u = nop(); u.hif.wait_out = 1; u.hif.dout_ld = 1; u.hif.dout_sel = 1;
    u.arr.coproc.d_op = D_SHIFT; u.seq.op = SEQ_LOOP; u.seq.target = 14'(SHOUTC + 1);
    prog[SHOUTC + 1] = u;
    u = nop(); u.seq.op = SEQ_RET; prog[SHOUTC + 2] = u;

    p = 0;
    // load A, B into RAM 0x10, 0x11; C into the condition register; O into 0x13
    prog[p++] = call(SHIN);
    prog[p++] = latch('h10);
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.proc.bus_src = BUS_D; u.arr.pe.ram_we = 1; prog[p++] = u;
    prog[p++] = call(SHIN);
    prog[p++] = latch('h11);
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.proc.bus_src = BUS_D; u.arr.pe.ram_we = 1; prog[p++] = u;
    prog[p++] = call(SHIN);
    u = nop(); u.arr.proc.bus_src = BUS_D; u.arr.proc.cond_op = COND_BUS; prog[p++] = u;
    prog[p++] = call(SHIN);
    prog[p++] = latch('h13);
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.proc.bus_src = BUS_D; u.arr.pe.ram_we = 1; prog[p++] = u;
    // RAM[0x12] = A + B in four microinstructions
    pc_add0 = p;
    prog[p++] = latch('h10);
    u = latch('h11); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT;
    u.arr.proc.sh_op = SH_LOAD; prog[p++] = u;
    u = latch('h12); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT;
    u.arr.proc.sh_op = SH_LOAD; u.arr.proc.b_we = 1; u.arr.proc.b_waddr = 0; prog[p++] = u;
    pc_add3 = p;
    u = nop(); u.arr.proc.alu_op = ALU_ADD; u.arr.pe.dbus_src = DB_PROC; u.arr.pe.ram_we = 1;
    prog[p++] = u;
    // RAM[0x14] = C[4] ? fn_C(A, B) : A
    prog[p++] = latch('h14);
    u = nop(); u.arr.proc.alu_op = ALU_A; u.arr.pe.dbus_src = DB_PROC; u.arr.pe.ram_we = 1; prog[p++] = u;
    u = nop(); u.arr.proc.alu_local = 1; u.arr.proc.act_en = 1; u.arr.proc.act_bit = 4;
    u.arr.pe.dbus_src = DB_PROC; u.arr.pe.ram_we = 1; prog[p++] = u;
    // RAM[0x15] = Breg[C[11:10]] after Breg[C[9:8]] = B
    u = latch('h15); u.arr.proc.b_local = 1; u.arr.proc.b_we = 1; prog[p++] = u;
    u = nop(); u.arr.proc.b_local = 1; u.arr.proc.alu_op = ALU_A; u.arr.pe.dbus_src = DB_PROC;
    u.arr.pe.ram_we = 1; prog[p++] = u;
    // RAM[0x16] = N_IN: {B[2:0], A[2:0], right B[0], left B[0]} & C[7:0]
    prog[p++] = latch('h10);
    u = latch('h11); u.arr.pe.dbus_src = DB_RAM; u.arr.pe.edge_top_ld = 1; prog[p++] = u;
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.pe.edge_bot_ld = 1; u.arr.proc.bus_src = BUS_EXT;
    u.arr.proc.nout_load = 1; prog[p++] = u;
    u = latch('h16); u.arr.proc.nin_load = 1; u.arr.proc.nin_local = 1; prog[p++] = u;
    u = nop(); u.arr.proc.a_nin = 1; u.arr.proc.alu_op = ALU_A; u.arr.pe.dbus_src = DB_PROC;
    u.arr.pe.ram_we = 1; prog[p++] = u;
    // local address: co-processor forms 0x10 + O, processor reads that word
    prog[p++] = latch('h13);
    u = nop(); u.arr.pe.abus_src = AB_XCVR; u.arr.pe.dbus_src = DB_RAM;
    u.arr.coproc.bus_src = BUS_EXT; u.arr.coproc.sh_op = SH_LOAD; prog[p++] = u;
    u = nop(); u.arr.coproc.b_we = 1; u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'h10;
    u.arr.coproc.bus_src = BUS_EXT; u.arr.coproc.sh_op = SH_LOAD; prog[p++] = u;
    u = nop(); u.arr.coproc.alu_op = ALU_ADD; u.arr.pe.abus_src = AB_COPROC; u.arr.pe.latch_ld = 1;
    u.arr.coproc.d_op = D_LOAD; prog[p++] = u;
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT; u.arr.proc.d_op = D_LOAD;
    prog[p++] = u;
    prog[p++] = call(SHOUT);
    prog[p++] = call(SHOUTC);
    // read back 0x12, 0x14, 0x15, 0x16
    for (int k = 0; k < 4; k++) begin
      prog[p++] = latch(16 + rb[k]);
      u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT; u.arr.proc.d_op = D_LOAD;
      prog[p++] = u;
      prog[p++] = call(SHOUT);
    end
    // global value through buffer and transceiver into every processor
    u = nop(); u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'h7e57; u.arr.pe.dbus_src = DB_XCVR;
    u.arr.proc.bus_src = BUS_EXT; u.arr.proc.d_op = D_LOAD; prog[p++] = u;
    prog[p++] = call(SHOUT);
    u = nop(); u.seq.op = SEQ_HALT; prog[p++] = u;
  endtask

  // ------------------------------------------------------------------ data
  logic [15:0] A [N], B [N], C [N], O [N];
  logic [15:0] expq [$];
  logic [15:0] inq [$];
  logic [15:0] got [$];

  function automatic logic [15:0] word_at(int i, int off);
    logic [15:0] bregs [4];
    logic [3:0]  fn;
    logic [7:0]  pin;
    bregs = '{A[i], 16'h0, 16'h0, 16'h0};
    bregs[C[i][9:8]] = B[i];
    fn  = C[i][15:12];
    pin = {B[i][2:0], A[i][2:0], (i == N - 1) ? 1'b0 : B[i+1][0], (i == 0) ? 1'b0 : B[i-1][0]};
    case (off)
      0: return A[i];
      1: return B[i];
      2: return A[i] + B[i];
      3: return O[i];
      4: return C[i][4] ? ref_alu(fn, A[i], B[i], 1'b0)[15:0] : A[i];
      5: return bregs[C[i][11:10]];
      default: return {8'h0, pin & C[i][7:0]};
    endcase
  endfunction

  task automatic make_data();
    logic [3:0] fns [4] = '{4'd7, 4'd8, 4'd4, 4'd6};
    int offs [4] = '{2, 4, 5, 6};
    for (int i = 0; i < N; i++) begin
      A[i] = 16'($urandom); B[i] = 16'($urandom);
      C[i] = {fns[$urandom % 4], 12'($urandom)};
      O[i] = 16'($urandom % 7);
    end
    foreach (A[i]) inq.push_back(A[i]);
    foreach (B[i]) inq.push_back(B[i]);
    foreach (C[i]) inq.push_back(C[i]);
    foreach (O[i]) inq.push_back(O[i]);
    for (int i = 0; i < N; i++) expq.push_back(word_at(i, int'(O[i])));
    for (int i = N - 1; i >= 0; i--) expq.push_back(16'h10 + O[i]);
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < N; i++) expq.push_back(word_at(i, offs[k]));
    end
    for (int i = 0; i < N; i++) expq.push_back(16'h7e57);
  endtask

  // ------------------------------------------------------------------ monitors
  int cyc = 0, c_add0 = -1, c_add3 = -1;
  int n_stall_in = 0, n_stall_out = 0, n_inactive = 0, n_alu_local = 0, n_b_local = 0;
  int n_nin_local = 0, n_coproc_addr = 0, n_xcvr_up = 0, n_xcvr_down = 0, n_edge = 0;
  int n_prop = 0, n_pshift = 0, n_cshift = 0, n_call = 0, n_ret = 0, n_loop = 0;
  array_ctrl_t ex;
  assign ex = dut.ctrl;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (dut.u_ctl.issue) begin
      if (dut.u_ctl.pc == 14'(pc_add0)) c_add0 <= cyc;
      if (dut.u_ctl.pc == 14'(pc_add3)) c_add3 <= cyc;
      case (dut.u_ctl.ui.seq.op)
        SEQ_CALL: n_call <= n_call + 1;
        SEQ_RET:  n_ret  <= n_ret + 1;
        SEQ_LOOP: n_loop <= n_loop + 1;
        default: ;
      endcase
    end
    if (stall && dut.u_ctl.ui.hif.wait_in) n_stall_in <= n_stall_in + 1;
    if (stall && dut.u_ctl.ui.hif.wait_out) n_stall_out <= n_stall_out + 1;
    if (ex.proc.act_en && ex.pe.ram_we) begin
      for (int i = 0; i < N; i++) if (!C[i][4]) n_inactive++;
    end
    if (ex.proc.alu_local) n_alu_local <= n_alu_local + 1;
    if (ex.proc.b_local) n_b_local <= n_b_local + 1;
    if (ex.proc.nin_local && ex.proc.nin_load) n_nin_local <= n_nin_local + 1;
    if (ex.pe.abus_src == AB_COPROC && ex.pe.latch_ld) n_coproc_addr <= n_coproc_addr + 1;
    if (ex.pe.abus_src == AB_XCVR) n_xcvr_up <= n_xcvr_up + 1;
    if (ex.pe.dbus_src == DB_XCVR) n_xcvr_down <= n_xcvr_down + 1;
    if (ex.pe.edge_top_ld || ex.pe.edge_bot_ld) n_edge <= n_edge + 1;
    if (ex.proc.nout_load) n_prop <= n_prop + 1;
    if (ex.proc.d_op == D_SHIFT) n_pshift <= n_pshift + 1;
    if (ex.coproc.d_op == D_SHIFT) n_cshift <= n_cshift + 1;
  end

  // ------------------------------------------------------------------ host
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(string name, int n);
    $display("  %-28s %0d", name, n);
    checks++;
    if (n == 0) begin failures++; $display("  mechanism never happened: %s", name); end
  endtask

  initial begin
    int nexp;
    build();
    make_data();
    nexp = expq.size();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (prog[a]) begin
      uc_we = 1; uc_addr = 14'(a); uc_wdata = prog[a];
      @(posedge clk); #1;
    end
    uc_we = 0;
    start = 1; start_addr = 0; @(posedge clk); #1 start = 0;
    fork
      // feeder: one word at a time, with irregular gaps
      while (inq.size() > 0) begin
        if (!din_full) begin
          din = inq.pop_front(); din_we = 1;
          @(posedge clk); #1 din_we = 0;
          repeat ($urandom % 3) @(posedge clk);
          #1;
        end else begin
          @(posedge clk); #1;
        end
      end
      // reader: collect every output word, sometimes slowly
      while (got.size() < nexp) begin
        if (dout_valid) begin
          got.push_back(dout); dout_rd = 1;
          @(posedge clk); #1 dout_rd = 0;
          repeat ($urandom % 3) @(posedge clk);
          #1;
        end else begin
          @(posedge clk); #1;
        end
      end
    join
    while (busy) @(posedge clk);
    for (int k = 0; k < nexp; k++) begin
      checks++;
      if (got[k] !== expq[k]) begin
        failures++;
        if (failures < 12) $display("output word %0d (line %0d, element %0d): %h expected %h",
                                    k, k / N, k % N, got[k], expq[k]);
      end
    end
    // the memory-to-memory addition takes four microinstructions
    checks++;
    if (c_add3 - c_add0 != 3) begin
      failures++;
      $display("addition took %0d cycles", c_add3 - c_add0 + 1);
    end
    $display("addition A+B from memory: %0d microinstructions", c_add3 - c_add0 + 1);
    $display("mechanisms exercised (cycles / events):");
    mech("stall on empty input", n_stall_in);
    mech("stall on full output", n_stall_out);
    mech("inactive element writes", n_inactive);
    mech("local ALU function", n_alu_local);
    mech("local B addressing", n_b_local);
    mech("local connectivity", n_nin_local);
    mech("co-processor address", n_coproc_addr);
    mech("transceiver up", n_xcvr_up);
    mech("transceiver down", n_xcvr_down);
    mech("edge register loads", n_edge);
    mech("propagation output loads", n_prop);
    mech("processor chain shifts", n_pshift);
    mech("co-processor chain shifts", n_cshift);
    mech("subroutine calls", n_call);
    mech("returns", n_ret);
    mech("loop steps", n_loop);
    $display("total cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
