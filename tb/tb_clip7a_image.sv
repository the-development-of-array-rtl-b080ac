// tb_clip7a_image: a 256 x 256 image workload on the full-size CLIP7A.
//
// Shows the linear array emulating a 2-D array. Element i holds image column
// i, one row per memory word group, at word 4r (pixel), 4r+1 (row triple)
// and 4r+2 (result). The co-processor in every element keeps the row pointer
// and forms all addresses.
//   1. 256 rows of a random sparse binary image stream in through the
//      processor D chain; each row is stored at 4r.
//   2. For every row, each element builds its triple {p, right, left}
//      using the propagation bit of its neighbours, and stores it at 4r+1.
//   3. For every row, the edge registers take the triples of rows r-1 and
//      r+1, the neighbours supply left and right, and N_IN then holds the
//      eight neighbours. The ALU ORs them with the centre pixel. The status
//      load and the activity bit (Z) turn that into 0 or 1 at 4r+2. The
//      result is a 3 x 3 binary dilation.
//   4. The 256 result rows stream back out and every pixel is compared with
//      a dilation computed here (pixels outside the image count as 0).
module tb_clip7a_image;
  import clip7_pkg::*;
  localparam int N = 256, ROWS = 256;

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

  uinstr_t prog [int];
  localparam int LOADROW = 2000, SENDROW = 2010, PRE = 2020, PROC = 2040;

  function automatic uinstr_t nop();
    uinstr_t u;
    u = '0;
    return u;
  endfunction

  // co-processor shift register <= constant (through the buffer)
  function automatic uinstr_t cconst(int v);
    uinstr_t u;
    u = '0; u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'(v);
    u.arr.coproc.bus_src = BUS_EXT; u.arr.coproc.sh_op = SH_LOAD;
    return u;
  endfunction

  // latch <= co-processor B[k] + pointer
  function automatic uinstr_t caddr(uinstr_t base, int k);
    uinstr_t u;
    u = base; u.arr.coproc.alu_op = ALU_ADD; u.arr.coproc.b_raddr = 2'(k);
    u.arr.pe.abus_src = AB_COPROC; u.arr.pe.latch_ld = 1;
    return u;
  endfunction

  // pointer <= pointer + B3
  function automatic uinstr_t cstep(uinstr_t base);
    uinstr_t u;
    u = base; u.arr.coproc.alu_op = ALU_ADD; u.arr.coproc.b_raddr = 2'd3;
    u.arr.coproc.sh_op = SH_LOAD;
    return u;
  endfunction

  task automatic build();
    uinstr_t u;
    int p;
    // LOADROW: shift one row in, store it at pointer, pointer += 4
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(N - 1); prog[LOADROW] = u;
    u = nop(); u.hif.wait_in = 1; u.hif.din_take = 1; u.arr.proc.d_op = D_SHIFT;
    u.seq.op = SEQ_LOOP; u.seq.target = 14'(LOADROW + 1); prog[LOADROW + 1] = u;
    u = nop(); u.arr.coproc.alu_op = ALU_B; u.arr.pe.abus_src = AB_COPROC; u.arr.pe.latch_ld = 1;
    prog[LOADROW + 2] = u;
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.proc.bus_src = BUS_D; u.arr.pe.ram_we = 1;
    prog[LOADROW + 3] = cstep(u);
    u = nop(); u.seq.op = SEQ_RET; prog[LOADROW + 4] = u;
    // SENDROW: read pointer+B1 into D, pointer += 4, shift the row out
    prog[SENDROW] = caddr(nop(), 1);
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT; u.arr.proc.d_op = D_LOAD;
    prog[SENDROW + 1] = cstep(u);
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(N - 1); prog[SENDROW + 2] = u;
    u = nop(); u.hif.wait_out = 1; u.hif.dout_ld = 1; u.arr.proc.d_op = D_SHIFT;
    u.seq.op = SEQ_LOOP; u.seq.target = 14'(SENDROW + 3); prog[SENDROW + 3] = u;
    u = nop(); u.seq.op = SEQ_RET; prog[SENDROW + 4] = u;

    p = 0;
    prog[p++] = cconst(4);
    u = cconst(0); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 3; prog[p++] = u;  // B3=4, ptr=0
    for (int r = 0; r < ROWS; r++) begin
      u = nop(); u.seq.op = SEQ_CALL; u.seq.target = 14'(LOADROW); prog[p++] = u;
    end
    // zero the triples just outside the image: rows -1 (word 4093) and 256 (word 1025)
    u = nop(); u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'(4093); u.arr.pe.latch_ld = 1; prog[p++] = u;
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.pe.ram_we = 1;
    u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'(1025); u.arr.pe.latch_ld = 1; prog[p++] = u;
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.pe.ram_we = 1; prog[p++] = u;
    // pass 1: triples.  B1 = 1, ptr = 0
    prog[p++] = cconst(1);
    u = cconst(0); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 1; prog[p++] = u;
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(ROWS - 1); prog[p++] = u;
    u = nop(); u.seq.op = SEQ_JUMP; u.seq.target = 14'(PRE); prog[p++] = u;
    // continue here after pass 1 (PRE jumps back)
    prog[PRE] = caddr(nop(), 3'd0) ;
    prog[PRE].arr.coproc.alu_op = ALU_B;                      // latch <= ptr
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT; u.arr.proc.sh_op = SH_LOAD;
    u.arr.proc.nout_load = 1; prog[PRE + 1] = u;
    u = nop(); u.arr.proc.nin_load = 1; u.arr.proc.nin_mask = 8'h03; u.arr.proc.sh_op = SH_LEFT;
    prog[PRE + 2] = caddr(u, 1);                              // latch <= ptr + 1
    u = nop(); u.arr.proc.sh_op = SH_LEFT; prog[PRE + 3] = u;
    u = nop(); u.arr.proc.a_nin = 1; u.arr.proc.alu_op = ALU_OR; u.arr.pe.dbus_src = DB_PROC;
    u.arr.pe.ram_we = 1; u = cstep(u); u.seq.op = SEQ_LOOP; u.seq.target = 14'(PRE);
    prog[PRE + 4] = u;
    u = nop(); u.seq.op = SEQ_JUMP; u.seq.target = 14'(p); prog[PRE + 5] = u;
    // pass 2: dilation.  B0 = -3, B1 = 5, B2 = 2, ptr = 0
    prog[p++] = cconst(16'hfffd);
    u = cconst(5); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 0; prog[p++] = u;
    u = cconst(2); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 1; prog[p++] = u;
    u = cconst(0); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 2; prog[p++] = u;
    u = nop(); u.seq.op = SEQ_LDCNT; u.seq.target = 14'(ROWS - 1); prog[p++] = u;
    u = nop(); u.seq.op = SEQ_JUMP; u.seq.target = 14'(PROC); prog[p++] = u;
    prog[PROC] = caddr(nop(), 0);                             // row r-1 triple
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.pe.edge_top_ld = 1; prog[PROC + 1] = caddr(u, 1);
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.pe.edge_bot_ld = 1; u = caddr(u, 0);
    u.arr.coproc.alu_op = ALU_B; prog[PROC + 2] = u;          // latch <= ptr (pixel)
    u = nop(); u.arr.pe.dbus_src = DB_RAM; u.arr.proc.bus_src = BUS_EXT; u.arr.proc.sh_op = SH_LOAD;
    u.arr.proc.nout_load = 1; prog[PROC + 3] = u;
    u = nop(); u.arr.proc.nin_load = 1; u.arr.proc.nin_mask = 8'hff; prog[PROC + 4] = u;
    u = nop(); u.arr.proc.a_nin = 1; u.arr.proc.alu_op = ALU_OR; u.arr.proc.cond_op = COND_STATUS;
    prog[PROC + 5] = caddr(u, 2);                             // latch <= ptr + 2
    u = nop(); u.arr.pe.abus_src = AB_GLOBAL; u.arr.gaddr = 16'd1; u.arr.pe.dbus_src = DB_XCVR;
    u.arr.pe.ram_we = 1; prog[PROC + 6] = u;                  // result <= 1 everywhere
    u = nop(); u.arr.pe.dbus_src = DB_PROC; u.arr.proc.alu_op = ALU_ZERO; u.arr.proc.act_en = 1;
    u.arr.proc.act_bit = 4'(ST_Z); u.arr.pe.ram_we = 1; u = cstep(u);
    u.seq.op = SEQ_LOOP; u.seq.target = 14'(PROC); prog[PROC + 7] = u;   // 0 where OR was zero
    u = nop(); u.seq.op = SEQ_JUMP; u.seq.target = 14'(p); prog[PROC + 8] = u;
    // output: B1 = 2, ptr = 0
    prog[p++] = cconst(2);
    u = cconst(0); u.arr.coproc.b_we = 1; u.arr.coproc.b_waddr = 1; prog[p++] = u;
    for (int r = 0; r < ROWS; r++) begin
      u = nop(); u.seq.op = SEQ_CALL; u.seq.target = 14'(SENDROW); prog[p++] = u;
    end
    u = nop(); u.seq.op = SEQ_HALT; prog[p++] = u;
  endtask

  bit img [ROWS][N];

  // clocks spent in the two compute passes (triples and dilation)
  int n_compute = 0;
  always @(posedge clk)
    if (busy && ((dut.u_ctl.pc >= 14'(PRE) && dut.u_ctl.pc <= 14'(PRE + 5)) ||
                 (dut.u_ctl.pc >= 14'(PROC) && dut.u_ctl.pc <= 14'(PROC + 8))))
      n_compute <= n_compute + 1;

  function automatic bit dil(int r, int c);
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < N && img[r+dr][c+dc]) return 1;
    return 0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: image program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nout, ones, cyc0, cyc1;
    build();
    foreach (img[r, c]) img[r][c] = ($urandom % 23) == 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (prog[a]) begin
      uc_we = 1; uc_addr = 14'(a); uc_wdata = prog[a];
      @(posedge clk); #1;
    end
    uc_we = 0;
    start = 1; start_addr = 0; @(posedge clk); #1 start = 0;
    cyc0 = $time;
    nout = 0; ones = 0;
    fork
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < N; c++) begin
          while (din_full) begin @(posedge clk); #1; end
          din = 16'(img[r][c]); din_we = 1;
          @(posedge clk); #1 din_we = 0;
        end
      while (nout < ROWS * N) begin
        if (dout_valid) begin
          checks++;
          if (dout !== 16'(dil(nout / N, nout % N))) begin
            failures++;
            if (failures < 10) $display("pixel (%0d,%0d) = %0d, expected %0d", nout / N, nout % N,
                                        dout, dil(nout / N, nout % N));
          end
          if (dout == 1) ones++;
          nout++;
          dout_rd = 1; @(posedge clk); #1 dout_rd = 0;
        end else begin
          @(posedge clk); #1;
        end
      end
    join
    while (busy) @(posedge clk);
    cyc1 = $time;
    $display("image 256x256 dilated: %0d result pixels set, %0d clocks in all, %0d in the compute passes",
             ones, (cyc1 - cyc0) / 10, n_compute);
    // pass 1 is 5 words per row, pass 2 is 8 words per row, plus the two exit jumps
    checks++;
    if (n_compute != ROWS * (5 + 8) + 2) begin
      failures++;
      $display("compute passes took %0d clocks, expected %0d", n_compute, ROWS * 13 + 2);
    end
    checks++;
    if (ones == 0 || ones == ROWS * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
