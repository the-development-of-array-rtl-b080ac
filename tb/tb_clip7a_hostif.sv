// tb_clip7a_hostif: self-checking test of the host interchange registers.
// Random host writes and reads and random take/capture actions from the
// executing microinstruction, compared each cycle with a reference of the
// two full flags and registers, including ignored writes to a full input
// register.
module tb_clip7a_hostif;
  import clip7_pkg::*;
  logic clk = 0, rst = 1;
  logic [W-1:0] hdin = 0, hdout, adin, pd = 0, cd = 0;
  logic hwe = 0, hfull, hvalid, hrd = 0, din_ready, dout_free;
  hif_ctrl_t ex = '0;
  logic [W-1:0] r_din, r_dout;
  bit r_full, r_valid;
  int checks = 0, failures = 0, n_ignored = 0;
  always #5 clk = ~clk;

  clip7a_hostif dut (.clk, .rst, .host_din(hdin), .host_din_we(hwe), .host_din_full(hfull),
                     .host_dout(hdout), .host_dout_valid(hvalid), .host_dout_rd(hrd), .ex,
                     .array_din(adin), .array_pdout(pd), .array_cdout(cd), .din_ready, .dout_free);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_din = 0; r_dout = 0; r_full = 0; r_valid = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      hdin = 16'($urandom); hwe = 1'($urandom); hrd = 1'($urandom);
      pd = 16'($urandom); cd = 16'($urandom);
      ex = hif_ctrl_t'($urandom);
      #1;
      checks++;
      if (adin !== r_din || hfull !== r_full || hvalid !== r_valid || hdout !== r_dout ||
          din_ready !== (r_full && !ex.din_take) || dout_free !== (!r_valid && !ex.dout_ld)) begin
        failures++;
        if (failures < 10) $display("hostif mismatch at %0d", i);
      end
      @(posedge clk);
      if (ex.din_take) r_full = 0;
      else if (hwe && !r_full) begin r_din = hdin; r_full = 1; end
      else if (hwe) n_ignored++;
      if (ex.dout_ld) begin r_dout = ex.dout_sel ? cd : pd; r_valid = 1; end
      else if (hrd) r_valid = 0;
      #1;
    end
    checks++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
