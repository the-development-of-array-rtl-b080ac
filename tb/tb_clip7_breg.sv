// tb_clip7_breg: self-checking test of the B-register file.
// Random writes and reads with global and condition-register (local)
// addressing, checked against a shadow copy of the registers.
module tb_clip7_breg;
  import clip7_pkg::*;
  logic clk = 0, rst = 1, wr_en = 0, addr_local = 0;
  logic [1:0] wg = 0, rg = 0, wc = 0, rc = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] shadow [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7_breg dut (.clk, .rst, .wr_en, .addr_local, .waddr_global(wg), .raddr_global(rg),
                  .waddr_cond(wc), .raddr_cond(rc), .wdata, .rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) shadow[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      wr_en = 1'($urandom); addr_local = 1'($urandom);
      wg = 2'($urandom); rg = 2'($urandom); wc = 2'($urandom); rc = 2'($urandom);
      wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr_local ? rc : rg]) begin
        failures++;
        if (failures < 10) $display("read mismatch %h exp %h", rdata, shadow[addr_local ? rc : rg]);
      end
      @(posedge clk);
      if (wr_en) shadow[addr_local ? wc : wg] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
