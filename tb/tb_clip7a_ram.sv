// tb_clip7a_ram: self-checking test of the element data memory: random
// writes and reads over the whole 4K address space against a shadow array.
module tb_clip7a_ram;
  import clip7_pkg::*;
  logic clk = 0, we = 0;
  logic [11:0] addr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] shadow [4096];
  bit           known  [4096];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7a_ram dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      we = 1; addr = 12'(i); wdata = 16'($urandom); shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 8000; i++) begin
      we = 1'($urandom); addr = 12'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        if (failures < 10) $display("ram mismatch @%h %h exp %h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
