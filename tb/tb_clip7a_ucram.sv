// tb_clip7a_ucram: self-checking test of the 160-bit microcode store:
// random writes through the host port, reads at the sequencer port.
module tb_clip7a_ucram;
  import clip7_pkg::*;
  localparam int WORDS = 16384;
  logic clk = 0, we = 0;
  logic [13:0] wa = 0, ra = 0;
  logic [UCW-1:0] wd = 0, rd;
  logic [UCW-1:0] shadow [int];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clip7a_ucram dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  function automatic logic [UCW-1:0] rnd160();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // write the first and last words and a random set in between
    for (int i = 0; i < 3000; i++) begin
      we = 1;
      wa = (i == 0) ? 14'd0 : (i == 1) ? 14'(WORDS - 1) : 14'($urandom);
      wd = rnd160(); shadow[int'(wa)] = wd;
      @(posedge clk); #1;
    end
    we = 0;
    foreach (shadow[k]) begin
      ra = 14'(k); #1;
      checks++;
      if (rd !== shadow[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
