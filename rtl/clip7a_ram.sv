// clip7a_ram: the local data memory of one CLIP7A processing element.
//
// WORDS x 16 bits, written at the rising clock edge when we is high, read
// combinationally at the same address. The address is the output of the
// element's address latch, so it is stable for the whole cycle. 4K words
// follows the original element's memory size; the read timing is this design's
// choice.
module clip7a_ram
  import clip7_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];
  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
