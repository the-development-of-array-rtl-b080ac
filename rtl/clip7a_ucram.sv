// clip7a_ucram: the controller's writable microcode store.
//
// WORDS words of 160 bits. The host writes a word at a clock edge through
// the write port; the sequencer reads the word at its program counter
// combinationally, so a fetched microinstruction is decoded in the same
// cycle. The word width follows the controller description; the size
// default, 16384, is the power of two that holds the 16,000 words given for
// the store.
module clip7a_ucram
  import clip7_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [UCW-1:0] wdata,
  input  logic [AW-1:0]  raddr,
  output logic [UCW-1:0] rdata
);
  logic [UCW-1:0] mem [WORDS];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
