// clip7a_latch: the address latch of one CLIP7A processing element.
//
// Captures the element's address bus (a global address arriving through the
// buffer, or an address the co-processor computed) at a clock edge when ld is
// high, and holds it as the RAM address. A RAM access therefore uses the
// address placed on the bus one microinstruction earlier, so the next address
// can be formed while the current access runs. Modelled as an edge-triggered
// register, the timing is this design's own; only the low AW bits reach the
// RAM.
module clip7a_latch
  import clip7_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld,
  input  logic [W-1:0]  abus,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk) begin
    if (rst) addr <= '0;
    else if (ld) addr <= abus[AW-1:0];
  end
endmodule
