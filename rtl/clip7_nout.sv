// clip7_nout: the N_OUT register of the CLIP7 chip.
//
// Holds the chip's one-bit propagation output, sent to all neighbours. It is
// loaded from bit 0 of the internal bus at a clock edge when load is high;
// the caller gates load with the element's activity. A registered output
// follows the original chip; taking bit 0 is this design's choice.
module clip7_nout
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] bus,
  output logic         prop_out
);
  always_ff @(posedge clk) begin
    if (rst) prop_out <= 1'b0;
    else if (load) prop_out <= bus[0];
  end
endmodule
