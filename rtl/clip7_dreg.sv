// clip7_dreg: the D-register, the data input/output port of the CLIP7 chip.
//
// A 16-bit register that is either loaded from the internal bus or shifted
// along the chain of D-registers that runs through the array: on D_SHIFT it
// takes the word at data_in (the previous element's data_out). Words enter
// and leave the array this way, one element per clock, while the rest of the
// chip can keep working. D_LOAD is gated by activity through load_en; the
// chain shift is global so the chain never breaks. The register and its
// DATA IN / DATA OUT ports follow the original chip; the operation encoding is
// this design's own.
module clip7_dreg
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  d_op_e        op,
  input  logic         load_en,
  input  logic [W-1:0] bus,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (op == D_SHIFT) q <= data_in;
    else if (op == D_LOAD && load_en) q <= bus;
  end
endmodule
