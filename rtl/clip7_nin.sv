// clip7_nin: the N_IN (neighbourhood input) register of the CLIP7 chip.
//
// Captures the eight one-bit propagation inputs at a clock edge, each ANDed
// with a connectivity mask. The mask is global (from the microinstruction) or
// local (condition register [7:0]), which lets every element choose its own
// neighbourhood connectivity. nin_any is the OR of the register and is part of
// the status word. Eight inputs follow the original chip; the AND mask and the
// OR summary are this design's own.
module clip7_nin
  import clip7_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             mask_local,
  input  logic [NPROP-1:0] mask_global,
  input  logic [NPROP-1:0] mask_cond,
  input  logic [NPROP-1:0] prop_in,
  output logic [NPROP-1:0] q,
  output logic             nin_any
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (load) q <= prop_in & (mask_local ? mask_cond : mask_global);
  end
  assign nin_any = |q;
endmodule
