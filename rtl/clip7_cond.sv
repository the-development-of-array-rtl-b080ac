// clip7_cond: the 16-bit condition register of the CLIP7 chip.
//
// Loaded at a clock edge either with local data from the internal bus or with
// the present status of the element ({11'b0, nin_any, V, N, C, Z}), or held.
// Its contents drive local control: the activity bit selected by act_bit
// (active = !act_en || cond[act_bit]), the local ALU function [15:12], local
// B-register addresses [11:10]/[9:8] and the local connectivity mask [7:0].
// Loading is not gated by activity, so an inactive element can be re-enabled.
// The two load sources and the three kinds of use follow the design
// description; the bit assignment is this design's own.
module clip7_cond
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  cond_op_e     op,
  input  logic [W-1:0] bus,
  input  logic [W-1:0] status,
  input  logic         act_en,
  input  logic [3:0]   act_bit,
  output logic [W-1:0] q,
  output logic         active
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      unique case (op)
        COND_BUS:    q <= bus;
        COND_STATUS: q <= status;
        default:     q <= q;
      endcase
    end
  end
  assign active = !act_en || q[act_bit];
endmodule
