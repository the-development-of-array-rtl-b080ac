// clip7_shift: the shift register of the CLIP7 chip.
//
// A 16-bit register loaded from the chip's internal bus, shifted one place
// left or right (zero filled), or held. Its output is ALU operand B and the
// write data of the B-registers. The loss of the bit shifted out is this
// design's choice. One operation per clock when en is high.
module clip7_shift
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         en,     // element active
  input  sh_op_e       op,
  input  logic [W-1:0] bus,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (en) begin
      unique case (op)
        SH_HOLD:  q <= q;
        SH_LOAD:  q <= bus;
        SH_LEFT:  q <= {q[W-2:0], 1'b0};
        SH_RIGHT: q <= {1'b0, q[W-1:1]};
        default:  q <= q;
      endcase
    end
  end
endmodule
