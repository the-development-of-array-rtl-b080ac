// clip7a_edge: an edge register of one CLIP7A processing element.
//
// The element has two, above and below the processor chip. Each captures
// three bits of the data bus at a clock edge when ld is high and presents
// them as three of the processor's eight propagation inputs. With left and
// right neighbours giving the other two, the linear array can emulate the
// eight-connected neighbourhood of a 2-D array, the rows above and below
// being taken from memory. This reading of the edge registers, and their
// width, are this design's own.
module clip7a_edge
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] dbus,
  output logic [2:0]   q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (ld) q <= dbus[2:0];
  end
endmodule
