// clip7a_hostif: the controller's data interchange registers.
//
// An input register the host (or frame store) fills and the array consumes,
// and an output register the array fills and the host empties, each with a
// full flag. The input word is presented at both D chain entries of the
// array; din_take (from the executing microinstruction) empties it. dout_ld
// captures the left end of the processor chain (dout_sel 0) or the right end
// of the co-processor chain (dout_sel 1). A host write to a full input
// register is ignored. din_ready/dout_free tell the sequencer whether a
// microinstruction that waits on them may issue, allowing for the action of
// the microinstruction now executing. Registers for this interchange follow
// the controller description; the flag handshake is this design's own.
module clip7a_hostif
  import clip7_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // host side
  input  logic [W-1:0] host_din,
  input  logic         host_din_we,
  output logic         host_din_full,
  output logic [W-1:0] host_dout,
  output logic         host_dout_valid,
  input  logic         host_dout_rd,
  // executing microinstruction
  input  hif_ctrl_t    ex,
  // array side
  output logic [W-1:0] array_din,
  input  logic [W-1:0] array_pdout,
  input  logic [W-1:0] array_cdout,
  // to the sequencer
  output logic         din_ready,
  output logic         dout_free
);
  logic [W-1:0] din_q;
  logic         din_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      din_q           <= '0;
      din_full        <= 1'b0;
      host_dout       <= '0;
      host_dout_valid <= 1'b0;
    end else begin
      if (ex.din_take) din_full <= 1'b0;
      else if (host_din_we && !din_full) begin
        din_q    <= host_din;
        din_full <= 1'b1;
      end
      if (ex.dout_ld) begin
        host_dout       <= ex.dout_sel ? array_cdout : array_pdout;
        host_dout_valid <= 1'b1;
      end else if (host_dout_rd) host_dout_valid <= 1'b0;
    end
  end

  assign host_din_full = din_full;
  assign array_din     = din_q;
  assign din_ready     = din_full && !ex.din_take;
  assign dout_free     = !host_dout_valid && !ex.dout_ld;
endmodule
