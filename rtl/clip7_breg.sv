// clip7_breg: the B-register file of the CLIP7 chip.
//
// NBREG 16-bit registers, written from the shift-register output and read as
// ALU operand A. Each address is either global (from the microinstruction) or
// local: read address from condition register [11:10], write address from
// [9:8], which is how the condition register acts as the addressing source of
// other registers. A write happens at the clock edge when wr_en is high; the
// read is combinational. The register count and the split of the condition
// bits are this design's own; the original chip has a small B-register file
// whose size is not known here.
module clip7_breg
  import clip7_pkg::*;
#(
  parameter int unsigned N  = NBREG,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic          addr_local,
  input  logic [AW-1:0] waddr_global,
  input  logic [AW-1:0] raddr_global,
  input  logic [AW-1:0] waddr_cond,
  input  logic [AW-1:0] raddr_cond,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] regs [N];
  logic [AW-1:0] wa, ra;

  assign wa    = addr_local ? waddr_cond : waddr_global;
  assign ra    = addr_local ? raddr_cond : raddr_global;
  assign rdata = regs[ra];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wa] <= wdata;
    end
  end
endmodule
