// clip7a_pe: one CLIP7A processing element, two CLIP7 chips in tandem.
//
// The processor chip manipulates data: it reads and writes the local RAM over
// the data bus, exchanges its propagation bit with the left and right
// neighbours, and reads two edge registers as the rest of its eight-bit
// neighbourhood. The co-processor chip generates addresses: its external bus
// is the element's address bus, so an address it computes can be captured by
// the address latch in place of the global address from the buffer. This is
// what gives each element its own data memory address. Through the
// transceiver the co-processor can also read RAM words (for example pointer
// tables) and the processor can read the address bus.
//
// Propagation inputs of the processor: [0] left neighbour, [1] right
// neighbour, [4:2] top edge register, [7:5] bottom edge register. The
// co-processor's propagation inputs are tied to 0. The processor's D chain
// runs right to left (data_in_r to data_out_l), the co-processor's left to
// right, as in the original element.
//
// Timing: one microinstruction per clock. A RAM access uses the latch value
// set by an earlier microinstruction. The RAM is written when ram_we is set
// and the processor chip is active.
//
// The two-chip structure, the RAM, latch, buffer, transceiver, edge registers
// and the data in/out directions follow the original element; the edge wiring
// and all control codes are this design's own.
module clip7a_pe
  import clip7_pkg::*;
#(
  parameter int unsigned RAM_WORDS = 4096
) (
  input  logic         clk,
  input  logic         rst,
  input  array_ctrl_t  ctrl,
  // processor chip: propagation bit shared with both neighbours
  input  logic         prop_l,
  input  logic         prop_r,
  output logic         prop_out,
  // processor D chain, right to left
  input  logic [W-1:0] pdata_in_r,
  output logic [W-1:0] pdata_out_l,
  // co-processor D chain, left to right
  input  logic [W-1:0] cdata_in_l,
  output logic [W-1:0] cdata_out_r
);
  localparam int unsigned AW = $clog2(RAM_WORDS);

  logic [W-1:0]  abus, dbus, ram_rdata, proc_wdata, coproc_wdata;
  logic [AW-1:0] addr;
  logic [2:0]    edge_top, edge_bot;
  logic          proc_active, coproc_active, coproc_prop;

  clip7_chip u_coproc (
    .clk, .rst, .ctrl(ctrl.coproc), .prop_in('0), .prop_out(coproc_prop),
    .data_in(cdata_in_l), .data_out(cdata_out_r),
    .ext_rdata(abus), .ext_wdata(coproc_wdata), .active(coproc_active)
  );

  clip7_chip u_proc (
    .clk, .rst, .ctrl(ctrl.proc),
    .prop_in({edge_bot, edge_top, prop_r, prop_l}), .prop_out,
    .data_in(pdata_in_r), .data_out(pdata_out_l),
    .ext_rdata(dbus), .ext_wdata(proc_wdata), .active(proc_active)
  );

  clip7a_busnet u_bus (
    .abus_src(ctrl.pe.abus_src), .dbus_src(ctrl.pe.dbus_src), .gaddr(ctrl.gaddr),
    .coproc_wdata, .ram_rdata, .proc_wdata, .abus, .dbus
  );

  clip7a_latch #(.AW(AW)) u_latch (.clk, .rst, .ld(ctrl.pe.latch_ld), .abus, .addr);

  clip7a_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk, .we(ctrl.pe.ram_we && proc_active), .addr, .wdata(dbus), .rdata(ram_rdata)
  );

  clip7a_edge u_edge_top (.clk, .rst, .ld(ctrl.pe.edge_top_ld), .dbus, .q(edge_top));
  clip7a_edge u_edge_bot (.clk, .rst, .ld(ctrl.pe.edge_bot_ld), .dbus, .q(edge_bot));
endmodule
