// clip7a_busnet: the two buses of a CLIP7A processing element, with the
// buffer and the transceiver that join them.
//
// The address bus links the co-processor chip, the global-address buffer,
// the address latch and one side of the transceiver. The data bus links the
// RAM, the processor chip, the edge registers and the other side of the
// transceiver. Each bus has one driver per cycle, chosen by the
// microinstruction: on the address bus the buffer (global address), the
// co-processor, or the transceiver passing the data bus upward; on the data
// bus the RAM, the processor, or the transceiver passing the address bus
// downward. The transceiver passes only the value a bus would carry without
// it, so there is no loop. Tri-state buses are modelled as multiplexers; the
// selection codes are this design's own.
module clip7a_busnet
  import clip7_pkg::*;
(
  input  abus_src_e    abus_src,
  input  dbus_src_e    dbus_src,
  input  logic [W-1:0] gaddr,         // through the buffer
  input  logic [W-1:0] coproc_wdata,
  input  logic [W-1:0] ram_rdata,
  input  logic [W-1:0] proc_wdata,
  output logic [W-1:0] abus,
  output logic [W-1:0] dbus
);
  logic [W-1:0] abus_local, dbus_local;

  always_comb begin
    unique case (abus_src)
      AB_GLOBAL: abus_local = gaddr;
      AB_COPROC: abus_local = coproc_wdata;
      default:   abus_local = '0;
    endcase
    unique case (dbus_src)
      DB_RAM:  dbus_local = ram_rdata;
      DB_PROC: dbus_local = proc_wdata;
      default: dbus_local = '0;
    endcase
    abus = (abus_src == AB_XCVR) ? dbus_local : abus_local;
    dbus = (dbus_src == DB_XCVR) ? abus_local : dbus_local;
  end
endmodule
