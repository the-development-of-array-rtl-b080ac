// clip7a_top: the CLIP7A system, a microcode controller driving a linear
// array of two-chip processing elements.
//
// The host (a workstation in the original system) and the TV frame store are
// outside this design: the host_* ports carry what they exchange with the
// controller, i.e. microcode loading, start/busy and words moved into and
// out of the array through the interchange registers. prop brings out every
// element's propagation bit and stall shows when the controller waits on the
// host. Defaults: 256 elements, 4K words of data memory each, 16K words of
// microcode.
module clip7a_top
  import clip7_pkg::*;
#(
  parameter int unsigned N_PE      = 256,
  parameter int unsigned RAM_WORDS = 4096,
  parameter int unsigned UC_WORDS  = 16384,
  parameter int unsigned UC_AW     = $clog2(UC_WORDS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             host_uc_we,
  input  logic [UC_AW-1:0] host_uc_addr,
  input  logic [UCW-1:0]   host_uc_wdata,
  input  logic             host_start,
  input  logic [UC_AW-1:0] host_start_addr,
  output logic             host_busy,
  input  logic [W-1:0]     host_din,
  input  logic             host_din_we,
  output logic             host_din_full,
  output logic [W-1:0]     host_dout,
  output logic             host_dout_valid,
  input  logic             host_dout_rd,
  output logic [N_PE-1:0]  prop,
  output logic             stall
);
  array_ctrl_t  ctrl;
  logic [W-1:0] din, pdout, cdout;

  clip7a_controller #(.UC_WORDS(UC_WORDS)) u_ctl (
    .clk, .rst, .host_uc_we, .host_uc_addr, .host_uc_wdata, .host_start,
    .host_start_addr, .host_busy, .host_din, .host_din_we, .host_din_full,
    .host_dout, .host_dout_valid, .host_dout_rd, .ctrl, .array_din(din),
    .array_pdout(pdout), .array_cdout(cdout), .stall_out(stall)
  );

  clip7a_array #(.N_PE(N_PE), .RAM_WORDS(RAM_WORDS)) u_arr (
    .clk, .rst, .ctrl, .pdata_in(din), .pdata_out(pdout),
    .cdata_in(din), .cdata_out(cdout), .prop
  );
endmodule
