// clip7_chip: one CLIP7 chip, a single 16-bit processing element.
//
// Data path: the N_IN register and the B-registers share the line into ALU
// operand A; the shift register feeds operand B and the B-register inputs;
// the ALU result, the external memory bus and the D-register can drive the
// internal bus; the bus loads the shift register, the condition register,
// N_OUT, the D-register and the external memory. The condition register
// provides the four kinds of local control: activity (gates every register
// load except the condition register itself and the D chain shift), ALU
// function, B-register addresses and neighbourhood connectivity.
//
// Interface: ctrl is the microinstruction for this chip, valid for one clock.
// ext_rdata is the external memory bus as seen by the chip; ext_wdata is what
// the chip puts on it (the D-register when bus_src is BUS_D, else the ALU
// result), and the element outside decides whether it is driven. ext_wdata
// never depends on ext_rdata, so no combinational path runs through the chip.
// active reports the activity bit so that the memory write can be gated.
// All state changes at the rising clock edge; one microinstruction per clock.
//
// The blocks and their connections follow the original chip's data path; the
// control encoding, the status word and the activity gating are this
// design's own.
module clip7_chip
  import clip7_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  chip_ctrl_t       ctrl,
  input  logic [NPROP-1:0] prop_in,
  output logic             prop_out,
  input  logic [W-1:0]     data_in,
  output logic [W-1:0]     data_out,
  input  logic [W-1:0]     ext_rdata,
  output logic [W-1:0]     ext_wdata,
  output logic             active
);
  logic [W-1:0]     cond_q, b_q, sh_q, d_q, alu_y, bus, status, a_op;
  logic [NPROP-1:0] nin_q;
  logic             nin_any, fz, fc, fn, fv;

  clip7_cond u_cond (
    .clk, .rst, .op(ctrl.cond_op), .bus, .status,
    .act_en(ctrl.act_en), .act_bit(ctrl.act_bit), .q(cond_q), .active
  );

  clip7_nin u_nin (
    .clk, .rst, .load(ctrl.nin_load && active), .mask_local(ctrl.nin_local),
    .mask_global(ctrl.nin_mask), .mask_cond(cond_q[COND_MASK_LSB +: NPROP]),
    .prop_in, .q(nin_q), .nin_any
  );

  clip7_breg #(.N(NBREG)) u_breg (
    .clk, .rst, .wr_en(ctrl.b_we && active), .addr_local(ctrl.b_local),
    .waddr_global(ctrl.b_waddr), .raddr_global(ctrl.b_raddr),
    .waddr_cond(cond_q[COND_BWR_LSB +: BAW]), .raddr_cond(cond_q[COND_BRD_LSB +: BAW]),
    .wdata(sh_q), .rdata(b_q)
  );

  clip7_shift u_shift (.clk, .rst, .en(active), .op(ctrl.sh_op), .bus, .q(sh_q));

  assign a_op = ctrl.a_nin ? {{(W-NPROP){1'b0}}, nin_q} : b_q;

  clip7_alu u_alu (
    .op_global(ctrl.alu_op), .use_local(ctrl.alu_local),
    .cond_fn(cond_q[COND_ALU_LSB +: 4]), .carry_in(cond_q[ST_C]),
    .a(a_op), .b(sh_q), .y(alu_y),
    .flag_z(fz), .flag_c(fc), .flag_n(fn), .flag_v(fv)
  );

  assign status = {{(W-5){1'b0}}, nin_any, fv, fn, fc, fz};

  always_comb begin
    unique case (ctrl.bus_src)
      BUS_EXT: bus = ext_rdata;
      BUS_D:   bus = d_q;
      default: bus = alu_y;
    endcase
  end

  assign ext_wdata = (ctrl.bus_src == BUS_D) ? d_q : alu_y;

  clip7_nout u_nout (.clk, .rst, .load(ctrl.nout_load && active), .bus, .prop_out);

  clip7_dreg u_dreg (
    .clk, .rst, .op(ctrl.d_op), .load_en(active), .bus, .data_in, .q(d_q)
  );
  assign data_out = d_q;
endmodule
