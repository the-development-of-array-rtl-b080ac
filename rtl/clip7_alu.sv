// clip7_alu: the 16-bit function generator of the CLIP7 chip.
//
// Combinational. Operand A comes from the B-registers or the N_IN register,
// operand B from the shift register. The function is either the global one
// from the microinstruction or, under local function control, the top four
// bits of the condition register, so each element may run a different
// operation on globally moved data. Flags Z, C, N, V describe the result and
// feed the condition register's status load. The chip's 16-bit width and the
// local choice of function are part of the original chip; the operation list
// and the flag definitions are this design's own.
module clip7_alu
  import clip7_pkg::*;
(
  input  alu_op_e      op_global,
  input  logic         use_local,   // take the function from cond_fn
  input  logic [3:0]   cond_fn,     // condition register [15:12]
  input  logic         carry_in,    // used by ALU_ADC
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         flag_z,
  output logic         flag_c,      // carry out of add/inc, not-borrow of subtract/dec
  output logic         flag_n,
  output logic         flag_v
);
  alu_op_e op;
  logic [W:0] wide;

  always_comb begin
    op = use_local ? alu_op_e'(cond_fn) : op_global;
    wide   = '0;
    flag_v = 1'b0;
    unique case (op)
      ALU_ZERO: wide = '0;
      ALU_A:    wide = {1'b0, a};
      ALU_B:    wide = {1'b0, b};
      ALU_NOTA: wide = {1'b0, ~a};
      ALU_AND:  wide = {1'b0, a & b};
      ALU_OR:   wide = {1'b0, a | b};
      ALU_XOR:  wide = {1'b0, a ^ b};
      ALU_ADD: begin
        wide   = {1'b0, a} + {1'b0, b};
        flag_v = (a[W-1] == b[W-1]) && (wide[W-1] != a[W-1]);
      end
      ALU_ADC: begin
        wide   = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, carry_in};
        flag_v = (a[W-1] == b[W-1]) && (wide[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        wide   = {1'b0, a} + {1'b0, ~b} + 1'b1;
        flag_v = (a[W-1] != b[W-1]) && (wide[W-1] != a[W-1]);
      end
      ALU_RSUB: begin
        wide   = {1'b0, b} + {1'b0, ~a} + 1'b1;
        flag_v = (a[W-1] != b[W-1]) && (wide[W-1] != b[W-1]);
      end
      ALU_INC:  wide = {1'b0, a} + 1'b1;
      ALU_DEC:  wide = {1'b0, a} + {1'b0, {W{1'b1}}};
      ALU_ANDN: wide = {1'b0, a & ~b};
      ALU_XNOR: wide = {1'b0, ~(a ^ b)};
      ALU_ONES: wide = {1'b0, {W{1'b1}}};
      default:  wide = '0;
    endcase
    y      = wide[W-1:0];
    flag_c = wide[W];
    flag_z = (y == '0);
    flag_n = y[W-1];
  end
endmodule
