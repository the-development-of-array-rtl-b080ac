// clip7_pkg: shared widths, operation codes and microinstruction layout for
// the CLIP7 chip and the CLIP7A array.
//
// The 16-bit data width, the eight neighbourhood (propagation) inputs, the
// 160-bit microcode word and the 4K-word data memory per element are fixed by
// the design. Every operation code and the packing of the microinstruction
// fields into the 160-bit word are this design's own choices: one field per
// control point of the chip data path (ALU, B-registers, shift register,
// condition register, N_IN/N_OUT, D-register), per bus of the processing
// element, and for the sequencer and the host interface registers.
package clip7_pkg;

  localparam int unsigned W      = 16;  // processing element word
  localparam int unsigned NPROP  = 8;   // propagation inputs of one chip
  localparam int unsigned NBREG  = 4;   // B-registers
  localparam int unsigned BAW    = 2;   // B-register address width
  localparam int unsigned UCW    = 160; // microcode word width
  localparam int unsigned UCAW   = 14;  // microcode address width

  typedef enum logic [3:0] {
    ALU_ZERO = 4'd0,  ALU_A    = 4'd1,  ALU_B    = 4'd2,  ALU_NOTA = 4'd3,
    ALU_AND  = 4'd4,  ALU_OR   = 4'd5,  ALU_XOR  = 4'd6,  ALU_ADD  = 4'd7,
    ALU_SUB  = 4'd8,  ALU_RSUB = 4'd9,  ALU_INC  = 4'd10, ALU_DEC  = 4'd11,
    ALU_ANDN = 4'd12, ALU_ADC  = 4'd13, ALU_XNOR = 4'd14, ALU_ONES = 4'd15
  } alu_op_e;

  typedef enum logic [1:0] {SH_HOLD, SH_LOAD, SH_LEFT, SH_RIGHT} sh_op_e;
  // Sources of the chip's internal bus (value 3 is unused and selects the ALU).
  typedef enum logic [1:0] {BUS_ALU, BUS_EXT, BUS_D, BUS_RSVD} bus_src_e;
  typedef enum logic [1:0] {COND_HOLD, COND_BUS, COND_STATUS, COND_RSVD} cond_op_e;
  typedef enum logic [1:0] {D_HOLD, D_LOAD, D_SHIFT, D_RSVD} d_op_e;

  // Bit fields of the condition register used for local control.
  localparam int unsigned COND_ALU_LSB  = 12; // [15:12] local ALU function
  localparam int unsigned COND_BRD_LSB  = 10; // [11:10] local B read address
  localparam int unsigned COND_BWR_LSB  = 8;  // [9:8]   local B write address
  localparam int unsigned COND_MASK_LSB = 0;  // [7:0]   local connectivity mask

  // Status word loaded by COND_STATUS: {11'b0, nin_any, V, N, C, Z}.
  localparam int unsigned ST_Z = 0, ST_C = 1, ST_N = 2, ST_V = 3, ST_NIN = 4;

  // Control of one CLIP7 chip for one clock cycle (36 bits).
  typedef struct packed {
    alu_op_e        alu_op;     // global ALU function
    logic           alu_local;  // take the ALU function from cond[15:12]
    logic           a_nin;      // ALU A operand: 1 = N_IN register, 0 = B-register
    logic [BAW-1:0] b_raddr;    // global B-register read address
    logic           b_local;    // B addresses from cond[11:10] / cond[9:8]
    logic           b_we;       // write shift-register output into a B-register
    logic [BAW-1:0] b_waddr;    // global B-register write address
    sh_op_e         sh_op;
    bus_src_e       bus_src;
    cond_op_e       cond_op;
    logic           nin_load;   // capture masked propagation inputs
    logic           nin_local;  // mask from cond[7:0] instead of nin_mask
    logic [NPROP-1:0] nin_mask; // global connectivity mask
    logic           nout_load;  // propagation output <= bus[0]
    d_op_e          d_op;
    logic           act_en;     // activity control on
    logic [3:0]     act_bit;    // condition bit that enables the element
  } chip_ctrl_t;

  typedef enum logic [1:0] {AB_GLOBAL, AB_COPROC, AB_XCVR, AB_ZERO} abus_src_e;
  typedef enum logic [1:0] {DB_RAM, DB_PROC, DB_XCVR, DB_ZERO} dbus_src_e;

  // Control of the glue logic of one CLIP7A processing element (8 bits).
  typedef struct packed {
    abus_src_e abus_src;     // who drives the address bus
    dbus_src_e dbus_src;     // who drives the data bus
    logic      latch_ld;     // address latch <= address bus
    logic      ram_we;       // RAM[latch] <= data bus (if the processor is active)
    logic      edge_top_ld;  // top edge register <= data bus[2:0]
    logic      edge_bot_ld;  // bottom edge register <= data bus[2:0]
  } pe_ctrl_t;

  // Everything broadcast to the array in one cycle (96 bits).
  typedef struct packed {
    chip_ctrl_t   proc;
    chip_ctrl_t   coproc;
    pe_ctrl_t     pe;
    logic [W-1:0] gaddr;     // global address, enters each element through its buffer
  } array_ctrl_t;

  typedef enum logic [2:0] {
    SEQ_NEXT, SEQ_JUMP, SEQ_LOOP, SEQ_CALL, SEQ_RET, SEQ_LDCNT, SEQ_HALT, SEQ_RSVD
  } seq_op_e;

  typedef struct packed {
    seq_op_e         op;
    logic [UCAW-1:0] target;  // jump/call target, or count for SEQ_LDCNT
  } seq_ctrl_t;

  // Host interchange register control (5 bits).
  typedef struct packed {
    logic wait_in;   // stall until the input register is full
    logic din_take;  // consume the input register word
    logic wait_out;  // stall until the output register is empty
    logic dout_ld;   // capture the end of a D chain into the output register
    logic dout_sel;  // 0: processor chain (left end), 1: co-processor chain (right end)
  } hif_ctrl_t;

  typedef struct packed {
    logic [UCW-96-UCAW-3-5-1:0] rsvd;
    hif_ctrl_t   hif;
    seq_ctrl_t   seq;
    array_ctrl_t arr;
  } uinstr_t;

endpackage
