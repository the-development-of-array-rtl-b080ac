// clip7a_sequencer: the microcode sequencer of the CLIP7A controller.
//
// Holds the program counter, a loop counter and a small return stack. The
// host starts it at an address; it then steps through the microcode, one
// microinstruction per clock, until a SEQ_HALT. When stall is high the
// current microinstruction is not issued and the program counter holds.
// Operations: NEXT (pc+1), JUMP, LOOP (if the counter is non-zero, decrement
// it and jump, else fall through), CALL/RET, LDCNT (counter <= target) and
// HALT. A CALL on a full stack overwrites the top entry; a RET on an empty
// stack returns to address 0. A microcode sequencer as the controller follows
// the system description; its operation set, the counter and the stack depth
// are this design's own.
module clip7a_sequencer
  import clip7_pkg::*;
#(
  parameter int unsigned AW    = UCAW,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW-1:0] start_addr,
  input  seq_ctrl_t     seq,          // sequencing field of the word at pc
  input  logic          stall,
  output logic [AW-1:0] pc,
  output logic          running,
  output logic          issue         // the word at pc executes this cycle
);
  localparam int unsigned SPW = $clog2(DEPTH + 1);
  localparam int unsigned IW  = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0]  cnt;
  logic [AW-1:0]  stack [DEPTH];
  logic [SPW-1:0] sp;        // number of entries on the stack
  logic [AW-1:0]  pc_inc, tgt;

  assign issue  = running && !stall;
  assign pc_inc = pc + 1'b1;
  assign tgt    = seq.target[AW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      cnt     <= '0;
      sp      <= '0;
      running <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) stack[i] <= '0;
    end else if (start) begin
      pc      <= start_addr;
      sp      <= '0;
      running <= 1'b1;
    end else if (issue) begin
      unique case (seq.op)
        SEQ_JUMP: pc <= tgt;
        SEQ_LOOP: begin
          if (cnt != '0) begin
            cnt <= cnt - 1'b1;
            pc  <= tgt;
          end else pc <= pc_inc;
        end
        SEQ_CALL: begin
          if (sp == SPW'(DEPTH)) stack[DEPTH-1] <= pc_inc;
          else begin
            stack[IW'(sp)] <= pc_inc;
            sp        <= sp + 1'b1;
          end
          pc <= tgt;
        end
        SEQ_RET: begin
          if (sp == '0) pc <= '0;
          else begin
            pc <= stack[IW'(sp - 1'b1)];
            sp <= sp - 1'b1;
          end
        end
        SEQ_LDCNT: begin
          cnt <= tgt;
          pc  <= pc_inc;
        end
        SEQ_HALT: running <= 1'b0;
        default:  pc <= pc_inc;
      endcase
    end
  end
endmodule
