// clip7a_controller: the CLIP7A array controller.
//
// A writable microcode store, a sequencer and the host interchange registers.
// The sequencer fetches the word at its program counter; if the word's wait
// conditions hold it is issued and its array and interchange fields are
// registered into the execute stage, which drives the array in the next
// clock. Otherwise an all-zero word (no operation) is registered and the
// program counter holds: a stall. The array therefore runs one clock behind
// the fetch, and a stall costs one array clock per cycle waited.
//
// Interface: host_uc_* loads microcode, host_start starts the sequencer at
// host_start_addr, host_busy is high while it runs. ctrl is the
// microinstruction broadcast to every element. array_din feeds both D chain
// entries; array_pdout/array_cdout are the chain exits.
module clip7a_controller
  import clip7_pkg::*;
#(
  parameter int unsigned UC_WORDS = 16384,
  parameter int unsigned UC_AW    = $clog2(UC_WORDS)
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
  output array_ctrl_t      ctrl,
  output logic [W-1:0]     array_din,
  input  logic [W-1:0]     array_pdout,
  input  logic [W-1:0]     array_cdout,
  output logic             stall_out     // a fetched word is waiting this cycle
);
  logic [UC_AW-1:0] pc;
  logic [UCW-1:0]   word;
  uinstr_t          ui;
  hif_ctrl_t        ex_hif;
  logic             running, issue, stall, din_ready, dout_free;

  clip7a_ucram #(.WORDS(UC_WORDS)) u_ucram (
    .clk, .we(host_uc_we), .waddr(host_uc_addr), .wdata(host_uc_wdata),
    .raddr(pc), .rdata(word)
  );
  assign ui = uinstr_t'(word);

  assign stall = (ui.hif.wait_in && !din_ready) || (ui.hif.wait_out && !dout_free);

  clip7a_sequencer #(.AW(UC_AW)) u_seq (
    .clk, .rst, .start(host_start), .start_addr(host_start_addr),
    .seq(ui.seq), .stall, .pc, .running, .issue
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl   <= '0;
      ex_hif <= '0;
    end else if (issue) begin
      ctrl   <= ui.arr;
      ex_hif <= ui.hif;
    end else begin
      ctrl   <= '0;
      ex_hif <= '0;
    end
  end

  clip7a_hostif u_hif (
    .clk, .rst, .host_din, .host_din_we, .host_din_full, .host_dout,
    .host_dout_valid, .host_dout_rd, .ex(ex_hif), .array_din, .array_pdout,
    .array_cdout, .din_ready, .dout_free
  );

  assign host_busy = running;
  assign stall_out = running && stall;
endmodule
