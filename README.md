# CLIP7A: a linear SIMD array with partial local autonomy

A SIMD processor array normally runs one instruction stream over all its
elements in lockstep. That suits low-level image processing, but the
intermediate and high-level steps that follow need elements that can do
somewhat different things. CLIP7A keeps the single instruction stream and
the lockstep timing. Each element can still change what one global
microinstruction does to it, in four ways:

* **activity**: whether the element takes part at all (its register and
  memory writes are suppressed if not);
* **data**: which memory word it reads or writes (a locally computed
  address) and which neighbours it listens to (a locally chosen
  connectivity mask);
* **function**: which ALU operation it applies to the globally moved data;
* **register addressing**: which of its B-registers it reads or writes.

All four are driven by a per-element 16-bit *condition register*. A second
processor chip in each element adds local memory addressing.

This repository holds synthesizable SystemVerilog for the whole digital
system: the CLIP7 chip, the two-chip CLIP7A processing element, the
256-element linear array and the microcode controller. It also has a
self-checking testbench for every module.

## System structure

```
 host / frame store                      clip7a_top
 ------------------      +------------------------------------------------+
 microcode load  ------> | clip7a_controller                              |
 start / busy    <-----> |   clip7a_ucram     16K x 160-bit microcode     |
 data words in   ------> |   clip7a_sequencer pc, loop counter, stack     |
 data words out  <------ |   clip7a_hostif    input/output registers      |
                         |        | one array_ctrl_t word per clock       |
                         |        v                                       |
                         | clip7a_array: PE 0 -- PE 1 -- ... -- PE 255    |
                         +------------------------------------------------+
```

The controller sends the same 96-bit word (`array_ctrl_t`) to every
element on each clock. Nothing else enters the array except words pushed
into the two data chains at its ends.

| Parameter | Default | Meaning |
|---|---|---|
| `N_PE` | 256 | elements; one line of a 256 x 256 image |
| `RAM_WORDS` | 4096 | 16-bit words of data memory per element |
| `UC_WORDS` | 16384 | 160-bit microcode words (specified as 16,000; rounded up to a power of two) |

## The CLIP7 chip (`clip7_chip`)

One chip is one 16-bit processing element:

```
 propagation in[7:0] --> N_IN ---+                  +--- B-registers <--+
                        (mask)   |  operand A       |                   |
                                 +------> ALU <-----+--- shift register-+
                                           |  operand B        ^
                                           v                   |
  internal bus  <-- ALU result | external memory | D-register  |
     |----> shift register -------------------------------------
     |----> condition register (or status flags)
     |----> N_OUT (bit 0) --> propagation out
     |----> D-register <----> chain DATA IN / DATA OUT
     '----> external memory (write data: ALU result or D-register)
```

* **ALU** (`clip7_alu`): 16 functions (logic, add, add with carry, both
  subtractions, increment, decrement). Operand A is a B-register or the
  N_IN register, zero-extended. Operand B is the shift register. It
  produces flags Z, C, N and V.
* **B-registers** (`clip7_breg`): four 16-bit registers, written from the
  shift register output.
* **Shift register** (`clip7_shift`): loaded from the bus, shifted one place
  left or right with zero fill.
* **N_IN** (`clip7_nin`): captures the eight one-bit propagation inputs,
  ANDed with a connectivity mask.
* **N_OUT** (`clip7_nout`): the registered propagation bit sent to the
  neighbours.
* **D-register** (`clip7_dreg`): the chip's I/O port. It either loads from
  the bus or takes the word from its chain neighbour. Chained through the
  array, these registers form a shift register that moves one word per
  element per clock.
* **Condition register** (`clip7_cond`): see the next section.

The chip's external bus is split into `ext_rdata` (in) and `ext_wdata`
(out). The element decides who drives the bus. `ext_wdata` never depends on
`ext_rdata`, so two chips can share a bus without a combinational loop.

## Local control: the condition register

This is the part of the design that goes beyond plain SIMD.

The condition register is loaded in one of two ways, selected by
`cond_op`:

* `COND_BUS` loads local data from the internal bus, for example a control
  word from memory or from the data chain.
* `COND_STATUS` loads the status of the current cycle:
  `{11'b0, nin_any, V, N, C, Z}`, where `nin_any` is the OR of N_IN.

A loaded value is used as follows:

| Bits | Used when | Effect |
|---|---|---|
| `cond[act_bit]` | `act_en = 1` | the element is active only if this bit is 1 |
| `[15:12]` | `alu_local = 1` | ALU function, instead of the global `alu_op` |
| `[11:10]` | `b_local = 1` | B-register read address |
| `[9:8]` | `b_local = 1` | B-register write address |
| `[7:0]` | `nin_local = 1` | connectivity mask for N_IN, instead of `nin_mask` |
| `[1]` (C) | `ALU_ADC` | carry in, for multi-word arithmetic |

An inactive element ignores every register load except these two:

* Loads of the condition register are never suppressed, so an element can
  always be switched back on.
* The D chain shift is never suppressed, so the chain never breaks.

An inactive processor chip also blocks writes to its element's RAM.
Because `act_bit` is chosen per instruction, the 16 condition bits can act
as 16 separate activity masks. Z, C, N and V from a status load are
directly usable.

Example: load a per-element control word into the condition register, then
issue one instruction with `alu_local = 1`, `act_en = 1`, `act_bit = 4` and
`ram_we = 1`. Each element whose bit 4 is set writes `f(A, B)` to memory,
where `f` is its own bits [15:12]. The other elements leave memory
unchanged.

## The CLIP7A processing element (`clip7a_pe`)

Each element pairs two CLIP7 chips:

```
  cdata_in_l --> [ CO-PROCESSOR ] --> cdata_out_r
                       |  ext bus = ADDRESS BUS <--- buffer <--- global address
                       +---> address latch ---> RAM address
                       |
                  [ TRANSCEIVER ]
                       |
   DATA BUS  <-------> RAM data
       |---> edge register (top) ---+
       |---> edge register (bottom)-+--> processor propagation inputs
       |
  pdata_out_l <-- [ PROCESSOR ] <-- pdata_in_r        prop_l/prop_r <-> neighbours
```

* The **processor** chip does the data work. Its external bus is the data
  bus to the RAM.
* The **co-processor** chip generates addresses. Its external bus is the
  address bus. An address it computes can be captured by the **address
  latch** (`clip7a_latch`) in place of the global address. That gives every
  element its own RAM address, for example a per-element base plus
  offset, or a pointer read from memory.
* The **transceiver** (`clip7a_busnet`) joins the two buses in either
  direction:
  * upward, the co-processor can read RAM words such as offsets or
    pointers;
  * downward, the processor can read the global address field as a
    broadcast constant, or the co-processor's result.
* Each bus has exactly one driver per cycle, chosen by `abus_src` and
  `dbus_src`. Tri-state buses are modelled as multiplexers.
* The **edge registers** (`clip7a_edge`) each take three bits from the data
  bus. Together with the left and right neighbours they fill the
  processor's eight propagation inputs, so a line of elements can emulate
  the 8-connected neighbourhood of a 2-D array: the rows above and below
  come from memory.

  | Input bit | Source |
  |---|---|
  | `[0]` | left neighbour |
  | `[1]` | right neighbour |
  | `[4:2]` | top edge register |
  | `[7:5]` | bottom edge register |

* The co-processor's own propagation inputs are tied to 0.

The RAM address always comes from the latch, so an access uses an address
put on the address bus by an *earlier* microinstruction. Address formation
and data access therefore overlap. For example, adding two memory operands
takes four microinstructions:

| Cycle | Address bus / latch | Data path |
|---|---|---|
| 1 | latch <= addr A | |
| 2 | latch <= addr B | shift <= RAM[A] |
| 3 | latch <= addr C | shift <= RAM[B], B0 <= shift (A) |
| 4 | | RAM[C] <= B0 + shift |

At the original system's 5 MHz clock, four cycles are 800 ns.

## The array (`clip7a_array`)

The elements stand in a line and share the microinstruction. Propagation
bits go to both neighbours. The ends of the line read 0.

There are two D chains:

* The processor chain enters at element N-1 and leaves at element 0.
* The co-processor chain runs the other way.

Both chain entries take the controller's input register. After N chain
shifts, the first word sent is in element 0.

## The controller

* **`clip7a_ucram`**: the host writes microcode. The sequencer reads the
  word at its program counter combinationally.
* **`clip7a_sequencer`**: steps through the microcode one word per clock.
  Its operations are `SEQ_NEXT`, `SEQ_JUMP`, `SEQ_LOOP`, `SEQ_CALL`,
  `SEQ_RET`, `SEQ_LDCNT` and `SEQ_HALT`.
  * `SEQ_LOOP` jumps while the loop counter is non-zero, decrementing it.
    After `LDCNT n`, the loop body runs n+1 times.
  * The return stack is 4 deep.
* **`clip7a_hostif`**: one input and one output register, each with a full
  flag.
  * The host fills the input register. A microinstruction with
    `din_take` empties it.
  * A microinstruction with `dout_ld` fills the output register from one
    chain end, chosen by `dout_sel`. The host empties it with
    `host_dout_rd`.
* **`clip7a_controller`**: a word with `wait_in` or `wait_out` whose
  register is not ready is not issued. An all-zero word (no operation) goes
  to the array instead, and the program counter holds. Issued words are
  registered, so the array executes each word one clock after it is
  fetched. The ready flags account for the word now executing, so a word
  that takes the input can be followed at once by one that waits for the
  next input.

### Microinstruction format (160 bits, `uinstr_t`)

| Bits | Field |
|---|---|
| 159:118 | reserved (zero) |
| 117:113 | `hif`: wait_in, din_take, wait_out, dout_ld, dout_sel |
| 112:96 | `seq`: op[2:0], target[13:0] (jump target, or count for LDCNT) |
| 95:60 | `arr.proc`: processor chip control (`chip_ctrl_t`) |
| 59:24 | `arr.coproc`: co-processor chip control (`chip_ctrl_t`) |
| 23:16 | `arr.pe`: abus_src, dbus_src, latch_ld, ram_we, edge_top_ld, edge_bot_ld |
| 15:0 | `arr.gaddr`: global address (or broadcast constant) |

`chip_ctrl_t`, most significant first:

| Bits | Field |
|---|---|
| 35:32 | `alu_op` |
| 31 | `alu_local` |
| 30 | `a_nin` |
| 29:28 | `b_raddr` |
| 27 | `b_local` |
| 26 | `b_we` |
| 25:24 | `b_waddr` |
| 23:22 | `sh_op` |
| 21:20 | `bus_src` |
| 19:18 | `cond_op` |
| 17 | `nin_load` |
| 16 | `nin_local` |
| 15:8 | `nin_mask` |
| 7 | `nout_load` |
| 6:5 | `d_op` |
| 4 | `act_en` |
| 3:0 | `act_bit` |

The all-zero word is a no-operation for every field. The encodings are in
`rtl/clip7_pkg.sv`.

## What is specified and what is this design's choice

These points come from the design's specification:

* the element's 16-bit width;
* the chip's blocks and how they connect (N_IN with eight propagation
  inputs, B-registers, ALU, shift register, condition register, N_OUT,
  D-register, external memory);
* the condition register's two load sources and its three uses (ALU
  function, enabling register loads, addressing other registers);
* the two-chip element with RAM, latch, buffer, transceiver and two edge
  registers, and the directions of its data chains;
* 256 elements, a 4K-word memory per element, and a controller built as a
  microcode sequencer with a 16,000 x 160-bit microcode RAM and registers
  for exchanging data with the host.

Everything else was chosen here, as the simplest thing that does the job.
Treat these points as design decisions, not as a reconstruction of the
original hardware:

* all control encodings, the ALU function list and the flags;
* four B-registers;
* the condition-bit assignment and activity gating;
* the N_OUT bit, the edge-register wiring and width;
* the registered latch timing, and the RAM read timing;
* the sequencer's operation set and stack;
* the interchange handshake.

Known departures and limits:

* The microcode store has 16384 words rather than 16,000.
* The RAM word is 16 bits. The original element worked with 8-bit data
  in external memory; 8-bit values fit in the low byte.
* The element specification shows a second connection from the address bus
  straight into the RAM. Here the RAM is addressed through the latch only.
* Each neighbour link carries one propagation bit in each direction. The
  remaining six propagation inputs come from the edge registers rather than
  from wider neighbour links.
* Propagation is one neighbour step per clock, through the N_OUT register.
  There is no asynchronous ripple across the array.
* The host workstation, its VME interface and the TV frame store are
  outside this design. The `host_*` ports carry the data that would pass
  between them and the controller.

## Worked example: a 2-D image on the linear array

`tb/tb_clip7a_image.sv` processes a whole 256 x 256 binary image with a
3 x 3 dilation. It shows how the line of elements stands in for a 2-D
array.

* **Storage.** Element i holds column i. For row r it keeps three words:
  the pixel at 4r, a *triple* at 4r+1 and the result at 4r+2. The
  co-processor in every element keeps the row pointer in its shift
  register and constant offsets in its B-registers. Every address is
  `B[k] + pointer`, formed on the address bus and captured by the latch
  one clock before it is used.
* **Pass 1 (5 clocks per row).** Each element puts its pixel on N_OUT.
  N_IN then captures the left and right neighbours' pixels (mask `0x03`).
  The element ORs them with its own pixel shifted up two places and stores
  the triple {pixel, right, left}.
* **Pass 2 (8 clocks per row).** The top edge register loads the triple of
  row r-1 and the bottom edge register the triple of row r+1. N_OUT
  carries the pixel of row r, so N_IN now holds all eight neighbours. The
  ALU ORs N_IN with the centre pixel and loads the status into the
  condition register. The element writes 1 everywhere, then 0 where it is
  still active under `act_bit = Z`. That second write is the activity
  mechanism turning a flag into a stored value.
* **Cost.** Both passes take 256 x 13 + 2 = 3,330 clocks, about 0.67 ms at
  5 MHz. Streaming the 65,536 pixels in and out through the one-word
  interchange registers takes far longer, about 395,000 clocks with the
  handshake used in the testbench.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* The register blocks, the ALU, the buses, the RAMs and the interchange
  registers are checked against reference values computed in the
  testbench.
* `tb_clip7_chip`, `tb_clip7a_pe` and `tb_clip7a_array` apply thousands of
  random microinstructions. Each cycle they compare the RTL with
  behavioural models in `tb/clip7_ref_pkg.sv`, written from the field
  definitions and independent of the RTL structure.
* `tb_clip7a_sequencer` compares the program counter with a reference of
  the sequencing rules under random stalls.
* `tb_clip7a_controller` checks the pipeline, the stalls and the data
  handoff.
* `tb_clip7a_top` runs the full-size system (256 elements, 4K-word
  memories, 16K-word microcode) end to end. Acting as host, it loads a
  56-word microprogram and streams in four 256-word lines with irregular
  gaps. It reads seven result lines back at an irregular pace and checks
  every word (1,792 words). The lines are:
  * A + B;
  * the activity-gated local function;
  * the locally addressed B-register;
  * the masked neighbourhood;
  * a locally addressed memory read;
  * the co-processor's addresses;
  * a broadcast constant.

  It also checks that the memory-to-memory addition takes four
  microinstructions. It counts each mechanism (stalls on input and output,
  inactive writes, local function, local B addressing, local connectivity,
  co-processor addressing, both transceiver directions, edge loads,
  propagation, both chains, calls, loops) and fails if any never happened.
  It takes about 8,600 clocks.
* `tb_clip7a_image` runs the image example above at full size and checks
  all 65,536 result pixels against a dilation computed in the testbench.
  It also checks the 3,330-clock compute time.

## Simulating

The package must come first. The reference package is needed by the
chip, element, array and top testbenches. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_clip7a_top \
    rtl/clip7_pkg.sv tb/clip7_ref_pkg.sv tb/tb_clip7a_top.sv -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl`. Any testbench runs the same way;
replace the top module and file. `tb_clip7a_top` builds in about half a
minute and runs in under a second; `tb_clip7a_image` runs in about
8 seconds. Smaller arrays only need `N_PE`,
`RAM_WORDS` and `UC_WORDS` overridden on `clip7a_top`. `tb_clip7a_array`
shows an 8-element array with 64-word memories.

Each module file begins with a comment giving its function, interface and
timing.
