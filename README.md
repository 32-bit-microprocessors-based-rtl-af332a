# A G/100-style TRON processor pipeline in SystemVerilog

A CISC instruction set with variable-length instructions, a rich set of
addressing modes and high-level instructions for bitmaps does not have to be
slow. That is the idea of this design: a five-stage pipeline (IF, D, A, OF, E)
modelled on the G/100, a 32-bit processor of the TRON architecture. Two
mechanisms carry most of its speed, and this RTL builds both in full:

* **Pre-jump.** Jumps are resolved in the decode stage, so the fetch unit is
  redirected three stages before the jump executes. Conditional branches are
  predicted by a 1-bit x 256-entry history table. Subroutine returns are
  predicted by an 8-entry on-chip copy of the return-address stack. A
  256-byte branch buffer hides the memory latency at the jump target. The
  execute stage checks every guess, and flushes the pipe when a guess was
  wrong.
* **A bus-saturating bitmap engine.** Bitmap instructions (BVMAP, BVCPY,
  BVSCH) work on bit lines of any length at any bit offset. The execute stage
  runs them as a software-pipelined loop of three steps per 32-bit block, with
  one memory access in each step. The external bus is therefore busy in every
  cycle of a bitmap operation.

Around these sit the other hardware parts of the processor:

* a 16-byte instruction queue;
* the operand address generator of the A-stage;
* the operand fetch of the OF-stage;
* the register file, with a stack pointer per protection ring;
* a 32-bit ALU and a barrel shifter;
* a one-word store buffer;
* the selection logic for exceptions, interrupts and traps (EIT);
* a bus interface for a 32-bit address / 32-bit data bus with a 2-clock
  minimum bus cycle.

Two parts are missing. The instruction decoder and the microprogram (ROM and
sequencer) are not in the RTL, because the TRON opcode encodings and the
G/100 microcode are not published. The top module brings their signals out as
ports instead. The end-to-end testbench plays their part.

All files are SystemVerilog 2017 and synthesizable, except the testbenches.
At default sizes the top synthesises (yosys, generic cells, flattened) to
about 30,000 cells. Of these, 2,353 are flip-flops of logic and 3,584 hold
the branch buffer.

## Block map

```
             +---------------------- gmicro100_top -----------------------+
             |                                                            |
 ext. bus <--+-- bus_interface <--+-- store_buffer <----------+           |
 (32/32,     |   (T1/T2 cycles,   +-- exec_unit operand reads |           |
  2 clk min) |    fixed priority) +-- operand_fetch reads     |           |
             |                    +-- operand_addr_gen reads  |           |
             |                    +-- ifetch_unit             |           |
             |                                                |           |
  IF         |  ifetch_unit: instr_queue (16 B) + branch_buffer (64 x 4 B)|
             |        |  q_data/q_pc (queue head)    ^ redirect           |
  D  decoder | <------+                              |                    |
   (outside) | d_* -----------> prejump_unit --------+ (pre-branch,       |
             |                  BPT 1x256, PC stack 8   pre-return)       |
  A          | ac_* ----------> operand_addr_gen                          |
             |                        | F-code                            |
  OF         | s_* <----------- operand_fetch (operand read)              |
  E          | uop_* ---------> exec_unit: gpr_file, alu32,               |
             |                  barrel_shifter, bitmap_engine --> stores  |
             | e_* -----------> prejump_unit check --> flush              |
             | EIT requests --> eit_controller --> vector, table address  |
             +------------------------------------------------------------+
```

`gm_pkg` holds the shared types:

* `bus_req_t` and `bus_rsp_t`: the internal bus port;
* `ctrl_kind_e`: the kind of a control-transfer instruction;
* `uop_t`: the micro-operations of the E-stage;
* `acode_t`, `fcode_t` and `scode_t`: the A-stage input, the A-stage
  output and the OF-stage output;
* `events_t`: one-clock event pulses for monitoring.

## Pre-jump: keeping the pipe full across jumps

Files: `prejump_unit.sv`, `branch_pred_table.sv`, `pc_stack.sv`.

The decoder presents every decoded control transfer to the pre-jump unit
(`d_valid`, `d_kind`, `d_pc`, `d_disp`, `d_len`). The unit answers
combinationally, in the same clock, with one of these actions:

| instruction     | D-stage action                                               |
|-----------------|--------------------------------------------------------------|
| BRA, BSR        | always redirect fetch to `d_pc + d_disp` (the PC adder)      |
| ACB / SCB loops | always redirect, since loop branches are nearly always taken |
| Bcc             | redirect if the history table entry for `d_pc[8:1]` says taken |
| RTS / EXITD     | pop PC1 from the PC stack and redirect to it                 |

There are two special cases:

* A BSR, or any other call (`CT_CALL`), also pushes `d_pc + d_len` onto the
  PC stack.
* A return that finds the PC stack empty is not redirected (`d_pret = 0`).

The prediction (`d_pred`), the pre-return flag (`d_pret`) and PC1 (`d_pc1`)
must travel down the pipe with the instruction. The outside pipeline carries
them. At the E-stage they come back on the `e_*` inputs, together with the
real outcome:

* **Bcc** writes its outcome into the history table. If the prediction was
  wrong it raises `flush`. `flush_target` is then the branch target or the
  fall-through address, whichever is correct.
* **ACB/SCB** that falls through flushes to `e_pc + e_len`.
* **A return** compares PC1 with PC2. PC2 is the return address that the
  microprogram has just popped from the real stack in memory. If the two are
  equal, nothing happens. If they differ, or no pre-return was made, the unit
  flushes to PC2.

The table is a direct-mapped array of 1-bit entries, with no tags. Two Bcc
whose addresses share bits [8:1] share an entry.

The PC stack is circular. Pushing onto a full stack overwrites the oldest
entry, so deep recursion loses the outermost return addresses: those returns
are simply not pre-returned, and the E-stage check recovers them.

If a flush and a D-stage action happen in the same clock, the flush wins.
The younger D-stage instruction is on the wrong path, so the unit neither
pushes, pops nor redirects for it.

**Push at decode.** The return address is pushed when the call is decoded,
not when it executes. A return decoded a few clocks after its call therefore
already finds the address. The price is that a call decoded on a wrong path
leaves a stale entry on the PC stack. That costs no correctness: the PC1/PC2
comparison catches the wrong pre-return it causes.

The end-to-end testbench exercises all of these cases:

* pre-branches, and a Bcc loop learned by the history table;
* a loop instruction falling through;
* pre-return hits, and a return whose stack slot was changed (a miss);
* recursion ten calls deep, which overflows the PC stack;
* instructions fetched on the wrong path and flushed.

## Instruction fetch: queue and branch buffer

Files: `ifetch_unit.sv`, `instr_queue.sv`, `branch_buffer.sv`.

Instructions are 2 to n bytes long, in multiples of two bytes, so the
16-byte queue is kept as eight halfword slots.

* **Writing.** The fetch unit writes one aligned 32-bit word per fetch. At an
  odd halfword target it writes only the low half.
* **Reading.** The decoder sees the four oldest halfwords (`q_data[63:0]`,
  oldest in bits 63:48) with their count and the address of the oldest
  (`q_pc`). It removes 0 to 4 halfwords per clock with `q_take`.
* **Byte order.** The byte order is big-endian: the halfword at the lower
  address is bits 31:16 of a fetched word.

Before each fetch the fetch unit looks the word up in the branch buffer
(64 entries of one word; index `addr[7:2]`, tag `addr[31:8]`).

* On a hit the word enters the queue in the same clock, with no bus cycle.
* On a miss the unit reads the word from memory. It writes that word into
  the branch buffer only if the queue was empty when the word arrived. That
  is the situation right after a jump, so the buffer ends up holding jump
  targets, where the fetch latency is otherwise exposed.
* With `bb_general = 1` every fetched word is written, and the buffer acts as
  a small instruction cache.
* `bb_inv` clears the whole buffer, for example after code has been modified.

A redirect empties the queue and restarts fetch at the new address. A read
already on the bus cannot be withdrawn; its word is dropped when it arrives.
Only one fetch is in flight at a time.

## The bitmap engine: three steps, one bus access each

File: `bitmap_engine.sv`; used through `exec_unit.sv`. This is the most
involved block.

A bit line is given by three values: a word-aligned base address, a bit
offset and a length. Bit 0 is the most significant bit of the byte at the
base address, so bit *i* of a word is `data[31-i]`.

BVMAP computes `D[doff+i] = f(S[soff+i], D[doff+i])` for every bit of the
field.

* `f` is a 4-bit truth table indexed by {source bit, destination bit}. The
  package defines four common codes: `BV_COPY` (BVCPY), `BV_AND`, `BV_OR` and
  `BV_XOR`.
* Destination bits outside the field keep their value. The first and last
  words are merged under a mask.
* The engine can run forward from the head of the field or backward from its
  tail (`dir = 1`). Backward operation makes a copy between overlapping
  fields safe.

For each 32-bit destination block *n*, the work splits into eight
micro-operations:

| op  | work                                                          |
|-----|---------------------------------------------------------------|
| OP1 | shift the current source word left by the alignment *k*       |
| OP2 | fetch the next source word                                    |
| OP3 | shift that word right by 32 - *k*                             |
| OP4 | keep it as the current word of the next block                 |
| OP5 | OR the two halves into the aligned source block T             |
| OP6 | fetch destination word D                                      |
| OP7 | compute f(T, D) under the field mask                          |
| OP8 | store the result                                              |

Run in order, these need four memory accesses per block with idle bus
clocks between them. The engine overlaps consecutive blocks in three steps
instead:

```
step 1:  OP7 (block n-1)   OP1, OP2 (block n)   -- bus: read next source word
step 2:  OP8 (block n-1)   OP3, OP4 (block n)   -- bus: write result of n-1
step 3:  OP5, OP6 (block n)                     -- bus: read destination word
```

Each step holds exactly one memory access. Before the loop starts, one
source word is fetched ahead. A field that covers N destination words
therefore takes **3N + 1 bus cycles**.

Three details keep the bus from ever going idle:

1. **Reads are chained.** In the clock in which the bus interface
   acknowledges a read, the engine already presents its next request (see
   *Bus protocol* below).
2. **Stores go through the store buffer.** The write of step 2 is handed to
   the store buffer in the acknowledge clock of step 1's read. The store
   buffer passes it to the bus at once, and the engine goes on with step 3
   while the write is on the bus.
3. **Alignment uses two barrel shifters.** The shifts of OP1 and OP3 use two
   `barrel_shifter` instances, so they add no clocks.

With a memory of no wait states, a bitmap operation takes 2(3N+1) clocks
plus a few clocks of start and finish. The testbench checks both the bus
cycle count and this clock bound, for random offsets, lengths, functions and
both directions.

BVSCH scans a field forward, one word per bus cycle, for the first 1 bit.

* On a hit it returns the bit's offset from the base and sets `found`.
* If the field has no 1 bit, `found` is 0.
* A 256-bit table takes 19 clocks to search to the end with no wait states.
  This is the size of the ready-queue bitmap that a real-time kernel scans
  to dispatch the highest-priority task.

## A-stage: operand address generation

File: `operand_addr_gen.sv`.

The A-stage takes one A-code per clock and, one clock later, gives an F-code
for operand fetch. The A-code says which addressing mode an operand uses. The
F-code gives the operand's address, or says that the operand is a register
or an immediate value.

| mode       | notation     | address (F-code)                                    |
|------------|--------------|-----------------------------------------------------|
| `AM_REG`   | Rn           | none, register operand                              |
| `AM_IMM`   | #exp         | none, value passed on                               |
| `AM_IND`   | @Rn          | Rn                                                  |
| `AM_DISP`  | @(exp,Rn)    | Rn + exp                                            |
| `AM_ABS`   | @exp         | exp                                                 |
| `AM_PCREL` | @(exp,PC)    | PC + exp                                            |
| `AM_POP`   | @SP+         | SP; the F-code carries the new SP = SP + size        |
| `AM_PUSH`  | @-SP         | SP - size; the F-code carries the new SP             |
| `AM_CHAIN` | chained step | base + (Rx << scale) + exp                           |

Displacements and absolute addresses of 16 bits arrive already sign-extended
to 32 bits.

**Chained addressing** combines three primitives freely: addition, scaling
and memory indirection. Here a chained mode is sent as a sequence of
`AM_CHAIN` A-codes, one per step.

* The first step takes its base from Rn, from the PC or from zero.
* Every step except the last has `more = 1`. For such a step the unit reads
  the word at the step's address over its own bus port. That word becomes
  the base of the next step. With no wait states, each such step adds one bus
  cycle.
* Only the last step produces an F-code.

The unit reads its base and index registers through two extra read ports of
the register file. Two rules are left to the surrounding pipeline:

* the decoder must not send an A-code whose registers an older instruction
  still has to write;
* the E-stage writes the new SP of the stack modes.

`flush` drops a held F-code and any chained state. The word of a chained read
that is already on the bus when a flush comes is thrown away when it arrives.

## OF-stage: operand fetch

File: `operand_fetch.sv`.

The OF-stage takes the F-codes of the A-stage and gives S-codes: the
operand's address and, for an operand read from memory, its value. The value
is right-aligned and zero-extended.

* A register operand, an immediate value and an operand that is only written
  pass through in one clock, with no bus cycle. Immediates are passed on in
  the value field.
* An operand of 1, 2 or 4 bytes may sit at any byte address. If it lies in
  one word, the unit reads that word in one bus cycle.
* If it spans two words, the unit reads both in back-to-back bus cycles and
  joins the bytes, the lowest address being the most significant.

The unit has its own bus port and takes no new F-code while it reads.
`flush` drops a held S-code; a read already on the bus is finished and its
data thrown away. The microprogram read that the G/100 also does in this
stage is not built.

## Execute stage, registers and store buffer

Files: `exec_unit.sv`, `gpr_file.sv`, `alu32.sv`, `barrel_shifter.sv`,
`store_buffer.sv`.

The E-stage executes one micro-operation (`uop_t`) at a time, with a
valid/ready handshake:

| micro-operation | what it does                                        | time                |
|-----------------|-----------------------------------------------------|---------------------|
| `U_ALU`         | 12 ALU operations, flags z/n/v/c (c is the borrow on subtract) | 1 clock  |
| `U_SHIFT`       | logical and arithmetic shifts, rotates              | 1 clock             |
| `U_LOAD`        | a word read through the operand port                | until the bus answers |
| `U_STORE`       | a word store into the store buffer                  | 1 clock, waits only if the buffer is full |
| `U_BVMAP`, `U_BVSCH` | hand R0..R4 to the bitmap engine               | until it finishes   |

The bitmap operands are R0 = source base, R1 = source offset, R2 =
destination base, R3 = destination offset and R4 = length. BVSCH returns the
offset in R1 and sets z when no 1 bit was found.

The register file holds R0..R14. R15 is the stack pointer, and there are five
of them: one per protection ring (0 to 3) and one for interrupt handling.
The `ring` and `int_mode` inputs select which one R15 names, so a ring change
or an interrupt switches stacks without any copying.

The store buffer holds one 32-bit word with byte enables, and works as
follows:

* When it is empty, a store is accepted and offered to the bus in the same
  clock.
* While the write is on the bus, `full` holds off the next store. Meanwhile,
  register micro-operations go on.
* In the clock of the write's acknowledge, the next store is already
  accepted.
* The buffer has the highest bus priority, so a later read never passes a
  pending write.

## EIT controller

File: `eit_controller.sv`.

This block picks the next exception, interrupt or trap (EIT) to take, and
forms the address of its vector table entry: `EITVB + 8 x vector`. Sources
in priority order:

1. reset (vector 0);
2. an exception or trap reported with its vector;
3. an external interrupt of level n (vector 40h+n, or a vector supplied from
   the bus);
4. the delayed interrupt (vector 50h+n), requested by software through the
   DIR register.

Level 0 is the most urgent. An interrupt is accepted only when its level is
below the IMASK field of the PSW; otherwise it waits. DIR = 15 means "no
request". DIR is cleared when the delayed interrupt is taken.

## Bus protocol

Files: `bus_interface.sv`, plus every requester.

Inside the chip each requester drives a `bus_req_t` (`req`, `we`, `be`,
`addr`, `wdata`) and receives a `bus_rsp_t` (`ack`, `rdata`). The bus
interface grants requesters in a fixed priority order:

1. store buffer;
2. E-stage operand reads;
3. OF-stage operand reads;
4. A-stage indirect reads;
5. instruction fetch.

A bus cycle has two phases:

* **T1**: `bus_as` is high and the address, direction, byte enables and
  write data are driven.
* **T2**: repeated until the memory raises `bus_rdy`. Each extra T2 clock is
  a wait state.

Consecutive cycles follow without a gap. This depends on one rule that every
requester obeys:

> In the clock of its `ack`, a requester already shows its next access, or
> no request at all, but never the access that just finished.

The rule lets the bus interface grant the next cycle in that same clock with
no extra state. The store buffer and the bitmap engine rely on it to keep
the bus busy. Assertions check that a request is held until it is
acknowledged.

## Where this design departs from the G/100 as described

* **Missing stages.** The instruction decoder, the second decode of the
  A-stage (the microprogram entry address), the microprogram read of the
  OF-stage and the microprogram ROM and sequencer are not built. The A-code,
  F-code, S-code and micro-operation formats are this design's own. The
  S-codes leave the top as ports, and the E-stage takes micro-operations
  from outside.
* **Stage timing.** In the G/100 each stage spends two clocks per operation.
  Here the built stages accept one item per clock where they can, and the
  bus sets the pace of fetches and memory operands (two clocks per bus
  cycle). The two-clock pipeline rhythm is left to the missing sequencer.
* **BVSCH.** It is faster here: 19 clocks for 256 bits with no wait states,
  against about 1.7 µs (about 42 clocks at 25 MHz, some 5 clocks per word)
  reported for the original. The engine is a dedicated state machine, not a
  microcode loop. BVSCH searches forward and for 1 bits only.
* **BVMAP and BVCPY.** They follow the three-step loop exactly, but a step
  lasts one bus cycle, not a fixed number of clocks.
* **Assumed details.** The following are not specified in the original
  description and are choices of this design:
  * pushing the PC stack at decode;
  * overwriting the oldest entry when the PC stack overflows;
  * the branch-buffer fill rule in detail, and its tag layout;
  * the single outstanding fetch;
  * the bus signals and priority order;
  * the interrupt level encoding and DIR = 15.
* **Left out.** The delayed context trap, loading the PSW from the vector
  table, EIT stack frames, partial (byte and halfword) register writes and
  any memory management are not built. The G/100 runs without an MMU.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The memory model
`tb/tb_mem_model.sv` answers the bus, has a settable number of wait states,
and gives the testbench direct access to its contents.

To run the end-to-end test with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -j 0 -Wno-fatal --top-module tb_gmicro100_top \
    rtl/gm_pkg.sv $(ls rtl/*.sv | grep -v gm_pkg) \
    tb/tb_mem_model.sv tb/tb_gmicro100_top.sv
./obj_dir/Vtb_gmicro100_top
```

Any block test runs the same way: name its testbench as the top, and list
the package first. For the units that use the bus, also list
`tb/tb_mem_model.sv`.

`tb_gmicro100_top` runs the top at its default sizes. It stands in for the
decoder and the sequencer: it holds a small program as a table of
instructions, with its own encoding, placed in memory as address-derived
halfwords. A reference model runs the same table in order, and every
instruction that reaches the E-stage must be the one it expects next. Wrong
guesses must therefore be removed by the pipeline's own flushes. The test
counts each mechanism and fails if one never happened. A typical run
retires 95 instructions in 493 clocks. The counts:

| event                                   | count |
|-----------------------------------------|-------|
| pre-branches and pre-returns            | 45    |
| mispredictions                          | 4     |
| pre-return hits                         | 15    |
| pre-return misses                       | 4     |
| returns lost to PC-stack overflow       | 3     |
| branch-buffer fills                     | 35    |
| branch-buffer hits                      | 45    |
| full-queue stalls                       | 33    |
| E-stage work overlapping a write        | 3     |
| store-buffer stalls                     | 2     |
| bitmap blocks                           | 26    |
| chained indirect reads                  | 1     |
| operands spanning two words             | 1     |

The run also holds a delayed interrupt back by IMASK, then accepts it, and
checks the addresses and operands that the A- and OF-stages produce.

The per-block testbenches are randomised against independent reference
models, and they also check timing:

* the 3N+1 bus cycles of the bitmap loop, and its clock bound;
* the 19-clock search of a 256-bit table;
* back-to-back bus cycles through the store buffer;
* the F-code latency of the A-stage;
* the bus cycles of an operand fetch that spans two words.

To adjust the sizes, change the parameters of `gmicro100_top`:
`QUEUE_BYTES`, `BB_ENTRIES`, `BPT_ENTRIES` and `PCS_DEPTH`.
