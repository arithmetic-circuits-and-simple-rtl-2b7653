# A bus-based 8-bit accumulator computer and the arithmetic circuits behind it

This RTL implements a small stored-program computer of the kind used to teach
how a processor works. It also contains the adder, comparator, look-ahead, counting,
multiplier and decimal circuits that such a computer's arithmetic is built
from. The computer is deliberately minimal:

- one accumulator register (A);
- four condition-code flags;
- 32 bytes of memory;
- a program counter, an instruction register, and a decoder/sequencer that
  drives about twenty control lines.

All blocks share one 5-bit address bus and one 8-bit data bus. The
interesting part is not the arithmetic. It is how a handful of control
signals, switched on in the right clock cycle, moves a byte from one block
to another and so executes an instruction. The design then grows in steps:

- shift instructions;
- an I/O port;
- jumps;
- a stack;
- subroutine calls.

Each step costs two opcodes, and some steps need more clock cycles per
instruction.

Everything is SystemVerilog 2017 and synthesizable. The only latch is an
intended output-port latch. The sections below follow the machine from its
instruction format down to the control table, then cover the arithmetic
library, the top level, the tests and the places where this RTL makes its
own choices.

## Instruction format and the six instruction sets

An instruction is one byte: `ooo aaaaa`. It is a 3-bit opcode and a 5-bit
memory address, which is also the operand address. The arithmetic and load
instructions use A and the addressed memory word. Results stay in A until a
store.

Opcodes 000–101 are the same in every variant, except in the shift variant:

| opcode | base | shift variant |
|--------|------|---------------|
| 000 | HLT – stop | HLT |
| 001 | LDA a – A ← M[a] | LDA a |
| 010 | ADD a – A ← A + M[a] | LSR – logical shift right |
| 011 | SUB a – A ← A − M[a] | ASL – arithmetic shift left |
| 100 | AND a – A ← A & M[a] | ASR – arithmetic shift right |
| 101 | STA a – M[a] ← A | STA a |

Only two opcodes, 110 and 111, are free. Each extension therefore uses them
for its own pair of instructions, so the extensions are mutually exclusive.
The package `sc_pkg` names them in `ext_e`, and the parameter `EXT` of
`simple_computer` picks one:

| `EXT` | 110 | 111 | execute cycles |
|-------|-----|-----|----------------|
| `EXT_BASE`  | – | – | 1 |
| `EXT_SHIFT` | – | – | 1 (uses the shift ALU) |
| `EXT_IO`    | IN (port → A) | OUT (A → port) | 1 |
| `EXT_JUMP`  | JMP a | JZF a (jump if ZF) | 1 |
| `EXT_STACK` | PSH (A → stack) | POP (stack → A) | PSH 2, POP 1 |
| `EXT_SUBR` (default) | JSR a | RTS | JSR 3, RTS 1 |

An opcode with no meaning in a variant executes as a no-op. This includes
110 and 111 in the base and shift variants.

## How an instruction executes: the state counter

Every instruction starts with one **fetch** cycle, S0:

- the PC drives the address bus;
- memory drives the data bus;
- the IR loads the byte;
- the PC counts up on the same clock edge.

Then come one to three **execute** cycles, S1, S2 and S3.

The state counter lives in `idms`, and its form depends on the variant.
START clears either form asynchronously.

In the four variants where every instruction has one execute cycle (BASE,
SHIFT, IO, JUMP), it is a single flip-flop. The flip-flop toggles S0, S1,
S0, … while the machine runs and stays at S0 when it is stopped.

In STACK and SUBR it is a 2-bit counter. On each rising edge it either:

- counts up by one; or
- returns to S0, when the control line **RST** is high or the machine is
  stopped.

RST is asserted in the last execute state of each instruction. An
instruction therefore takes exactly as many cycles as it needs, and the
short instructions cost no more than with the single flip-flop:

| instruction | clock cycles |
|-------------|--------------|
| ordinary instruction | 2 (S0, S1) |
| PSH | 3 |
| JSR | 4 |

RST exists only in the two multi-cycle variants. In the control table
below, the RST entries of the S1 rows apply to STACK and SUBR only.

### RUN and HLT

The **RUN** flip-flop is set asynchronously by START. HLT clears it during
its S1 cycle. RUN is ANDed into the four clocked enables (MSL, PCC, IRL,
ALE). The counter is held at S0 while RUN is low. A stopped machine
therefore does not fetch, count, load or write again: it sits in S0 with the
PC pointing one past the HLT.

A fully asynchronous clear would give the flip-flop two asynchronous
controls. Instead:

- the halt condition `RUN_ar = S1 & HLT` masks the flip-flop's output
  immediately (`run = run_q & ~RUN_ar`);
- the flip-flop itself clears on the next clock edge.

The RUN waveform is the same, and only START is asynchronous. In the
execution of a program, HLT therefore costs one cycle, its fetch: the cycle
counts above count the final HLT as 1.

## The control word

The sequencer decodes the state and the opcode (and ZF, for JZF) into a
control word, `sc_pkg::ctrl_t`. All lines are active high.

| line | meaning |
|------|---------|
| MSL / MOE / MWE | memory select / output enable / write enable |
| PCC / POA / POD / PLA / PLD | PC count / PC onto address bus / PC onto data bus / load PC from address bus / load PC from data bus |
| IRL / IRA | load IR / IR address field onto address bus |
| ALE / ALX / ALY / AOE | ALU enable / function select / A onto data bus |
| SPI / SPD / SPA | stack pointer increment / decrement / onto address bus |
| IOR / IOW | port onto data bus / data bus into port |
| RST | return the state counter to S0 |

The full table is below. Lines not listed are low.

| state | instruction | asserted |
|-------|-------------|----------|
| S0 | any | MSL MOE PCC POA IRL |
| S1 | LDA | MSL MOE IRA ALE ALX RST |
| S1 | ADD | MSL MOE IRA ALE RST |
| S1 | SUB | MSL MOE IRA ALE ALY RST |
| S1 | AND | MSL MOE IRA ALE ALX ALY RST |
| S1 | STA | MSL MWE IRA AOE RST |
| S1 | LSR / ASL / ASR (shift ALU) | ALE plus ALY / ALX / ALX ALY, RST |
| S1 | IN | IRA ALE ALX IOR RST |
| S1 | OUT | IRA AOE IOW RST |
| S1 | JMP | IRA PLA RST |
| S1 | JZF | IRA PLA only if ZF = 1; RST |
| S1 / S2 | PSH | SPD / MSL MWE AOE SPA RST |
| S1 | POP | MSL MOE ALE ALX SPI SPA RST |
| S1 / S2 / S3 | JSR | SPD / MSL MWE POD SPA / IRA PLA RST |
| S1 | RTS | MSL MOE PLD SPI SPA RST |

Three consequences are easy to miss:

- **IN is a load from the port.** IN uses the ALU's LDA function
  (ALX = 1, ALY = 0), with the port instead of memory driving the data bus.
  The IR's address field is on the address bus, and the port answers only
  to address 00000.
- **JZF does not change the sequencing.** A not-taken JZF simply asserts
  nothing at all. The PC has already been incremented during fetch.
- **JSR writes the return address before it jumps.** PC already points at
  the instruction after the JSR. S2 writes that value (POD) at the new stack
  top. S3 puts the IR's address field on the address bus (IRA) and loads it
  into the PC (PLA). RTS reads it back into the PC from the data bus (PLD).

## Buses

The address bus has three possible drivers: the PC, the IR and the SP. The
data bus has four: memory, A, the PC and the I/O port.

The classic build uses tri-state buffers. Here every block drives an output
that is all zeros unless its enable is high, and `simple_computer` ORs them
together. An undriven bus therefore reads 0.

Concurrent assertions (`a_adr_one_driver`, `a_db_one_driver`) check that at
most one driver is enabled in any cycle. `sc_memory` asserts that MOE and
MWE are never both active. The control table above satisfies all three by
construction.

The PC drives the data bus only during JSR. It puts its 5 bits on the low
lines and zeros above.

## The stack

The stack pointer, `stack_pointer`:

- resets to 00000;
- points at the current top item;
- grows downward from the top of memory.

A push first decrements SP, then writes at M[SP]. The first push therefore
lands at 11111. A pop reads M[SP], then increments SP.

In the STACK variant, PSH takes the two cycles SPD, then write. In the SUBR
variant, JSR's first two cycles do the same with the PC as data, and RTS
reads and increments in one cycle.

There is no overflow protection. The stack and the program share the 32
bytes, and a deep stack overwrites the top of the program area.

## ALU and condition codes

The `alu` holds A and the flags CF, ZF, NF and VF. It takes its second
operand from the data bus and writes A on the clock edge when ALE is high.

| ALX ALY | base ALU | flags set | shift ALU | flags set |
|---------|----------|-----------|-----------|-----------|
| 0 0 | ADD | C Z N V | LDA | Z N |
| 0 1 | SUB | C Z N V | LSR (CF ← A0) | C Z N |
| 1 0 | LDA | Z N | ASL (CF ← A7) | C Z N |
| 1 1 | AND | Z N | ASR (CF ← A0) | C Z N |

Flags that a function does not set keep their value, and so does the whole
flag register when ALE is low. ADD and SUB use the ripple
`adder_subtractor`. That has two consequences:

- CF is the carry out of the sign position. After SUB, CF = 1 therefore
  means *no* borrow.
- VF is the XOR of the carries into and out of the sign position.

The shift ALU is selected by `SHIFT_ALU`. It is used only by the shift
variant.

## I/O port

`io_port` answers only when the address bus is 00000:

- **IOR** puts the input pins on the data bus.
- **IOW** opens a transparent latch from the data bus to the output pins.

The latch holds the last OUT value after the instruction ends, and after
HLT. This is the only latch in the design, and it is intended.
`OUT_LATCHED = 0` gives the unlatched form instead. Its pins show the value
only during OUT's execute cycle and 0 otherwise.

## Memory and program loading

`sc_memory` is a 32 × 8 array:

- Reads are combinational: MSL · MOE drives the word at the address bus onto
  the data bus.
- Writes happen on the rising edge that ends a cycle with MSL · MWE. That
  stores exactly what a level-sensitive SRAM would, because both buses are
  stable for the whole cycle.

The classic machine has no way to get a program into memory. This design
adds a host port, `ld_we / ld_addr / ld_wdata / ld_rdata`. Writes through it
are synchronous and take priority over the bus. Use it only while START is
high or the machine is stopped; an assertion (`a_ld_when_idle`) checks
this.

To run a program:

1. Hold START.
2. Write the program through `ld_*`.
3. Release START.
4. Wait for `run` to fall.
5. Read the results back through `ld_rdata`.

## The arithmetic library

These blocks are the circuits the ALU's arithmetic is explained with. They
are usable on their own.

| module | what it does | parameters |
|--------|--------------|------------|
| `half_adder`, `full_adder` | one-bit cells | – |
| `adder_subtractor` | ripple adder/subtractor: B is XORed with SUB and SUB is the carry in; outputs S, C, Z, N, V | `N` = 8 |
| `magnitude_comparator` | subtracts B from A and decodes the flags: A<B is N⊕V (signed) or ¬C (unsigned); A=B is Z | `N` = 4, `IS_SIGNED` = 1 |
| `cla_block` | carry look-ahead adder: half adders make Pᵢ and Gᵢ, and every carry is a two-level sum of products Cᵢ = Gᵢ₋₁ + Pᵢ₋₁Gᵢ₋₂ + … + Pᵢ₋₁…P₀C₀, generated for any width | `M` = 4 |
| `cla_group_adder` | K look-ahead blocks with the carry rippling between them | `K` = 4, `M` = 4 |
| `array_multiplier` | N×M unsigned array: AND gates form the product terms XᵢYⱼ, and M−1 rows of N full adders sum them; each row's carry out becomes the top bit of its partial sum | `N` = `M` = 4 |
| `bcd_digit_adder` | one decimal digit: a 4-bit binary add, then the decimal carry Z4 + Z3Z2 + Z3Z1, which also adds 0110 through a second adder | – |
| `nines_complement` | 9 − x for a digit; 0 for inputs above 9 | – |
| `bcd_adder_subtractor` | DIGITS decimal adders in ripple; for subtraction the subtrahend goes through nine's complementers and the carry in is 1 | `DIGITS` = 2 |
| `popcount` | population (vote) counter: one row of half adders per input bit adds that bit, as a carry in, to the running count | `N` = 7 |

In `bcd_adder_subtractor`, after a subtraction a carry out of 1 means the
result is non-negative. A carry out of 0 means it is the ten's complement of
the negative difference. This mirrors CF after a binary SUB.

## Top level

`top` (`NV` = 6) places the independent designs side by side:

- six `simple_computer`s, one per variant: `g_cpu[i]` has `EXT = i`, so
  index 5 is the JSR/RTS machine;
- a 16-bit `cla_group_adder`;
- a 4×4 `array_multiplier`;
- a 2-digit `bcd_adder_subtractor`;
- a 4-bit signed `magnitude_comparator`;
- a 7-input `popcount`.

The computers share `clk`. Each has its own START, host memory port, I/O
pins and status outputs (`run`, `pc`, `acc`, `flags`, `sp`), brought out as
arrays indexed by variant. The arithmetic circuits have their own plain
ports.

For a single computer, instantiate `simple_computer` with the `EXT` you
want. Synthesized, the complete top is about 1,100 cells and 177 flip-flops,
plus 6 × 256 bits of memory.

## Simulating

The tests are self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops; a watchdog ends a hung run. They need `sc_pkg` and, for the
computer tests, the instruction-level reference model in
`tb/sc_ref_pkg.sv`. Build and run the end-to-end test with:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sc_pkg.sv tb/sc_ref_pkg.sv tb/top_tb.sv --top-module top_tb
./obj_dir/Vtop_tb
```

Any other test runs the same way with its own file and `--top-module`. The
other tests are `alu_tb`, `idms_tb`, `simple_computer_tb`, `bcd_adder_subtractor_tb`
and the rest of `tb/*_tb.sv`. Each takes a few seconds to build and less
than a second to run.

Verilator simulates two-state, and unset variables start at random values.
Every test therefore drives START or the reset from 0 to 1 first, so that
the asynchronous clear really sees an edge.

What the tests cover:

- **`top_tb`**, at the default parameters, runs one program on each
  variant:
  - the ten-instruction sample program (LDA/ADD/STA, LDA/AND/STA,
    LDA/SUB/STA, HLT), twice, with data that overflows;
  - the three shifts;
  - IN → ADD → OUT;
  - a count-down loop with JMP and JZF;
  - a PSH/POP expression;
  - nested JSR/RTS.

  It compares memory, A, flags, PC, SP, the output port and the cycle count
  with the reference model. It also drives the arithmetic circuits against
  integer arithmetic. It counts twenty mechanisms and fails if any never
  happened. Examples are the overflow, a carry between look-ahead groups,
  the BCD +6 correction, a population count of all ones, a taken and an untaken JZF, and JSR's third cycle.
- **`simple_computer_tb`** runs 200 random straight-line programs plus a
  nested-subroutine program against the model.
- **`idms_tb`** compares every variant's control word, state by state, with
  the table above.
- The arithmetic tests are exhaustive where the input space allows it, and
  random otherwise.

The reference model `sc_model` in `tb/sc_ref_pkg.sv` works at the
instruction level and knows the cycle cost of each instruction. It is the
quickest place to see what a program should do.

## Where this design makes its own choices

Most of the design follows the classic machine closely: the instruction
formats, the control table, the flag effects and the stack convention.
These points are this design's own:

- **Opcodes of IN/OUT and JMP/JZF.** They are 110/111, in the order the
  instructions are usually listed.
- **Reset.** START clears A, the flags, the IR and the SP as well as the PC.
  The IR clears to 000, which decodes as HLT and is harmless before the
  first fetch.
- **Memory write timing.** Writes are edge-triggered rather than
  level-sensitive. Loading is through the added host port.
- **Buses.** They are ORs of gated outputs, so an idle bus reads 0, not a
  floating value.
- **RUN.** The asynchronous clear is replaced by a mask plus a synchronous
  clear, as explained above.
- **CF with the shift ALU.** CF keeps its value whenever ALE is low, like
  every other flag, rather than being forced to 0.
- **JSR's last cycle drives IRA together with PLA.** Without IRA the PC
  would load an undriven bus.
- **Widths the classic material leaves open.** These are the 8-bit default
  of `adder_subtractor`, K = 4 for `cla_group_adder`, 2 digits for the
  BCD unit and 7 inputs for `popcount`. Each is a parameter.
- **The population counter's structure.** Only its purpose and its building
  blocks (half and full adders) are classic. The row-per-input incrementer
  array is simply the most direct arrangement.

Not included:

- any model of the propagation delay of a particular programmable-logic
  device;
- the instructions that are only posed as questions: a compare (CMP, a SUB
  that keeps A) and the jumps JLT/JGE.

Timing in this RTL is purely cycle-based.
