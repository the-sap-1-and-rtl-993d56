# SAP-1: a Simple-As-Possible computer in SystemVerilog

SAP-1 is the smallest computer that still shows the fetch/execute cycle. It has
one 8-bit bus, a 16-word by 8-bit memory holding both program and data, and an
accumulator. It runs five instructions. Every instruction takes six clock
cycles: three to fetch it and three to execute it. This RTL implements the whole
machine: datapath, bus and control sequencer. Each part is a separate module, so
you can read and test it on its own.

## Instructions

An instruction is one byte:

| bits 7:4 | bits 3:0 |
|----------|----------|
| opcode   | address  |

| mnemonic | opcode | effect                         |
|----------|--------|--------------------------------|
| `lda a`  | `0`    | A <- M[a]                      |
| `add a`  | `1`    | A <- A + M[a] (mod 256)        |
| `sub a`  | `2`    | A <- A - M[a] (mod 256)        |
| `out`    | `E`    | output register <- A           |
| `hlt`    | `F`    | stop fetching                  |

The codes `0`, `2` and `E` come from the machine's usual assembly example:
`lda E / sub F / out / hlt` assembles to `0E 2F E0 F0`. The codes for `add` (`1`)
and `hlt` (`F`) are this implementation's choice, following the classic SAP-1
numbering. They are defined once, in `sap1_pkg`.

The other eleven opcodes are undefined. Such a word is still fetched, but no
control signal is raised during its three execute cycles, so it acts as a
six-cycle no-op. The machine has no flags, no jumps and no memory writes. A
program runs straight through memory. The pc wraps from `F` to `0`, and the
machine keeps going until it meets `hlt`.

## Datapath and the single bus

```
            +------+        bus(7:0)
  pc(3:0) --| E_P  |------>+
            +------+       |
  mar(3:0) <------- L_M ---+        mar -> M[15:0](7:0) --CE--> bus
  ir(7:0)  <------- L_I ---+        ir(3:0)           --E_I--> bus(3:0)
  A(7:0)   <------- L_A ---+        A                 --E_A--> bus
  B(7:0)   <------- L_B ---+        A +/- B (SU)      --E_U--> bus
  out(7:0) <------- L_O ---+
```

- Sources are selected by enables (`E_P`, `E_I`, `CE`, `E_A`, `E_U`). Any
  number of registers may load from the bus in the same cycle.
- **At most one source may drive the bus in a clock cycle.** The classic
  machine uses tri-state outputs. `w_bus` is an enable-selected multiplexer
  instead, so the design synthesizes to plain logic on any target. The 4-bit
  sources (pc and the ir's address field) drive `bus(3:0)` and put zeros on
  `bus(7:4)`. An idle bus reads 0. An assertion in `w_bus` flags two enables at
  once.
- **Why the mar exists.** The memory needs its address and must put its data on
  the same bus. The memory address register holds the address at the memory
  input, which leaves the bus free for the data.
- **Why the B register exists.** The adder/subtractor's result has to travel
  over the bus back into A. B holds the second operand steady while that
  happens. A feeds the first adder input directly.
- The adder/subtractor is combinational: `A + B`, or `A + ~B + 1` when `SU` is
  high. Carries and borrows are dropped.
- The output register holds the last value written by `out`. Its eight bits are
  meant for eight LEDs and come out of the top as `out_data`.

## The six T-states

This part of the design needs the most care.

### Clock edges

The sequencer's T-state counter (`ring_counter`) is a one-hot ring T1..T6. It
advances on the **falling** clock edge. Every datapath register acts on the
**rising** edge. Because of this split, each control signal settles during the
low half of the clock and is steady at the rising edge that acts on it. A
control word is therefore decoded from the T-state and the opcode with plain
combinational logic (`instruction_decoder`, then `control_matrix`). No extra
register is needed.

### Control points per step

A register-transfer line such as `mar <- pc` means that the destination
captures the value at the next rising edge.

| step | all instructions | `lda`     | `add`         | `sub`             | `out`     | `hlt` |
|------|------------------|-----------|---------------|-------------------|-----------|-------|
| T1   | E_P L_M: `mar <- pc` | | | | | |
| T2   | C_P: `pc <- pc+1`   | | | | | |
| T3   | CE L_I: `ir <- M[mar]` | | | | | |
| T4   |                  | E_I L_M   | E_I L_M       | E_I L_M           | E_A L_O   | HLT   |
| T5   |                  | CE L_A    | CE L_B        | CE L_B            | –         | –     |
| T6   |                  | –         | E_U L_A       | SU E_U L_A        | –         | –     |

Fetch (T1–T3) is the same for every instruction and depends only on the
T-state. The execute rows are where the instructions differ. Every instruction
takes all six T-states, even when some are empty. That keeps the sequencer
trivial and makes timing predictable: instruction *n*, counting from 0, starts
at rising edge 6*n*+1 after `clr`.

The T1–T3 rows and the `sub` column are the classic machine's defined
sequence. The `lda`, `add`, `out` and `hlt` columns are worked out from the
same datapath. The increment sits in its own step (T2) for clarity, although it
could share T1 or T3.

### The 13 control signals

`ctrl_t` in `sap1_pkg` holds the sequencer's 13 outputs: `cp ep lm ce li ei la
ea su eu lb lo hlt`. Twelve of them drive the datapath. `hlt` goes back into
the sequencer.

### Halting

In T4 of `hlt`, the `HLT` point stops the ring counter, so the machine stays in
T4 and never fetches again. The `halted` output is high from then on. The
first rising edge with `halted` high is edge 6*h*+4, where *h* is the index of
the `hlt` instruction. Only `clr` restarts the machine.

## Clear and loading a program

`clr` is asynchronous and active high. It sets pc, mar, ir, A, B and the output
register to 0, and puts the T-state counter at T1. It does not touch memory:
words that were never loaded hold unknown values.

There are no store instructions, so programs are loaded from outside through a
write port on the memory (`prog_we`, `prog_addr`, `prog_data`). Writes happen
on the rising edge. To run a program:

1. Hold `clr` high.
2. Write the program and its data.
3. Release `clr` **while `clk` is low**, for example just after a falling edge.

If `clr` is released while `clk` is high, the next falling edge moves the
counter to T2 before any rising edge has executed T1. The first fetch then
reads the wrong address.

## Top-level interface (`sap1`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock |
| `clr`       | in  | 1 | asynchronous clear, active high |
| `prog_we`   | in  | 1 | memory load enable |
| `prog_addr` | in  | 4 | memory load address |
| `prog_data` | in  | 8 | memory load data |
| `out_data`  | out | 8 | output register (the display) |
| `halted`    | out | 1 | `hlt` has executed |

## Module map

| module | role |
|--------|------|
| `sap1_pkg` | widths, opcodes, `instr_t`, the control word `ctrl_t` |
| `sap1` | top: wires everything to the bus |
| `w_bus` | the shared bus (enable-selected multiplexer, one-driver assertion) |
| `program_counter` | 4-bit pc, counts on `C_P`, wraps |
| `mar` | 4-bit memory address register |
| `ram` | 16x8 memory, combinational read, load port |
| `instruction_register` | 8-bit ir, splits opcode and address field |
| `accumulator` | A |
| `b_register` | B |
| `adder_subtractor` | A ± B |
| `output_register` | display register |
| `control_sequencer` | `ring_counter` + `instruction_decoder` + `control_matrix` |

Widths come from `sap1_pkg` (`DATA_W = 8`, `ADDR_W = 4`, `N_TSTATES = 6`). The
instruction format fixes them, so the modules are not meant to be resized one
at a time.

## Choices made in this implementation

These points depart from the classic description, or fill gaps it leaves:

- The bus is a multiplexer rather than tri-state drivers. The behaviour is the
  same as long as only one source drives the bus per cycle.
- The opcodes for `add` and `hlt` are chosen here, and so are the execute steps
  of `lda`, `add`, `out` and `hlt`. The `out` path needs an `E_A` enable, which
  puts A on the bus.
- The notes describe the path for the operand address as `ir(4:0)`. The
  address field is four bits, so `ir(3:0)` is used.
- `clr` is asynchronous.
- Programs are loaded through the memory write port.
- The `halted` status output is added.
- The adder/subtractor keeps no carry or borrow.

## Simulating

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sap1_pkg.sv tb/ctrl_ref_pkg.sv tb/sap1_tb.sv --top-module sap1_tb -o sim
./obj_dir/sim
```

To run another testbench, change the testbench file and the top module name.
Add `+verilator+rand+reset+2` to start every uninitialised bit at a random
value. The testbenches expect this, since the memory is never cleared.

`tb/sap1_tb.sv` is the end-to-end test at full size. It runs:

- the worked example `0E 2F E0 F0`, with data values that include a borrow;
- an `add` program with carry-out;
- a mixed program that contains an undefined opcode;
- a no-`hlt` loop that makes the pc wrap around;
- 40 random memory images.

An instruction-level reference model runs next to the hardware. After every
instruction, the test compares A and the output register with the model. It
also checks the cycle count (six per instruction, and halt at 6*h*+4). It counts
each mechanism: every instruction, undefined opcodes, pc wrap, add carry and sub
borrow. A mechanism that never happened counts as a failure. `tb/ctrl_ref_pkg.sv`
holds the control-point table above in a form the sequencer testbenches compare
against.
