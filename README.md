# C-SRAM: a computational SRAM macro for vector multiply-accumulate

A scalar microcontroller that runs vector code spends most of its energy
moving data. Each element of `A`, `B` and `C` crosses the system bus into
the CPU, and each result crosses back. A computational SRAM (C-SRAM) turns
this around. The vectors stay in the memory, and the CPU sends one short
instruction, for example "Z = A x B + C on words 12, 40, 41, 42". Logic
next to the memory array then reads the three 128-bit words, does sixteen
8-bit multiply-adds in parallel, and writes the 128-bit result back. Only
the 64-bit instruction travels over the bus.

The macro is not a full-custom memory. It is an ordinary SRAM cut, of the
kind a foundry memory compiler produces, wrapped in synthesizable logic
(the *digital wrapper*). The wrapper decodes the instructions, schedules the
memory accesses, and does the arithmetic. So the memory part can be any
compiler type (single-port, dual-port, or "double-pumped"), and the number
of memory ports sets how fast MAC instructions can follow one another. This
RTL covers the wrapper and a behavioural, synthesizable model of the memory
cuts. The configuration is chosen through parameters.

## Configurations

| configuration            | `NPORTS` | `DOUBLE_PUMP` | `PIPELINED` | MAC latency | MAC issue interval |
|--------------------------|---------:|--------------:|------------:|------------:|-------------------:|
| 1RW                      | 1        | 0             | 0           | 6 cycles    | 5 cycles           |
| 2RW (dual-port cells)    | 2        | 0             | 0           | 5           | 4                  |
| 2RW, pipelined           | 2        | 0             | 1           | 5           | 2                  |
| 2RW-DP (double-pumped)   | 2        | 1             | 0 / 1       | 5           | 4 / 2              |
| **4RW-DP, pipelined**    | **4**    | **1**         | **1**       | **5**       | **1**              |

The defaults, in bold, are the configuration that gives the most MACs per
second and per unit of energy when consecutive instructions are independent.
The other defaults are:

- 128 words of 128 bits (`WORDS`, `WIDTH`);
- 16 lanes of 8 bits (`ELEM_W`);
- a 32-bit system bus (`SYS_W`);
- one cut for the whole memory (`CUT_WORDS`, `CUT_BITS`).

Bus width, word width and element width are parameters too: `SYS_W` must
divide `WIDTH` into at most 16 slices, and `ELEM_W` must divide `WIDTH`.

The memory compilers this targets allow up to 4096 words for 2- and 4-port
cuts and up to 16384 words for single-port cuts. The 14-bit address fields
of the instruction cover both.

## How a MAC is executed

An instruction first lands in a row of flip-flops on the bus side
(`instr_reg`), so the decoder never works on signals straight off the bus.
From there, `Z = A x B + C` takes seven steps: decode, read A, read B,
read C, multiply, add, and write Z. `wrapper_ctrl` places each step on a
fixed cycle after the decode cycle (cycle 0, the cycle after the bus
transfer, when the scheduler takes the instruction from the register):

```
              read A   read B   read C   multiply  add   write Z
  1 port      1 (p0)   2 (p0)   3 (p0)   3         4     5 (p0)
  2 ports     1 (p0)   1 (p1)   2 (p1)   2         3     4 (p0)
  4 ports     1 (p0)   1 (p1)   2 (p2)   2         3     4 (p3)
```

The memory returns read data one cycle after the read. The multiply
therefore happens on the cycle after read B, and the add on the cycle after
read C. The registers `a_q`, `prod_q` and `z_q` in `digital_wrapper` carry
the values between steps.

- **1 port.** A arrives a cycle before B and waits in `a_q`.
- **2 or 4 ports.** A and B are read together and meet directly in the
  multiplier.

**Sequential execution.** The next instruction's decode overlaps the
previous write, so the issue interval is the latency minus one.

**Pipelined execution.** A new MAC starts as soon as the ports are free.
Each MAC needs four memory accesses, so the interval is 4 / `NPORTS`. With
four ports every port is used exactly once per MAC, so one MAC starts every
cycle. With two ports a MAC starts every second cycle, and in the steady
state the slots interleave with no gaps. A one-port memory gains nothing
from pipelining, so it keeps the sequential interval.

### Interlocks

Pipelining is only safe for independent instructions. The scheduler
therefore leaves an instruction waiting in the bus-side register in these
cases; while it waits, the register is full and `instr_ready` drops for the
next one. The `stall` output shows which case applies.

| bit | interlock | holds back an instruction when … |
|-----|-----------|----------------------------------|
| 0 | hazard | it would read a word before an earlier MAC or store in flight has written that word. It is released exactly when the read falls on the cycle after the write. |
| 1 | interval | fewer than the issue interval's cycles have passed since the last memory instruction. |
| 2 | buffer | it is a bus slice read or write while a vector load or store is still in flight. |
| 3 | port | it would need a port on a cycle when an instruction in flight uses the same port. |

The port interlock only fires with two ports, after another stall has
spaced two MACs an odd number of cycles apart: write Z of one MAC and read A
of the next would then both need port 0.

With the interlocks, any program gives the results of executing it in
order, one instruction at a time. Dependent code is correct but slower. Even on
the 4RW memory, a chain of MACs where each one uses the previous result as
its addend C starts one MAC every 3 cycles. When the dependence goes through
A or B, it starts one every 4 cycles.

## Double pumping

Dual-port bitcells cost area and leakage. Memory vendors therefore also
build "pseudo" multi-port cuts from cheaper cells. The array is accessed
twice per clock cycle, the second time from an internally generated clock,
at some cost in maximum frequency. A single-port array then behaves as a
2RW memory, and a dual-port array as a 4RW memory.

`sram_dpump` models this with an explicit second clock, `clk_dp`:

- `clk_dp` must run at exactly twice `clk`, with its rising edges on those
  of `clk`.
- On the `clk_dp` edge that coincides with a rising `clk` edge, ports
  0 … N/2-1 are served, and the requests of ports N/2 … N-1 are latched.
- On the next `clk_dp` edge, in the middle of the cycle, the latched
  requests are served.
- The module tells the two edges apart by sampling `clk` on the falling edge
  of `clk_dp`. It therefore needs no reset and cannot lose phase.

Seen from `clk`, the cut is an ordinary N-port synchronous SRAM with one
cycle of read latency.

There is one visible difference from a true multi-port memory. A read on a
second-half port returns a word that a first-half port wrote in the same
cycle. The scheduler never creates that situation, because the hazard
interlock keeps same-word read/write pairs in separate cycles.

The frequency penalty of double pumping is a circuit property and is not
modelled.

## Memory partitioning

A compiler limits how many words and bits one cut may have. `csram_storage`
therefore builds the memory from `WORDS/CUT_WORDS` rows and
`WIDTH/CUT_BITS` columns of identical cuts.

- **Columns** hold bit slices of the word. Slice 0 holds the least
  significant bits.
- **Rows** hold consecutive address ranges. A port only enables the cut row
  that its address selects.
- **Read data** comes from the row that the port last read. A small register
  per port remembers that row.

For example, `CUT_WORDS=64, CUT_BITS=64` builds a 128 x 128 memory from four
64 x 64 cuts, each pair sharing the address range. All cuts are native
(`sram_cut`) or double-pumped (`sram_dpump`), according to `DOUBLE_PUMP`.

## Instruction set and CPU interface

Instructions are 64 bits wide (`csram_pkg::instr_t`):

```
 63   60 59  56 55     42 41     28 27     14 13      0
+-------+------+---------+---------+---------+---------+
|opcode | idx  | addr_z  | addr_a  | addr_b  | addr_c  |
+-------+------+---------+---------+---------+---------+
```

| opcode | name | effect |
|-------:|------|--------|
| 0 | NOP | nothing |
| 1 | MAC | `mem[z] = mem[a] * mem[b] + mem[c]`, per 8-bit lane, modulo 256 |
| 2 | LDV | vector buffer = `mem[a]` |
| 3 | STV | `mem[z]` = vector buffer |
| 4 | WRB | buffer slice `idx` = `wdata` |
| 5 | RDB | `rdata` = buffer slice `idx`, with `rvalid` |

Codes 6 to 15 are decoded as illegal and do nothing.

The vector buffer (`vec_buffer`) is the bridge between the 32-bit bus and
128-bit words:

- To write a vector, send four WRB instructions, one per 32-bit slice, then
  one STV.
- To read a vector, send one LDV, then four RDB instructions.

**Handshake.** The CPU holds `instr_valid`, `instr` and, for WRB, `wdata`
until `instr_ready` is high at a rising edge of `clk`. An assertion in
`csram_macro` checks that the instruction stays stable while it waits.
`instr_ready` is high when the bus-side register is empty or hands its
instruction to the scheduler in the same cycle, so a stream of instructions
can still pass at one per cycle.

**Timing seen from the bus.** Counting from the rising edge that accepts an
instruction:

- a MAC writes its result 5 cycles later (6 with one port), which is the
  latency of the table above, since decode starts one cycle after the
  transfer;
- RDB data appears on `rdata` with `rvalid` 2 cycles later;
- MACs are accepted at the issue interval of the table. The one exception
  is the second instruction after an idle period. It enters the register
  on the cycle its predecessor is decoded, which can be earlier than the
  interval, and then waits there.

**Status outputs.**

- `done` pulses on the cycle a MAC or STV writes its word.
- `busy` is high while an instruction waits in the bus-side register or a
  memory instruction is in flight.
- `rst_n` is an asynchronous active-low reset of the wrapper. Memory
  contents are never reset.

Only MAC is a compute operation. Opcode values, field layout, the buffer
protocol and the handshake are this design's own choices.

## Files

| file | contents |
|------|----------|
| `rtl/csram_pkg.sv` | opcodes, instruction and decoded-instruction types, `make_instr` |
| `rtl/csram_macro.sv` | top: wrapper plus storage |
| `rtl/digital_wrapper.sv` | input register, decoder, scheduler, buffer and vector datapath |
| `rtl/instr_reg.sv` | bus-side instruction register |
| `rtl/wrapper_ctrl.sv` | the schedule table, issue interval and interlocks |
| `rtl/instr_decoder.sv` | instruction word to one-hot operation and addresses |
| `rtl/vec_buffer.sv` | bus-slice / memory-word buffer |
| `rtl/vec_mul.sv`, `rtl/vec_add.sv` | 16 x 8-bit lane multipliers and adders |
| `rtl/csram_storage.sv` | memory assembled from cuts |
| `rtl/sram_cut.sv` | native N-port cut (array model) |
| `rtl/sram_dpump.sv` | double-pumped cut (array model) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/macro_runner.sv`, `tb/ctrl_checker.sv`, `tb/csram_cpu.svh` | testbench helpers |

## Simulating

The testbenches need Verilator 5 with `--timing`. Give the package first,
and let Verilator find the other modules by file name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb \
    rtl/csram_pkg.sv tb/tb_csram_macro.sv --top-module tb_csram_macro
./obj_dir/Vtb_csram_macro
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Each one also has
a watchdog that reports a failure if the simulation hangs.

- **`tb_csram_macro`** runs one program on seven configurations: the five
  rows of the table above, plus 4RW-DP built from four 64 x 64 cuts. The
  program stores 12 random vectors over the bus, then runs:
  - one lone MAC, to check its latency;
  - eight back-to-back independent MACs, to check the issue interval;
  - a chain of dependent MACs;
  - eight MACs sent exactly one issue interval apart, none of which may be
    held back.

  It then reads every word back and compares it with a reference model. It
  also fails unless each interlock, second-half double-pumped accesses, and
  cut-row switching were all exercised.
- **`tb_csram_full`** uses the default macro with no parameter overrides. It
  fills all 128 words, issues 48 independent MACs at one per cycle, runs a
  16-long accumulate chain, and checks every result.
- **`tb_csram_maxsize`** runs the same program on the largest memories the
  compilers allow: 16384 words for 1RW, and 4096 words for 2RW and for
  pipelined 4RW-DP.
- **`tb_csram_widths`** runs the same program on other sizes: a 64-bit
  bus; 512-bit words (64 lanes) assembled from 64-bit cuts; and 16-bit
  elements (8 lanes) on a 2-port memory built from 4 x 4 cuts of 32 words
  by 32 bits.
- **`tb_wrapper_ctrl`** checks the exact port, cycle and address of every
  access in the four scheduling modes.
- **The other testbenches** each check one module against an independent
  reference.

## Limits and departures

- **Memory cuts are models.** The SRAM cuts are behavioural, synthesizable
  arrays. They have the port behaviour of compiler cuts, but no timing,
  power, test (BIST) or ECC features. They map to whatever memory a
  synthesis flow infers.
- **Collision rules are this model's own.** When two ports touch the same
  word in one cycle, reads return old data and the higher port wins a write
  collision. Real compilers document their own rules.
- **Read-only and write-only port types are not modelled separately.** The
  2-port schedule never writes through port 1. A 1R1RW cut whose second
  port is read-only therefore runs it unchanged, with latency 5. A 1R1W cut
  can read through one port only, so it needs the 1-port schedule, with
  latency 6. Neither has its own parameter setting.
- **The double-pumping clock is external.** A real double-pumped cut
  generates its second clock internally from `clk`. Here it is the input
  `clk_dp`. Tie it low when `DOUBLE_PUMP = 0`.
- **MAC results wrap.** MAC lanes keep the low 8 bits of the product and of
  the sum. There is no saturation and no widening.
- **One shared decode and compute pipeline.** With four ports, up to four
  MACs are in flight at once. The original description draws a separate
  decode-and-compute "way" for each of them. Here one decoder, one set of
  multipliers and one set of adders are shared as pipeline stages. Each unit
  works on a MAC for a single cycle, so one set keeps up with one MAC per
  cycle, and the timing is the same.
- **Interlocks are additions.** The read-after-write, port and buffer
  interlocks are not part of the original pipeline description, which
  assumes the software only pipelines independent instructions.
- **Not covered.** The host CPU, the system bus protocol, and the
  design-automation step that picks a configuration are outside this RTL.
  So are the area, power and frequency figures that motivate the choice of
  configuration.
