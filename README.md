# A six-processor FPGA machine for sparse linear systems (BDB LU)

This is the RTL for a small shared-memory multiprocessor that solves large,
sparse systems of linear equations `A x = b`, such as the admittance
equations of electric power networks. The solution is direct: LU
factorization, then forward reduction (`L y = b`) and backward substitution
(`U x = y`), all in IEEE 754 single precision.

The machine gets its parallelism from the shape of the matrix. Before the
solve, a host PC reorders `A` by node tearing into **Bordered-Diagonal-Block
(BDB)** form:

```
  | A11              A1n |        A_ii : independent diagonal blocks
  |      A22         A2n |        A_in : right border blocks
  |           ...    ... |        A_ni : bottom border blocks
  | An1  An2  ...    Ann |        A_nn : last (coupling) block
```

A diagonal block together with its two border blocks is a **3-block group**.
Groups share no non-zeros, so each can be factored on its own processor with
no fill-in outside the group. Only the last block needs data from everyone.
Each group `i` contributes a term `S_i = L_ni U_in` to it, so the machine must
add five partial sums before the last block can be factored. The
substitutions have the same structure.

The machine has five computation processors and one control processor. Every
processor has a single-precision FPU. They share two external SSRAMs and six
on-chip RAMs over a fully connected bus.

## What is in the RTL and what is not

The processors are commercial soft cores (32-bit Nios). They are **not**
part of this RTL. The top module `bdb_lu_machine` holds everything around
them. For each processor it brings out three top-level ports: the
data-master bus port, the instruction-master bus port that fetches the
program from SSRAM, and the FPU custom-instruction port.

| Part | Module | Notes |
|---|---|---|
| Fully connected bus | `avalon_xbar` | 12 masters (data and instruction master of each processor), 10 slaves, one round-robin arbiter per slave |
| FPU (one per processor) | `fpu` | 4 custom instructions: add, sub, mul, div |
| adder/subtractor | `fp_addsub` | pipelined, 7 cycles |
| multiplier | `fp_mul` | pipelined, 5 cycles |
| divider | `fp_div` | iterative, 50 cycles |
| On-chip RAM (one per processor) | `onchip_ram` | 7 KB, one read wait state |
| SSRAM interface (two) | `ssram_ctrl` | two read wait states |
| Host serial port | `avalon_uart` | 8N1, used by the control processor |
| LEDs and buttons | `avalon_pio` | output register, input edge capture |
| Shared types and address map | `lu_pkg` | bus structs, slave map, connectivity |
| Floating-point arithmetic | `fp_pkg` | rounding, add, multiply, special cases |

Not included:
- the processors;
- their 1 KB boot ROMs, whose only content would be processor code;
- the LCD interface, which the design names without specifying;
- the SSRAM chips themselves, which are board parts.

`tb/ssram_model.sv` models the SSRAM chips for simulation. The testbench
harness `tb/bdb_harness.sv` stands in for the processors with behavioural
programs.

## How the machine runs a solve

This is the program the machine is built for, and the one the end-to-end
testbench runs. Processor *k* (1–6) is data master *k−1* and instruction
master *k+5* on the bus.

1. **Load.** The control processor (6) writes each 3-block group, and the
   last block with its right-hand side, into the SSRAMs. Processors 1–3 keep
   their groups in SSRAM 1; processors 4–5 and the last block use SSRAM 2.
   Each SSRAM is cut into equal 64 KB segments, one per processor, each
   holding that processor's program and data: processors 1–3 and 6 at
   `0x100000`, `0x110000`, `0x120000` and `0x130000`, and processors 4–5 at
   `0x200000` and `0x210000`. The last block is at `0x220000`.
2. **Factor the groups in parallel.** Each group is stored densely as a
   `(bs+M) × (bs+M)` matrix `[A_ii A_in; A_ni 0]`. Eliminating its first
   `bs` pivots leaves `L_ii`, `U_ii`, `U_in` and `L_ni` in place, and
   `−L_ni U_in` in the zero corner. Each processor adds its corners into its
   own on-chip RAM.
3. **Add the partial sums in pairs through on-chip RAM:**
   1 + 2 → 2 and 3 + 4 → 4 at the same time, then 2 + 5 → 5, then 4 + 5 → 5.
   The receiving processor reads the partner's on-chip RAM over the bus.
4. **Factor the last block.** Processor 5 adds the total to `A_nn` and factors it.
5. **Forward reduction.** Each processor solves `L_ii y_i = b_i`, then forms
   `−L_ni y_i`. These partial sums are added in the same pairwise pattern.
   Processor 5 then finishes the forward reduction of the last block.
6. **Backward substitution.** Processor 5 solves the last block for `x_n`
   and writes `x_n` into every processor's on-chip RAM. Each processor then
   solves `U_ii x_i = y_i − U_in x_n`.

Flag words at the bottom of each on-chip RAM synchronise these steps.
Because the machine only moves data at the pairwise sums and the
broadcast, communication stays small.

## The bus: fully connected, arbitrated per slave

This is the part that decides how well the processors overlap.

`avalon_xbar` is a crossbar, not a shared bus:
- Each master has its own path to every slave it is connected to.
- Transfers by different masters to different slaves happen in the same
  cycle.
- Only masters that address the **same** slave compete.

**Transfer.** A master drives an `av_req_t` (read, write, byte address,
write data, byte enables) and holds it while `waitrequest` is high. The
transfer completes in the cycle `waitrequest` is low. For a read,
`readdata` is valid in that cycle. There are no pipelined reads and no
bursts.

**Decode.** Master `m` selects slave `s` when both hold:
- `CONN[m][s]` is set;
- `BASE[s] ≤ address < BASE[s] + SIZE[s]`.

A request that selects nothing completes at once, reads 0 and raises
`dec_err[m]`.

**Arbitration.** Each slave has its own round-robin arbiter, which starts
from the master after the one served last. The grant is combinational from
registered state, so an idle slave costs no extra cycle. The granted master
keeps the slave until its transfer completes, so a multi-cycle SSRAM read
is never split. A master that is waiting for a slave another master holds
sees `waitrequest` high, and its `stall` bit (`bus_stall` at the top) is
set.

**Masters.** Masters 0–5 are the data masters of processors 1–6. Masters
6–11 are their instruction masters. The programs live in the SSRAMs, so
the instruction fetches compete with the data transfers for the SSRAM
chips. This competition is the reason the machine has two SSRAMs, each
serving only some of the processors.

**Address map and connectivity** (`lu_pkg`):

| Slave | Base | Size | Data masters of processors | Instruction masters of processors |
|---|---|---|---|---|
| on-chip RAM *k* (k = 0..5) | `k × 0x2000` | 8 KB window, 7 KB used | all | none |
| SSRAM 1 | `0x100000` | 1 MB | 1, 2, 3, 6 | 1, 2, 3, 6 |
| SSRAM 2 | `0x200000` | 1 MB | 4, 5, 6 | 4, 5, 6 |
| UART | `0x300000` | 32 B | 6 | none |
| PIO (LEDs, buttons) | `0x300020` | 32 B | 6 | none |

The two SSRAM windows and which processors use which SSRAM are part of the
design. The other addresses, and the choice of processors 1–3 (rather than
another three) for SSRAM 1, are this implementation's own.

## The floating-point unit

**Interface.** Each processor has one `fpu` on its custom-instruction port.
The processor raises `start` for one cycle with:
- `n` selecting the operation: 0 add, 1 subtract, 2 multiply, 3 divide;
- the operands on `dataa` and `datab`.

It then waits for `done`, which is high for one cycle with `result`.

**Latency.** From the start cycle *c*, `done` comes in cycle *c+L*:

| Unit | L | Stages |
|---|---|---|
| `fp_addsub` | 7 | 1 operands · 2 special cases, swap so \|a\| ≥ \|b\|, exponent difference · 3 align with guard/round/sticky · 4 add or subtract · 5 normalise · 6 round and pack · 7 output register |
| `fp_mul` | 5 | 1 operands · 2 special cases, exponent sum, 24×24 product · 3 normalise, guard/round/sticky · 4 round and pack · 5 output register |
| `fp_div` | 50 | restoring division, one quotient bit per cycle for 28 cycles, then waits to 50 |

The latencies are the design's own. How the work is divided into stages is
this implementation's choice. For a different latency, change `LATENCY`:
the stages with logic stay the same, and the number of output registers
follows (`LATENCY−6` for the adder, `LATENCY−4` for the multiplier). The
adder and multiplier accept a new operation every cycle. The divider takes
one at a time and ignores `start` while `busy`.

**Numbers** (`fp_pkg`):
- rounding is to nearest, ties to even;
- subnormal inputs read as zero, and results below the smallest normal
  flush to a signed zero;
- overflow gives infinity;
- invalid operations (∞−∞, 0·∞, 0/0, ∞/∞) and NaN inputs give `0x7FC00000`.

The rounding uses a 27-bit significand: hidden bit, 23 fraction bits,
guard, round and sticky. The adder keeps the sticky bit through alignment.
The divider takes its sticky bit from the final remainder.

## Memories and peripherals

**`onchip_ram`** holds 7168 bytes (1792 words).
- Writes complete in their first cycle and respect the byte enables.
- Reads have one wait state, as in a synchronous block RAM.
- Words past 1792 in the 8 KB window read as 0 and ignore writes.
- The contents are not reset.

**`ssram_ctrl`** drives one synchronous burst SRAM with separate data in
and out.
- A read has two wait states. The chip registers the address at the first
  edge and drives the data after the second. The controller holds
  `waitrequest` high for `WAIT_STATES` = 2 cycles and passes the chip's data
  through in the third.
- A write completes in one cycle. The chip is assumed to take the write
  data in the address cycle.
- The word address is `address[ADDR_W+1:2]`, with `ADDR_W` = 18 for the
  1 MB window.

**`avalon_uart`** has four registers at word offsets 0–3:
- 0: RXDATA. A read clears RRDY.
- 1: TXDATA. Written only when TRDY is set.
- 2: STATUS. Bit 0 RRDY, bit 1 TRDY, bit 2 overrun. A write clears the
  overrun bit.
- 3: DIVISOR, in clock cycles per bit. It resets to
  `CLK_HZ/BAUD` = 40 MHz / 115200 = 347.

The receiver synchronises `rxd` and samples each bit in its middle.

**`avalon_pio`** has three registers:
- 0: reads the synchronised buttons; a write sets the LEDs.
- 1: reads back the LEDs.
- 3: edge capture. A bit is set by a rising edge on its button and cleared
  by writing 1 to it.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lu_pkg.sv rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_bdb_lu_machine.sv \
  --top-module tb_bdb_lu_machine -o sim && ./obj_dir/sim
```

To run another testbench, replace the last file and the top name.
`-Wno-fatal` keeps the testbench-only warnings from stopping the build.

| Testbench | What it shows |
|---|---|
| `tb_fp_addsub`, `tb_fp_mul` | 4000 back-to-back random operations plus directed special cases, against a reference; exact latency |
| `tb_fp_div` | 1500 divisions plus special cases; latency 50; `busy`; a `start` while busy is ignored |
| `tb_fpu` | random mix of the four instructions, each with its own latency |
| `tb_avalon_xbar` | all twelve masters at once against slaves with 0–3 wait states; read-back data, decode errors, stalls, parallel transfers |
| `tb_onchip_ram`, `tb_ssram_ctrl` | read-back with byte enables; exact wait states |
| `tb_avalon_uart`, `tb_avalon_pio` | serial framing and bit time, flags, overrun; LED and edge capture |
| `tb_bdb_lu_machine` | full solve of an 18-equation BDB system on the machine at default parameters |
| `tb_bdb_ieee118` | the three 118-equation orderings below, run side by side |
| `tb_bdb_table6` | solves of 24, 48, 96 and 102 equations, five diagonal blocks each, run side by side |
| `tb_bdb_table6b` | the same for 30, 36, 42 and 54 equations |

The floating-point testbenches compare against `tb/fp_ref_pkg.sv`. That
reference does the operation in double precision and rounds the result to
single. This gives the correctly rounded answer for all four operations.

The system testbenches (`tb_bdb_lu_machine`, `tb_bdb_ieee118`,
`tb_bdb_table6` and `tb_bdb_table6b`) use `tb/bdb_harness.sv`. The harness:
- builds a random, sparse, diagonally dominant BDB matrix and a known
  solution;
- runs the program above, with a button press and a `'G'` from the "host"
  starting it;
- checks every element of `x` to a relative error of 1e-3 (the observed
  error is about 3e-7);
- checks that `x[0]` comes back over the serial line;
- has each processor fetch its program through its instruction master: one
  word every 16 cycles, from a 256-word image in its SSRAM segment. Every
  fetched word is checked.

It also counts each mechanism of the machine and fails the test if one
never occurred. The mechanisms counted are arbitration stalls, parallel
transfers, SSRAM reads, accesses to another processor's on-chip RAM,
program fetches, each FPU instruction, UART transmit and receive, button
edge capture and LED writes.

### The 118-equation orderings

The three cases are orderings of a 118-equation system, the size of the
IEEE 118-bus network, split for five processors. The block sizes come from
the node-tearing results for that network. The matrix values are
synthetic. Measured with the behavioural processors, at a 40 MHz clock:

| Case | Groups per processor (sizes) | Last block | Factorization | Forward | Backward | Whole solve |
|---|---|---|---|---|---|---|
| 1 | 1 (23, 24, 22, 20, 20) | 9 | 227 416 | 6 955 | 13 032 | 247 403 (6.19 ms) |
| 2 | 2 (8+12, 8+12, 10+10, 10+12, 10+10) | 16 | 184 200 | 8 977 | 13 566 | 206 743 (5.17 ms) |
| 3 | 3 (6+7+7, 4+7+7, 5+7+7, 6+6+6, 4+7+7) | 25 | 405 141 | 13 330 | 20 074 | 438 545 (10.96 ms) |

All figures are clock cycles. "Forward" runs from the end of the
factorization to the end of the forward reduction of the last block.
"Backward" runs from there until the control processor has seen every
done flag.

The ranking is the one expected of this machine: two groups per processor
factor fastest, and three are slowest, because the larger last block
outweighs the smaller groups. The substitutions get slower with more
groups, but the factorization dominates. The absolute times are roughly
three times shorter than a real processor would take. Apart from the
modelled program fetches, the behavioural programs spend no cycles
decoding instructions or on loop overhead; they only make the bus
transfers and FPU calls.

The speed-up measurements use eight sizes from 24 to 102 equations, with
five diagonal blocks. `tb_bdb_table6` and `tb_bdb_table6b` run all eight.
The split into five equal blocks and a last block is their own choice.
Cycle counts:

| N | split | Factorization | Forward | Backward | Whole solve |
|---|---|---|---|---|---|
| 24 | 5×4 + 4 | 4 597 | 627 | 1 188 | 6 412 |
| 30 | 5×5 + 5 | 9 941 | 920 | 1 696 | 12 557 |
| 36 | 5×6 + 6 | 15 128 | 1 433 | 2 261 | 18 822 |
| 42 | 5×7 + 7 | 16 699 | 1 765 | 2 907 | 21 371 |
| 48 | 5×8 + 8 | 22 536 | 2 149 | 3 615 | 28 300 |
| 54 | 5×9 + 9 | 40 552 | 2 934 | 4 473 | 47 959 |
| 96 | 5×16 + 16 | 220 738 | 8 541 | 12 468 | 241 747 |
| 102 | 5×18 + 12 | 182 685 | 7 569 | 11 224 | 201 478 |

102 comes out faster than 96 because of its smaller last block (12
against 16), which one processor factors alone. The counts also depend on
how many non-zeros each random block happens to get.

## Departures and limits

- **Processors.** Everything that depends on the processors — their
  program, their instruction timing, their boot ROM — is outside this RTL.
  The testbench's fetch rate (one word every 16 cycles) is a stand-in for
  the real fetch pattern, which depends on the code.
- **Bus protocol.** A minimal subset of the Avalon bus: no pipelined reads,
  no bursts, no interrupts.
- **FPU.** The stage split is this implementation's; the latencies are the
  design's. Subnormals are flushed to zero; the design does not say how it
  treats them.
- **SSRAM writes** are assumed to take their data in the address cycle. A
  real pipelined SSRAM that wants write data one cycle later would need one
  more register in `ssram_ctrl`.
- **Not built:** the LCD interface and the boot ROM.
- **Lint.** Verilator's `-Wall` lint reports only unused-signal notes:
  - the UART and PIO decode only address bits 3:2;
  - the NaN and zero tests of `fp_pkg` do not read the sign bit.
