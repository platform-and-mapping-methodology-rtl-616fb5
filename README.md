# Heterogeneous multicore platform with SIMD-1D and MIMD-2D accelerators

A CPU is good at control-heavy code; regular, data-parallel kernels run far
more efficiently on an array of simple processing elements (PEs) next to
their own local memories. This platform puts both on one FPGA: a CPU on a
memory-mapped bus, an on-chip memory, and two kinds of custom accelerator:

* **SIMD-1D** — 8 PEs executing one instruction in lock step over a
  16-bank shared memory. It suits simple operations at high parallelism, and it
  is organised like a GPU multiprocessor: the work is split into threads, 8 run
  at a time.
* **MIMD-2D** — a 4 x 4 mesh of PEs, each with its own operation, fed by 6
  memory modules. It suits more complex operations at medium parallelism. A
  program is a sequence of *contexts*, that is, array configurations that run
  one after another.

The design rests on one idea. Address arithmetic is taken out of the PEs and
given to small programmable **address generation units (AGUs)**. An AGU is one
adder and one counter. It produces one address per clock, so every PE input
receives a new operand every cycle and the PEs spend all their arithmetic on
the data. Address patterns that one AGU cannot make are built on the MIMD-2D
array by reloading some AGUs between contexts while the rest keep running
(*partial reconfiguration*).

The SystemVerilog here is synthesizable and written from the architecture's
published description. That description gives the organisation (PE counts,
memory banks, AGU parameters, what each PE contains, contexts and partial
reconfiguration) but not the encodings, register maps or handshakes. Those
details are this design's own. The section "What is given and what is chosen"
lists every such choice.

## The address generation unit (`agu`)

An AGU has four parameters:

| name | meaning |
|------|---------|
| P | start address |
| c | step added after each address |
| n | addresses per counter period |
| m | step added instead of c after every n-th address |

After `load` the AGU outputs P. Each cycle with `step` high it adds c. When
the counter reaches n it adds m instead and the counter restarts. Address
number k is therefore

    addr(k) = P + (k - floor(k/n)) * c + floor(k/n) * m      (mod 2^AW)

c and m are two's complement, so they can be negative. Useful settings:

* `c = 1, n = W, m = S - W + 1`: walks a W-wide window, row by row, in an
  image with row stride S.
* `c = s, n = N, m = -(N-1)*s`: repeats the same N addresses. This is plain
  "base, increment, iterations" linear addressing.
* `c = S, n = K, m = -(K-1)*S`: reads column j of a matrix K times over, for
  example the B operand of a matrix product.
* `n = 1`: the step is always m.

`n = 0` behaves like `n = 1`. The output is a register: it changes on the
clock edge after `load` or `step`, and `load` wins when both are high. The AGU
keeps its own copy of c, n and m. The source of the parameters can therefore
be rewritten while the AGU is counting, and the change takes effect at the
next `load`.

## SIMD-1D accelerator (`simd_accel`)

### Organisation

    16 input AGUs ──> read crossbar (simd_xbar) ──> 16 banks (simd_bank, 256 x 16 bit)
         │                                              ^
         v                                              │ direct write, no crossbar
    8 PEs (simd_pe), pairs 0-1, 2-3, 4-5, 6-7  ──────────┘  addresses from 1 shared output AGU

* **Shared memory.** 16 banks of 256 words, 4096 words of 16 bits in all.
  Word w is in bank `w mod 16`, at row `w / 16`. Each bank has one read port
  and one write port.
* **Reads.** Every PE has two input ports, a and b, and each port has its own
  AGU. The crossbar steers each of the 16 port addresses to its bank.
* **The crossbar has no arbiter and no queue.** Several ports may read the
  same word in one cycle, and all of them receive it (a broadcast). Two ports
  that address *different rows of the same bank* in one cycle are a
  programming error. The lowest-numbered port wins the bank and the others
  receive its word. The CPU-visible `conflict` status bit records the error.
  Avoiding conflicts is part of laying out the data. The matrix-product
  layout below is conflict-free.
* **Writes.** Results do not pass through the crossbar. A single output AGU
  gives a base address o, and PE j writes word `o + j`. Keep o a multiple of 8:
  then the 8 results fall into 8 different banks. An assertion checks this.

### The PE (`simd_pe`)

Each PE has three pipeline stages, built from an adder/comparator, a
multiplier and a post-adder:

| stage | operation (`simd_instr_t` field) |
|-------|----------------------------------|
| 1 | `pre`: a, a+b, a-b, min(a,b), max(a,b) |
| 1→2 | `pair_sel`: if the stage-1 value is negative, take the partner PE's stage-1 value |
| 2 | `mul`: pass, × b, × k |
| 3 | `post`: pass, + k, accumulate (`acc = (first ? 0 : acc) + value`) |

One instruction can therefore do an add-multiply ((a+b)·k), a multiply-add
(a·b + k) or a multiply-accumulate (Σ a·b).

**PE pairs.** Two neighbouring PEs cooperate on operations that one PE cannot
do alone, while both still run the same instruction. For an absolute
difference:

1. Both PEs run `a - b` with `pair_sel`.
2. Program the AGUs so the odd PE reads the operands swapped.
3. Each PE now holds either x-y or y-x. Whichever result is negative is
   replaced by its partner's, so both PEs output |x-y|.

The same select gives data-dependent choices in general.

Arithmetic is 16-bit two's complement and products are truncated to 16 bits.
A result leaves the PE 3 cycles after its operands.

### Threads and runs

A run is NOUT *rounds*. In a round, each PE executes one thread: it consumes
ACC_LEN operand pairs, one per cycle, and writes one result. The output AGU
then advances and the next 8 threads start. With ACC_LEN = 1, every cycle
writes 8 results.

Registers (word addresses, 32-bit data, read data one cycle after the read):

| address | content |
|---------|---------|
| 0x0000 | CTRL: write bit 0 = start; read `{conflict, busy, done}` |
| 0x0001 | instruction (`simd_instr_t`, 8 bits) |
| 0x0002 | constant k |
| 0x0003 | ACC_LEN (0 counts as 1) |
| 0x0004 | NOUT |
| 0x0100 + 4i + f | AGU i, parameter f = 0 P, 1 c, 2 n, 3 m. AGUs 2j and 2j+1 feed PE j's ports a and b; AGU 16 is the output AGU |
| 0x8000 + w | shared-memory word w (CPU access only while idle) |

**Timing.** The start write is followed by one cycle in which the AGUs load.
Then come ACC_LEN·NOUT issue cycles, one operand pair per PE per cycle. The
last results are written 5 cycles after the last issue (1 bank read, 3 PE
stages, 1 write), and `done` rises one cycle later. From the start write to
`done`, a run takes `1 + ACC_LEN·NOUT + 6` cycles. The testbenches check
this.

### Example: matrix product

Computing C = A·B for column group g (8 columns of C) on one accelerator:

* Store A so that it occupies banks 8–15. Word q = 32i + k goes to address
  `16·(q/8) + 8 + q mod 8`. All 8 a-AGUs walk A with `c = 1, n = 8, m = 9`.
  All PEs read the same A word, which is a broadcast.
* Store column j of the group at `16k + j`, so that it sits in bank j. The
  b-AGU of PE j uses `c = 16, n = K, m = -(K-1)·16`.
* Use the multiply-accumulate instruction with ACC_LEN = K and NOUT = number
  of rows. The output AGU uses `c = row stride, n = 1, m = row stride`.

`tb_matmul_workload` runs a 32 × 32 × 32 product this way on all three
accelerators of the platform.

The rate is 8 multiply-accumulates per cycle per accelerator. A 1024 × 1024
product (1024³ MACs) then takes 1.34·10⁸ cycles, which is 895 ms at 150 MHz
on one accelerator and 298 ms on three. Those are the times published for
this accelerator, so the datapath rate matches the original design. The full
matrices (3 M words) do not fit in on-chip memory. The CPU has to bring them
in tile by tile from external memory, which is not part of this RTL.

### Example: block matching for optical flow

A PE pair computes one sum of absolute differences (SAD). PE 2p reads the
reference pixel and candidate p's pixel, and PE 2p+1 reads the same two
words swapped. Both run `a - b` with pair select, so both hold |a - b|, and
both accumulate with ACC_LEN = 256 (a 16 × 16 window). One run therefore
scores four candidate windows side by side.

* The search area is stored with a row stride of 32 words. A candidate
  window at (dx, dy) is walked with `P = 32·dy + dx, c = 1, n = 16, m = 17`.
* The reference window is stored row after row in a block that starts in
  bank 12. It is walked with `c = 1, n = 16, m = 1`. At any moment the four
  candidate words sit in four adjacent banks and the reference word is in
  none of them, so no read port loses a conflict.
* The largest possible SAD, 256 · 255 = 65 280, fits the 16-bit
  accumulator.

`tb_optflow_workload` scores all 81 candidates of a 24 × 24 search area in
27 runs of 263 cycles each. It checks every SAD and checks that the minimum
lands on the window the reference was copied from.

## MIMD-2D accelerator (`mimd_accel`)

### Organisation

    mem modules ─┐                                       ┌─ mem modules
    (any of 6)   ├─ W of PE(r,0)   4 x 4 mesh   E of PE(r,3) ┤ (any of 6)
                 └─ store PE(r,0) output     store PE(r,3) output ┘

* **PEs.** Each `mimd_pe` has a 16-bit adder and a 16-bit multiplier. Its two
  operands, A and B, each come from one of: the N, E, S or W neighbour, its
  own output, a 16-bit constant, or zero. The carry-in is the flag of a
  chosen neighbour.
* **Operations:**
  * PASS (out = A, flag = carry-in)
  * ADD, SUB (flag = carry / borrow)
  * ADDC, SUBC (with the carry-in)
  * MUL, MULH (low / high half of the unsigned product)
  * SEL (carry-in ? B : A)
  * ACC (out += A)
  * HOLD
* **Combining PEs.** The output and the flag are registered, and all four
  neighbours see them. PEs are chained into wider or conditional operations:
  * a 32-bit add is ADD in one PE and ADDC in its east neighbour (the carry
    goes west to east);
  * a 64-bit add or subtract is four such PEs in a row, one 16-bit slice
    per PE, each slice one cycle behind the one below it (tested in
    `tb_mimd_pe`);
  * an absolute difference is SUB, then negate, then SEL on the borrow.
* **Memory modules.** Each `mimd_mem_module` holds 2048 × 16 bits (4 KB)
  and has its own AGU. In each context a module streams reads into the
  array, stores a stream from it, or idles; in the first two cases its AGU
  steps every cycle.
* **Border crossbar.** Only the left and right border PEs touch memory:
  * the W input of a left-column PE, and the E input of a right-column PE,
    can read any module;
  * any module can store the output of any border PE.

  Mesh edges with nothing attached read zero.

### Contexts and partial reconfiguration

The configuration memory holds up to 16 contexts. A context record contains:

* a PE configuration (`mimd_pe_cfg_t`) for each of the 16 PEs;
* a run length in cycles and a *last* flag;
* for each memory module a `mimd_mem_cfg_t`: mode, which border PE to store,
  whether to reload the AGU, and from which entry of a shared 16-entry AGU
  parameter table;
* for each of the 8 border inputs, the memory module that feeds it.

After start, the sequencer runs contexts 0, 1, 2, … until one marked last.
Each context costs one *set-up cycle* plus its run length:

* During set-up the array is frozen. Only the memory modules whose record asks
  for it reload their AGU.
* Every other module continues its address sequence exactly where it stopped.
  PE outputs also keep their values.

So a data stream and a partly computed result can run through any number of
context switches unchanged, while selected address patterns are replaced.
This replacement is the partial reconfiguration: the whole array does not
have to be reloaded to change how one memory is addressed.

The CPU may rewrite contexts and the AGU table at any time, including during
a run. It may access memory words only while the array is idle.

Registers (word addresses, 32-bit data, read data one cycle after the read):

| address | content |
|---------|---------|
| 0x0000 | CTRL: write bit 0 = start; read `{busy, done}` |
| 0x0001 | current context (read only) |
| 0x1000 + 64x + p | PE p = 4·row + col, context x (`mimd_pe_cfg_t`, 28 bits) |
| 0x2000 + 16x | context x: bit 16 last, bits 15:0 run length |
| 0x2000 + 16x + 1 + i | context x, memory module i (`mimd_mem_cfg_t`) |
| 0x2000 + 16x + 8 + r | context x, border input r (r < 4: W of row r, else E of row r-4) = module index, ≥ 6 reads zero |
| 0x3000 + 4e + f | AGU table entry e, parameter f |
| 0x8000 + 2048i + w | word w of memory module i |

In a memory record, the border-PE field (`wsrc`) takes values 0–3 for the
left PE of rows 0–3 and 4–7 for the right PE of rows 0–3.

**Timing.** Latencies are counted in running cycles. Set-up cycles do not
count, because the whole array pauses during them.

* A word read by a module in running cycle t is at the border PE's input in
  cycle t+1.
* Each PE on the path adds one cycle.
* A module stores the border PE's output as it is in that cycle.

`done` rises the cycle after the last running cycle. A run lasts
Σ(1 + length) over the contexts executed.

### Example: SAD

`tb_mimd_accel` computes |A−B| and its sum (the sum of absolute differences
used in block matching) in four contexts:

* **Context 0** loads all AGUs. Stream B starts one address early, so that it
  meets A, which was delayed by a PE, in the same cycle.
* **Context 1** only switches the accumulator PE from "clear" to "accumulate".
* **Context 2** reloads only the output module's AGU. Results move to a
  second region, and the input streams do not notice the switch.
* **Context 3** stores the sum.

The testbench's header comment gives the placement on the mesh.

## Platform (`hmp_platform`)

`hmp_platform` connects the on-chip memory (`onchip_mem`, 8192 × 32 bit),
N_SIMD = 3 SIMD-1D accelerators and N_MIMD = 2 MIMD-2D accelerators to one
bus. The bus is the CPU's data bus, and it is the module's port. The CPU
itself and its external DDR2 memory are not part of this RTL.

* Bus address bits 23:16 select the target:
  * `0x00`: on-chip memory;
  * `0x01 + i`: SIMD-1D accelerator i;
  * `0x10 + i`: MIMD-2D accelerator i.
* Bits 15:0 address a word inside the target.
* A write takes effect at the clock edge.
* Read data come back one cycle after `bus_re`, with `bus_rvalid`.
* `simd_done` and `mimd_done` expose each accelerator's done flag. They can be
  used as interrupts.

The accelerators have no path to the on-chip memory of their own. The CPU
copies data in, configures and starts the accelerators, waits for done and
copies the results out, as `tb_hmp_platform` does. Accelerators run
concurrently.

## What is given and what is chosen

These follow the published architecture:

* the CPU + on-chip memory + SIMD-1D/MIMD-2D organisation;
* 8 PEs and a 16 × 256 × 16-bit banked shared memory behind an arbiter-less
  crossbar;
* two AGUs per SIMD PE and one output AGU shared by all PEs, with results
  bypassing the crossbar;
* a PE made of adder, multiplier and comparator, pipelined for add-multiply
  and multiply-add;
* two-PE groups for absolute difference and conditions;
* thread rounds of 8;
* 16 MIMD PEs with nearest-neighbour links and 6 memory modules;
* a 16-bit adder + multiplier per MIMD PE, and chaining PEs for wider and
  conditional operations;
* sequential contexts held in a configuration memory;
* partial reconfiguration of AGUs between contexts;
* an AGU of one adder and one counter, with parameters P, c, n and m;
* 3 SIMD-1D and 2 MIMD-2D accelerators, the counts used in the published
  measurements.

These are this design's own choices:

* **AGU.** The meaning of P, c, n and m (the published material names them
  but does not define them), and the 12-bit address width.
* **SIMD-1D.**
  * Low-order bank interleaving, conflict resolution (lowest port wins) and
    the sticky conflict flag.
  * The PE's stage split and op set, the accumulator, and the rule "a negative
    result takes the partner's".
  * The register map, start/done protocol, ACC_LEN/NOUT run structure, and
    CPU access to the memory only while idle.
* **MIMD-2D.**
  * The 4 × 4 arrangement of the 16 PEs.
  * The op list, operand sources and flag semantics.
  * The border crossbar, following the accelerator the MIMD-2D array is based
    on, whose left and right border PEs reach the memories through a
    crossbar.
  * One AGU per memory module, used for either reading or writing within a
    context.
  * 2048-word modules, the same 4 KB as the memory banks of that earlier
    array.
  * 16 contexts, a 16-entry AGU table, the one-cycle set-up, and all record
    formats.
* **Platform.** The bus protocol and address map, the on-chip memory size,
  and synchronous active-low reset. Reset clears control and configuration
  registers but not memory contents.

These are known differences from the published design:

* The published AGU uses 16 registers. This one keeps a private copy of its
  parameters (60 flip-flops at 12 bits) so that the parameters can be changed
  while it runs.
* The SIMD-1D accelerator is programmed through registers. No compiler path
  from GPU-style source code is provided.
* The published accelerators were produced by a generator for any PE count,
  link pattern, memory count and size. Here the same freedom exists only
  through the module parameters (`NPE`, `NBANK`, `DEPTH`; `ROWS`, `COLS`,
  `NMEM`, `MEM_DEPTH`, `NCTX`). The SIMD accelerator assumes NPE = 8
  consecutive output words in distinct banks (NBANK ≥ NPE). The MIMD-2D
  accelerator's register map limits it to 64 PEs, 4 rows (8 border inputs)
  and 7 memory modules.
* The accumulator is 16 bits wide and wraps.

## Files

| file | what it is |
|------|------------|
| `rtl/hmp_pkg.sv` | shared types: AGU parameters, SIMD instruction, MIMD PE and memory records |
| `rtl/agu.sv` | address generation unit |
| `rtl/simd_bank.sv`, `rtl/simd_xbar.sv`, `rtl/simd_pe.sv`, `rtl/simd_accel.sv` | SIMD-1D accelerator |
| `rtl/mimd_pe.sv`, `rtl/mimd_mem_module.sv`, `rtl/mimd_accel.sv` | MIMD-2D accelerator |
| `rtl/onchip_mem.sv`, `rtl/hmp_platform.sv` | on-chip memory and the top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_matmul_workload.sv` | 32 × 32 matrix product over the three SIMD-1D accelerators |
| `tb/tb_optflow_workload.sv` | optical-flow block matching (16 × 16 window, 24 × 24 search area) on one SIMD-1D accelerator |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops, and a watchdog ends a run that hangs. Testbenches that state a latency
or run time also check the cycle count. The package must be read first, for
example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/hmp_pkg.sv \
        tb/tb_hmp_platform.sv --top-module tb_hmp_platform
    ./obj_dir/Vtb_hmp_platform

Replace the last file and the top module name to run any other testbench.
`tb_hmp_platform` runs the whole platform at its default size and counts
each mechanism it exercises:

* copies in and out through the CPU;
* concurrent runs;
* multiply-accumulate;
* pair select;
* bank conflict;
* context switches;
* partial AGU reload.

Every testbench finishes in a few seconds. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/hmp_pkg.sv rtl/<module>.sv`.
