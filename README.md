# CGP accelerator with multiple fitness units

This is synthesizable SystemVerilog for a hardware accelerator of
**Cartesian genetic programming (CGP)**. The target application is evolving 3×3
image filters. Evolution searches for a small circuit of 8-bit arithmetic and
logic nodes that turns a noisy training image into a clean one.

Almost all of the run time goes into fitness evaluation: each candidate circuit
is run over every pixel of the training image. The accelerator therefore puts
the candidates themselves into hardware. Each one is a *virtual reconfigurable
circuit* (VRC), a pipelined grid of programmable nodes whose configuration
register is the chromosome. Four VRCs evaluate four offspring at once from one
pixel stream. Meanwhile, an embedded processor runs the evolution loop and
prepares the next four offspring in a second memory bank.

The design point is:

| quantity | value |
|---|---|
| VRC grid | 8 columns × 4 rows of configurable functional blocks (CFBs) |
| operand width | 8 bits |
| function set | 16 functions |
| VRC inputs / outputs | 9 inputs (3×3 window), 1 output |
| bitstream | 12 bits per CFB, 48 bits per column in a 64-bit word, 8 words per VRC |
| VRCs in parallel (N_c) | 4 (the RTL also builds with 1, 2 or 8) |
| population memory | 2 banks × 4 sections, 256-bit read port, 32-bit processor port |
| training image | 128 × 128 pixels, giving 15 876 interior training vectors |
| clock | 100 MHz in the original FPGA implementation |

At 100 MHz, one pass of the image takes 16 384 cycles and evaluates four
candidates. That is about 24 400 candidate filters per second.

## Block structure

```
                 processor bus (32 bit)                        irq
                        │                                       ▲
        ┌───────────────┴────────────────────┐                  │
        │                                    │                  │
  ┌─────▼─────────────┐   bank valid   ┌─────▼──────────────────┴─┐
  │ pop_mem           │◄──────────────►│ control_unit             │
  │ NB banks ×        │  cfg read      │ bank choice, config      │
  │ N_c sections      │◄───────────────│ streaming, result regs   │
  │ XOR read path     │                └──▲───────┬──────────▲────┘
  └────────┬──────────┘                   │       │ cfg_we,  │
           │ C1..C4 (4×64 bit)    eval_start   run│ cfg_col  │best fit, index
           ▼                              │       ▼          │
  ┌──────────────────────────────────────────────────────────┴─────┐
  │ fitness_unit                                                   │
  │  SRAM1 ─► input_gen ─► x (72 bit) ─┬─► vrc 1 ─► fitness_acc ─┐ │
  │  (3 row_fifo + REG)                ├─► vrc 2 ─► fitness_acc ─┤ │
  │                                    ├─► vrc 3 ─► fitness_acc ─┼─► best_select
  │                                    └─► vrc 4 ─► fitness_acc ─┘ │
  │  SRAM2 (required pixel) ──────────────────────────▲            │
  └────────────────────────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `cgp_pkg` | shared constants, the `cfb_fn_e` function codes, the `cfb_cfg_t` CFB word |
| `cfb` | one node: two 4-bit operand selectors, 16 functions, output register |
| `vrc` | 8×4 grid of `cfb`, column configuration registers, input delay line |
| `row_fifo` | one image-row delay (circular buffer, block-RAM style) |
| `input_gen` | 3×3 sliding window from the pixel stream, with window tags |
| `fitness_acc` | Σ\|y_i − y\| for one VRC |
| `best_select` | minimum of the N_c fitness values and its index (ties go to the lower index) |
| `fitness_unit` | SRAM addressing, `input_gen`, N_c × `vrc`, N_c × `fitness_acc`, `best_select` |
| `pop_mem` | population memory with difference storage and bank valid bits |
| `control_unit` | bank scheduling, configuration streaming, result and control registers |
| `cgp_accel` | top level |

These parts live outside the RTL: the embedded processor that runs the
evolution, the two external SRAMs and the host link. The testbenches model the
processor and the SRAMs.

## The VRC and its bitstream

The grid is a pipeline. Every CFB registers its output, so column *c* works on
the window that entered *c* cycles earlier. The nine window pixels travel along
a delay line with one register per column. Column *c* therefore sees the same
window as the outputs of column *c*−1 it is combining. The circuit output is
row 0 of the last column. Latency is 8 cycles, and a new window enters every
cycle.

Each CFB word is 12 bits. CFB *r* of a column uses bits `[12r+11:12r]` of the
column word, and bits 63:48 are unused.

| bits | field |
|---|---|
| 3:0 | operand A selector |
| 7:4 | operand B selector |
| 11:8 | function |

**Operand selectors.** Codes 0–8 pick window pixel *x[code]*. The window
layout is `x[3*row + col]`, with row 0 at the top, and `x[4]` is the centre.
Codes 9–15 pick an output of the previous column: row (code − 9) mod 4. In
column 0 there is no previous column, so codes 9–15 pick window pixels
(code − 9) mod 9. Every 4-bit pattern is therefore a legal connection, and
mutation can flip any bit.

**Functions** (`cfb_fn_e`):

| code | function | code | function |
|---|---|---|---|
| 0 | a + b (mod 256) | 8 | a & b |
| 1 | a − b (mod 256) | 9 | a \| b |
| 2 | a >> 1 | 10 | a ^ b |
| 3 | min(a, b) | 11 | ~(a & b) |
| 4 | max(a, b) | 12 | ~(a \| b) |
| 5 | \|a − b\| | 13 | ~(a ^ b) |
| 6 | a | 14 | a & ~b |
| 7 | ~a | 15 | a \| ~b |

The original design specifies six arithmetic functions and ten logic functions.
The exact list of logic functions, the code order and the wrap-around
arithmetic are choices made in this implementation.

## Streaming evaluation and the configuration wave

This is the least obvious part of the design.

**The image stream never stops.** While `run` is set, the fitness unit reads
SRAM1 one pixel per cycle at sequential addresses, wrapping at the end of the
image. `input_gen` chains three identical row buffers (`row_fifo`, depth
W−1). Each buffer is followed by a 3-pixel shift register. Together the three
registers hold three vertically adjacent pixel triples, which form the 72-bit
window. A position counter follows the pixel entering the top-row register.
From it `input_gen` derives the following tags:

* `win_valid`: the window lies inside the image. There are (W−2)(H−2) valid
  windows per pass.
* `win_first`: the window at top-left. It starts an evaluation.
* `win_last`: the window at bottom-right. It ends an evaluation.
* `win_caddr`: the address of the window centre.

The last windows of pass *k* are pushed out by the first row of pass *k*+1.
Each pass is one evaluation and takes exactly W·H cycles.

**The configuration follows the data.** The first window of a pass is
completed when SRAM1 address P = 3W + 2 is issued. In that cycle the fitness
unit pulses `eval_start`. The control unit then reads column *c* of the chosen
bank in cycle `eval_start + c`, and the population memory returns it one cycle
later. The word is written into column *c* of all VRCs in cycle
`eval_start + 1 + c`, so it takes effect exactly when the first window of the
new evaluation reaches that column:

```
cycle         T      T+1      T+2         T+3         ...  T+9
SRAM1 addr    P      P+1      P+2
window col 0                  first window
window col 1                              first window
mem read      col0   col1     col2        ...
VRC write            col0     col1        col2        ...  col7
```

The last windows of the previous evaluation entered the grid about 2W cycles
earlier, so no column is rewritten while it still holds an old window. No cycle
is spent reconfiguring.

**Required output.** For each window, SRAM2 is read at the centre address
7 cycles after the window enters the VRC. The pixel arrives together with the
VRC output. `fitness_acc` restarts on the first window and latches on the last
one. `best_select` then reports the minimum and its index 10 cycles after the
last window, early in the next pass.

## Population memory and difference storage

The evolution strategy is 1 + λ with λ = 4. Every offspring is its parent with
*h* inverted bits. Offspring 2–4 therefore differ from offspring 1 in only a
few bits, so `pop_mem` stores them that way:

* Section 1 of a bank holds offspring 1 in full.
* Sections 2–4 hold `offspring_1 XOR offspring_i`. These words are mostly zero.
* The 256-bit read port returns `C1 = S1` and `Ci = S1 XOR Si`, which is one
  column of all four bitstreams in one cycle.

The processor writes only the 32-bit words that change, which cuts its memory
traffic.

**Processor address map.** Addresses are 32-bit word addresses. The memory
region is organised as follows:

| address | content |
|---|---|
| `s*256 + (bank*8 + col)*2 + half` | section *s* (0-based), bank, column, 32-bit half (0 = bits 31:0) |

The control unit registers start at 2048:

| address | register | access |
|---|---|---|
| 2048 | CTRL | bit 0 `run`. Clearing it stops the image stream; an evaluation in flight is dropped and its bank stays valid, so it is evaluated again once `run` is set |
| 2049 | VALID | read: one valid bit per bank. Write 1: mark the bank ready, which also clears its result flag |
| 2050 | EVALS | evaluations reported |
| 2051 | STALLS | image passes that found no valid bank |
| 2052 + b | RESULT of bank b | `[23:0]` best fitness, `[27:24]` VRC index (0 = section 1), `[31]` result present |

Read data appears one cycle after `ppc_re`.

**Scheduling.** At each `eval_start` the control unit takes the next valid bank
in round-robin order. If no bank is valid, the pass is a *stall*: nothing is
loaded and its result is discarded. When the result of a bank arrives, the unit
stores it in the bank's RESULT register, clears the bank's valid bit and
pulses `irq`. With two banks the processor refills one bank while the other is
evaluated. In steady state the evaluations follow each other one image pass
apart, with no stalls.

**Processor side, per bank and generation.** The accelerator returns only the
best fitness f_best and its index i. With these two values the processor turns
section 1 into the new parent in place:

1. If f_best > f_parent, the offspring is worse than the parent. The processor
   undoes the mutations of offspring 1 in section 1.
2. Otherwise, if i > 1, it XORs section i into section 1.
3. Otherwise (i = 1) it does nothing.

It then writes the new mutations: changed words of section 1, and new
difference words in sections 2–4, with the old difference bits cleared. Finally
it sets the bank valid. An offspring with fitness equal to the parent's
replaces the parent. `tb/tb_cgp_accel.sv` implements this loop.

## Performance and size

* **Cycles per evaluation:** one evaluation of N_c candidates takes W·H cycles.
  At 128×128 that is 16 384 cycles, or 163.8 µs at 100 MHz. This gives
  6 104 evaluations of 4 candidates per second, about 24 400 candidates/s.
* **Comparison with the original design:** the original figure assumes
  (W−2)(H−2) = 15 876 cycles, which gives 25 195 candidates/s. That would need
  more than one new pixel per cycle at the row ends. Here SRAM1 delivers one
  8-bit pixel per cycle, so the 2W + 2(H−2) border positions cost cycles too
  (3 %).
* **Synthesis (yosys, generic cells):**
  * one VRC: 1 120 flip-flops, against 1 084 in the original FPGA design
  * whole accelerator with N_c = 4: 3 486 flip-flops, plus 7 352 memory bits
    (row buffers and population memory)

## Departures and own choices

The following are decisions of this implementation. The original design leaves
them open.

* **Bus and registers:** the processor bus protocol, the address map, the
  register set and the interrupt.
* **Bitstream encoding:** the selector wrap-around rule, the field order in the
  CFB word and the list of logic functions.
* **Banks:** two banks. Two is the minimum needed to overlap evaluation with
  preparing the next generation.
* **External SRAMs:** synchronous, with a one-cycle read latency, one pixel per
  word, row-major.
* **Accumulator width:** 24 bits. This is enough for 128×128 images. Larger
  images need a larger `FIT_W`.
* **Ties:** `best_select` resolves ties toward the lower index.
* **Cycles per evaluation:** W·H, as explained above.
* **Circuit output:** row 0 of the last column. The circuit has no separate
  output gene.
* **XOR placement:** the reconstruction of the full bitstreams (section 1
  XOR section i) sits at the output of the population memory, as in the
  original block diagram of that memory. The original text counts this
  circuit as part of the fitness unit. Both placements have the same function.
* **Stopping:** clearing `run` drops an evaluation in flight. The bank stays
  valid and is evaluated again after a restart.

Not built:

* the input modes for other problem classes, i.e. samples passed straight to
  the VRC inputs, or a buffer of previous samples. Only the image filter
  window is built;
* the path that writes training data into the SRAMs. The accelerator only
  reads them, and the testbenches fill the SRAM models directly;
* the processor, its memory, the bus bridge and the host software. The
  end-to-end testbench models the processor's search algorithm.

The control unit supports one evaluation in flight at a time. The result of an
evaluation must arrive before the next `eval_start`, which holds when 2W is
larger than the VRC depth (W > 4 for 8 columns). An assertion checks this.
`pop_mem` also asserts that only valid banks are read.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/cgp_ref_pkg.sv` is an independent,
unpipelined reference model of a CFB, a VRC and the fitness of a bitstream on
an image.

| testbench | what it exercises |
|---|---|
| `tb_cfb`, `tb_vrc`, `tb_row_fifo`, `tb_input_gen`, `tb_fitness_acc`, `tb_best_select`, `tb_pop_mem`, `tb_control_unit` | one module each, against the reference model or hand-computed values |
| `tb_fitness_unit` | an 8×6 image. Configuration is rewritten on every pass, and each candidate's fitness and the W·H result spacing are checked |
| `tb_cgp_accel` | the full default size: 128×128, N_c = 4, 2 banks. It runs 12 generations of two independent 1+4 evolutions, with a salt-and-pepper denoising workload |
| `tb_cgp_accel_nc` | the top with N_c = 1, 2, 4 and 8 on 16×16 images, using `tb_accel_agent`; each agent also stops and restarts `run` during one evaluation |

`tb_cgp_accel` covers the following cases:

* it checks every result against the reference model
* it reads each new parent back
* it requires each mechanism to occur at least once: stall, both banks
  evaluated, back-to-back evaluations exactly W·H cycles apart, non-zero
  difference sections, and all three parent-update cases

It runs in well under a minute.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -j 0 --top-module tb_cgp_accel \
    -y rtl -y tb +libext+.sv -Irtl rtl/cgp_pkg.sv tb/cgp_ref_pkg.sv tb/tb_cgp_accel.sv
./obj_dir/Vtb_cgp_accel
```

Replace the top module and the last file for the other testbenches. The
testbenches that do not use the reference model need no `cgp_ref_pkg.sv`, but
it does no harm. Registers that only carry data have no reset, so the
testbenches read outputs only once the pipeline has filled.

**Changing the design:**

* **Image size:** set `W`/`H` on `cgp_accel`. H ≥ 4 is required, and 2W must
  exceed the VRC depth.
* **Number of VRCs:** set `N_VRC` to 1, 2, 4 or 8. It must be a power of two,
  and at most 8 with this address map.
* **Number of banks:** set `NBANK`, up to 12 with this register map.
* **VRC geometry:** change the constants in `cgp_pkg`. The column word must
  hold 12 bits per row.
