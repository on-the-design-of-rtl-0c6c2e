# DotProduct: a binary dot-product coprocessor for SVM training

Training a support vector machine with Sequential Minimal Optimization (SMO)
spends most of its time on one small kernel. The heuristics that pick the
pair of Lagrange multipliers to optimise are sequential and branchy, so they
stay in software on the host processor. The kernel function is different.
For the linear kernel it is the dot product of two training samples, and it
is called far more often than anything else. It is regular and easy to run
in parallel. This design moves that one function into a coprocessor.

Two ideas make the coprocessor small and fast:

* **The training set lives on chip.** The samples do not change during
  training, so they are loaded once into a block RAM. After that the host
  sends only two sample indexes per dot product, never the vectors.
* **Features are binary.** Each feature is 0 or 1, so a sample is a bit
  vector. The dot product of two samples is the number of positions where
  both vectors hold a 1: a bitwise AND followed by a population count. All
  128 features are handled at once, so the time does not depend on the
  vector length.

At its default size the coprocessor holds 4096 samples of 128 features. It
returns one dot product every three clock cycles.

## Blocks

| Block | Module | Role |
|---|---|---|
| INPUTS | `dp_inputs` | Host-written registers `I_REG_A`, `I_REG_B` and the Phase bit of `C_REG`. Decodes host writes into load, start and reset commands. |
| BLOCK RAM | `dp_block_ram` | `N_SAMPLES` x `N_FEATURES` bit matrix, one row per sample. Port A reads and writes; port B only reads. Reads are synchronous. |
| Processor Element (PE) | `dp_pe` | `popcount(row_a & row_b)`, combinational. |
| OUTPUT | `dp_output` | `R_REG` result register and the host read path. |
| CONTROL LOGIC | `dp_control` | Three-state sequencer (IDLE, FETCH, COMPUTE). Produces the Finish bit. |
| top | `dotproduct` | Connects the five blocks above. |
| shared | `dp_pkg` | Default sizes, register map, `C_REG` layout. |

Data path: `I_REG_A` and `I_REG_B` drive the two address ports of the block
RAM. The two rows it reads feed the PE. The PE result is stored in `R_REG`.

## Two phases

The coprocessor runs in one of two phases, chosen by the Phase bit (bit 0 of
`C_REG`).

**Phase 0: initialisation and load.** This is the phase after reset.
`I_REG_A` is the write address of the block RAM. A write to the DATA register
stores that 128-bit row at row `I_REG_A`. `I_REG_B` is disabled: writes to it
are ignored. A Start is ignored.

**Phase 1: processing.** Matrix input is disabled, so DATA writes are
ignored. `I_REG_B` is enabled. A `C_REG` write with Phase=1 and Start=1
computes the dot product of rows `I_REG_A` and `I_REG_B`.

The Reset bit of `C_REG` is a soft reset. It clears `I_REG_A`, `I_REG_B`,
`R_REG`, Finish and Phase, and stops any operation in flight. It does **not**
clear the block RAM, so a training set stays loaded across a soft reset. The
`rst_n` pin does the same, asynchronously.

## Host register map

The host sees four registers. It writes them through `host_wr`, `host_addr`
and `host_wdata`, sampled on the rising edge of `clk`. It reads them through
`host_raddr` and `host_rdata`; the read is combinational.

| addr | write | read |
|---|---|---|
| 0 `C_REG` | bit 0 Phase, bit 1 Reset, bit 2 Start | bit 0 Phase, bit 3 Finish (Reset and Start read 0) |
| 1 `I_REG_A` | sample index (low `ADDR_W` bits) | `I_REG_A` |
| 2 `I_REG_B` | sample index, phase 1 only | `I_REG_B` |
| 3 DATA | matrix row, phase 0 only | `R_REG` |

`host_wdata` is one row wide (`N_FEATURES` bits), so a row is loaded in one
write. `host_rdata` is `RD_W` bits wide: just enough for the widest of
`C_REG`, an index and a result. Finish and `R_REG` are also brought out as
the pins `finish` and `r_reg`.

## Timing of a dot product

One dot product takes three cycles, counting the cycle in which Start is
written:

```
cycle        1               2              3              4
host         write Start     (free)         (free)         next Start
state        IDLE            FETCH          COMPUTE        IDLE
action       indexes taken   both rows      AND + count    Finish=1,
                             read           -> R_REG       result readable
```

Finish is cleared when a Start is accepted. It is set at the end of cycle 3,
and it stays set until the next accepted Start or a reset. A Start written
while an operation is in flight is ignored.

The host can write the indexes for the next dot product while the current
one is running. This works because the block RAM samples the old index on the
same clock edge that loads the new one. So a host that writes Start, then
`I_REG_A`, then `I_REG_B` in three consecutive cycles gets one result every
three cycles: `t = 3 * v` cycles for `v` dot products. Each result stays in
`R_REG` until the next one is written over it. The end-to-end testbenches
check this rate.

At the 35 MHz reached on the original FPGA, three cycles per product gives
about 11.7 million 128-bit dot products per second.

## Using it from SMO

The host software keeps everything except the kernel:

1. After reset, for each sample `i`: write `I_REG_A = i`, then write its
   feature bits to DATA.
2. Write `C_REG = 4'b0001` to enter the processing phase.
3. Whenever SMO needs `K(x_i, x_j)`: write `I_REG_A = i`, write
   `I_REG_B = j`, write `C_REG = 4'b0101`. Wait for Finish, then read `R_REG`.
   To compute a kernel row (one sample against many), stream the requests as
   described above.
4. To train on another data set, write `C_REG = 4'b0010` (soft reset) and go
   back to step 1.

Only the linear kernel on binary data is built. Polynomial and RBF kernels
could be built on top of the same dot product, with extra arithmetic after
the PE, but that arithmetic is not part of this RTL.

## Capacity

The default size is `N_SAMPLES = 4096` and `N_FEATURES = 128`. That covers
the first three corpora of the Adult census benchmark, with 1605, 2265 and
3185 samples of 123 binary features each. The larger Adult corpora, up to
about 32,500 samples, do not fit. Running them would need a deeper memory or
external memory. The block RAM is 512 Kbit at the default size.

## Where this RTL makes its own choices

The overall structure follows the original design: the register names, the
phases, the Phase, Reset and Finish bits, the AND-and-count PE, the on-chip
matrix, the 4096 x 128 capacity and the three-cycle operation. The following
are this implementation's own choices:

* The host bus: a 2-bit register address, a row-wide write port, a narrow
  read port, and the register map above. The original does not specify how
  the host link works.
* An explicit Start bit in `C_REG`, and the bit positions of all `C_REG`
  fields.
* A dual-port block RAM with synchronous, read-enabled reads. Both operands
  are fetched in the same cycle.
* A purely combinational PE, built as a sum over the AND bits. Synthesis
  turns it into an adder tree.
* Index writes accepted at any time. Start ignored in phase 0 and while busy.
  Finish held until the next Start.
* The block RAM is not cleared by reset.
* No address auto-increment while loading.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block against a reference computed in the testbench, and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_dp_pe`: corner vectors and 2000 random pairs.
* `tb_dp_block_ram`: full fill, dual reads, hold, read-during-write.
* `tb_dp_inputs`: the phase gating rules and soft reset, checked with
  random write sequences.
* `tb_dp_control`: cycle-by-cycle sequence, back-to-back rate, abort by
  soft reset.
* `tb_dp_output`: `R_REG` load, hold and clear, plus every read address.
* `tb_dotproduct`: end-to-end test on a 256-sample instance. It makes every
  mechanism happen at least once, counts how often each happened, and fails
  if one never did. The mechanisms are: row load, `I_REG_B` disabled,
  Start ignored in phase 0, phase switch, DATA ignored in phase 1, single
  and streamed dot products, Start ignored while busy, and soft reset.
* `tb_dotproduct_full`: the top at its default parameters. It loads training
  sets the size of Adult-1, -2 and -3, each sample with 14 of its 123
  features set (the usual binarisation of Adult). Then it loads a random set
  that fills all 4096 rows. For each set it computes a full kernel row and
  checks every value, and checks that the row takes exactly 3 cycles per
  product.

* `tb_fsmo_train`: the whole hardware-software scheme. The testbench acts
  as the host and runs Platt's SMO: error cache, examine-all and non-bound
  passes, second choice by the largest |E1 - E2|, C = 0.05. It trains on a
  synthetic Adult-like set of 1605 samples, the size of Adult-1. Every kernel
  value comes from the coprocessor and is checked against a reference. At
  the end, all multipliers must lie in [0, C], the sum of y_i * alpha_i must
  be zero, and every sample must meet the KKT conditions. A run takes about
  9,200 optimisation steps and 48 million dot products, at exactly 3
  coprocessor cycles each. It needs about two minutes of simulation.

The sample data is generated, not the real Adult files. These runs therefore
check function and timing, not training results.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dotproduct_full rtl/dp_pkg.sv tb/tb_dotproduct_full.sv
./obj_dir/Vtb_dotproduct_full
```

Swap in another testbench name to run a different test. `dp_control`
contains two concurrent assertions on the sequencing, enabled by `--assert`.
