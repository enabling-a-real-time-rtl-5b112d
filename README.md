# A fixed-point p_ij accelerator for EM spike clustering

Before a neural prosthetic can decode a recording, it has to learn which neuron
produced which spike. It does this by clustering a baseline recording with
Expectation Maximization (EM). The spike waveforms are reduced by PCA to
12-dimensional points, and EM fits 12 Gaussian clusters to them. Almost all of
EM's run time goes to one inner loop of the E-step. That loop evaluates, for
every datapoint *i* and cluster *j*, the Gaussian likelihood

    p_ij = (2π)^(-D/2) · (∏_k σ_jk)^(-1/2) · exp( -½ · Σ_k (y_ik − μ_jk)² / σ_jk² )

which is O(N·K·D) work.

This RTL moves that loop onto an FPGA card that sits next to a host PC. The
card's SRAM holds the datapoints, uploaded once. For each cluster the host
loads the cluster's means, variances and two scalars into on-chip registers
and starts a run. A two-lane pipeline then streams every datapoint out of the
SRAM and writes one value, **p_ij · π_j**, per datapoint into an on-chip block
RAM. A DMA reader sends those values back to the host. The host computes
E[z_ij], Q and the M-step in software, then sends the next cluster.

The structure follows the published design "Enabling a Real-Time Solution for
Neuron Detection with Reconfigurable Hardware" (an Annapolis WildCard II
platform). That design has:

- 16-bit fractional inputs;
- 32-bit 16.16 fixed-point arithmetic;
- two datapoints read per cycle from a 32-bit SRAM;
- one result every 6 cycles;
- a dual-ported result block RAM.

The original description leaves out many details: internal widths, the divider
and exponential circuits, the bus protocol, the register map and the memory
sizes. This implementation fills those gaps itself. The section
"What is original and what is filled in" lists every such choice.

## The p_ij pipeline

The pipeline is the core of the design (`pij_pipeline`). Each cycle it takes
one 32-bit SRAM word. The word holds two coordinates of the same datapoint:
dimension 2c in bits 15:0 and dimension 2c+1 in bits 31:16. The pair index c
picks the matching means and variances from the register arrays.

```
 y[2c]  μ  σ        y[2c+1] μ  σ            (pij_head ×2, 34 cycles)
   │ |y−μ|            │ |y−μ|
   │ ÷σ  (32-stage)   │ ÷σ
   │ x²               │ x²
   └──────┬───────────┘
          + (2-input adder)                  (pij_accum, 2 cycles)
          accumulate over 6 words, restart on "first"
          >> 1 on "last"
          │
 varsum ─ − ─► e^x ─► × π_j ─► result       (pij_tail, 5 cycles)
```

### Number formats

| Quantity | Format | Notes |
|---|---|---|
| y, μ, σ, π | unsigned 0.16 | The host scales all data into [0, 1). Only fractional bits are uploaded. |
| varsum | signed 16.16 | A per-cluster constant (see below). |
| distance terms, sums, results | unsigned 16.16 in 32 bits | Saturate at 0x7FFF_FFFF, so they are also valid positive signed values. |

### Stages

1. **Head (`pij_head`, one per lane).**
   - The head forms |y − μ|. Only its square is used, so the sign is dropped.
   - It divides |y − μ| by σ in a fully pipelined restoring divider (`fix_div`). The numerator is |y−μ|·2^16, which gives a 16.16 quotient. The divider produces one quotient bit per stage.
   - It squares the quotient and rescales the square to 16.16.
   - The square saturates when it does not fit. σ = 0 gives the saturated value.
   - The head accepts a new operand every cycle and has a latency of 34 cycles.
2. **Adder and accumulator (`pij_accum`).**
   - The two lane terms are added.
   - The accumulator adds that sum to the running total for the datapoint. A first/last tag, which travels down the heads with the data, marks the datapoint's boundaries.
   - On the last word the accumulator shifts the total right by one bit (the ½ in the exponent) and outputs it.
   - All additions saturate.
3. **Tail (`pij_tail`).**
   - The tail forms x = varsum − S/2, saturated to signed 32 bits.
   - It computes e^x (`exp_unit`).
   - It multiplies the result by π_j and truncates it to 16.16.
   - varsum and π_j are sampled together with their datum and carried down the pipeline.

The first result appears 41 cycles after the last word of its datapoint. After
that, one result leaves every 6 cycles (12 dimensions / 2 lanes).

### What varsum must be

The tail computes π_j · e^(varsum − S/2). To make that equal p_ij · π_j, the
host folds both constant factors of the likelihood into one log-domain number
per cluster:

    varsum_j = ln( (2π)^(-D/2) · (∏_k σ_jk)^(-1/2) ) · 2^16      (signed 16.16)

Use whatever value of σ goes into the variance registers. Because varsum is
computed on the host, the hardware does not depend on how the normalisation is
defined. For example, if you prefer ∏σ^(-1) for standard deviations, change
only the host formula.

### The exponential

`exp_unit` rewrites e^x as 2^(x·log2 e):

1. The product w = x·log2(e) is computed with log2 e = 94548/2^16.
2. w is split into an integer part n and a 16-bit fraction f.
3. 2^f comes from a 257-entry table indexed by f[15:8] and is interpolated linearly with f[7:0].
4. The result is shifted left by n, or right by −n.

The table is built at elaboration. Entry i is 2^(i/256)·2^16, rounded. It is
produced by repeated multiplication with round(2^(1/256)·2^40) at 40
fractional bits, which gives every entry exactly, so no data file is needed.

The accuracy is about 1e-5 relative plus one LSB. The output saturates at
0x7FFF_FFFF for x ≳ 10.4. It flushes to 0 once e^x falls below one LSB
(x ≲ −11.1). Flushing to 0 is the normal outcome for a point that lies far
from cluster j.

## Around the pipeline

`em_pij_top` connects the following blocks:

| Block | Role |
|---|---|
| `lad_if` | Host bus interface. It decodes word addresses and routes writes to the SRAM, the register arrays or the control registers. It returns register reads one cycle later. |
| `param_regs` | 12 means and 12 variances for the current cluster. Writes are one entry at a time; the pipeline reads them two at a time, one dimension pair per read. |
| `mem_ctrl` | On start, reads `NPOINTS·6` consecutive SRAM words from `BASE`, one per cycle. It tags each word with its pair index and first/last marks. It writes each result to the next block RAM address. It raises `done` when all results are stored. |
| `result_bram` | A 1024 × 32 dual-port RAM. The pipeline writes one port and the DMA reader reads the other, with a one-cycle read latency. |
| `dma_ctrl` | Reads `DMA_LEN` results from block RAM address 0 upward. It offers them on a valid/ready stream to the board's DMA master. A 4-entry FIFO allows full rate under back-pressure. |

### Host register map

The host bus uses 24-bit word addresses with 32-bit data.

| Address | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start a run; bit 1: start a DMA transfer |
| 0x01 | STATUS | R | bit 0: run busy; bit 1: run done; bit 2: DMA busy |
| 0x02 | NPOINTS | RW | datapoints in this run (≤ 1024) |
| 0x03 | MIXTURE | RW | π_j, 0.16 |
| 0x04 | VARSUM | RW | varsum_j, signed 16.16 |
| 0x05 | BASE | RW | SRAM word address of the run's first datapoint |
| 0x06 | DMA_LEN | RW | results to send |
| 0x10 + k | MEAN k | RW | μ_jk, 0.16, k = 0..11 |
| 0x20 + k | SIGMA k | RW | σ_jk, 0.16 |
| bit 23 set | SRAM window | W | SRAM word at address bits [18:0] |

While a run is busy, the interface ignores these writes, so that no operand
can change under the pipeline:

- SRAM writes;
- register-array writes;
- control-register writes;
- start.

Writes to DMA_LEN and the DMA start bit are ignored while a DMA transfer is
busy.

### SRAM layout and timing

Datapoint i occupies SRAM words `BASE + 6i … BASE + 6i + 5`. Word 6i + c holds
dimension 2c in the low half and dimension 2c+1 in the high half.

The SRAM port is synchronous:

- A read returns data exactly `SRAM_LAT` cycles later (default 2), with no wait states.
- The memory controller drives the SRAM only while a run is busy.
- At all other times the host's writes reach the SRAM.

### One cluster, step by step

1. Upload all datapoints once through the SRAM window.
2. Write MEAN 0..11, SIGMA 0..11, MIXTURE and VARSUM for cluster j.
3. Write NPOINTS and BASE, then write CTRL = 1. A run takes 6·NPOINTS cycles plus about 45 cycles of pipeline and SRAM latency.
4. Poll STATUS until bit 1 (done) is set. The `done` pin shows the same bit.
5. Write DMA_LEN = NPOINTS, then write CTRL = 2. Collect the words from `dma_data` in datapoint order.
6. Repeat from step 2 for the next cluster.

If you have more than 1024 points, process them in chunks by moving BASE.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| em_pkg | DIMS, LANES, PAIRS | 12, 2, 6 | original design |
| em_pkg | fraction bits | 16 | original design |
| em_pij_top | RESULT_DEPTH | 1024 | estimate: two 512×32 block RAMs, the count the original reports |
| em_pij_top | SRAM_AW | 19 (2 MiB) | assumed; the card's SRAM size is not given |
| em_pij_top | SRAM_LAT | 2 | assumed |
| em_pij_top | NW (count width) | 16 | assumed |

DIMS and LANES are package constants. The datapath is written for two lanes
and six pairs per datapoint, so changing them needs care in `param_regs` and
`mem_ctrl`.

## What is original and what is filled in

These parts follow the original design:

- the split between host and FPGA (only p_ij on the card, one cluster at a time);
- the operator chain subtract → divide by variance → square → two-input add → accumulate → shift → subtract varsum → e^x → multiply by the mixture → block RAM;
- the number formats;
- two datapoints per 32-bit SRAM word;
- one result every 6 cycles;
- a dual-ported result block RAM read by DMA;
- the host bus loading the SRAM and small register arrays;
- a start signal that launches the memory controller.

This implementation chose the following itself:

- using the magnitude |y−μ|;
- the restoring divider and its 32-cycle latency;
- all saturation rules;
- the table-and-interpolate exponential;
- the direction of the varsum subtraction, and the meaning of varsum given above;
- the first/last tagging;
- the register map;
- the simple host bus, which stands in for the vendor's LAD bus protocol;
- refusing writes while busy;
- the SRAM word layout and latency model;
- the block RAM depth;
- the DMA valid/ready stream;
- the asynchronous active-low reset. Only control state and valid bits are reset.

The original expresses the adder-tree width and the dataset size in terms of
the cluster count K where the dimension count D is meant. Both equal 12, and
this design uses D = 12 dimensions.

Not included:

- the SRAM device itself (`tb/sram_model.sv` models it for simulation);
- the PCI-to-PCMCIA bridge and the board's DMA master;
- the neural probe;
- all host software: PCA, E[z_ij], Q, the M-step and fixed-to-floating conversion.


## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed independently in `tb/em_ref_pkg.sv`:

- Distance terms and sums are computed exactly with 64-bit integers and must match bit for bit.
- Anything after the exponential is compared with real-valued `$exp` within 2e-4 relative plus 3 LSB.

The testbenches also check timing:

- head latency: 34 cycles;
- exponential latency: 3 cycles;
- tail latency: 5 cycles;
- pipeline latency: 41 cycles, with a 6-cycle result interval;
- DMA rate: one word per cycle.

`tb_em_pij_top` runs the whole design at its default sizes, acting as the
host:

- It uploads 1024 twelve-dimensional points.
- It processes 12 clusters, one of them in two chunks.
- It moves every result out through DMA with random back-pressure.
- It checks all 12 288 results and the run time of each run.

It also counts each of the following events and fails if any never happens:

- run start and done;
- SRAM hand-over between host and controller;
- a chunked run;
- e^x flushed to zero;
- e^x saturated;
- a saturated distance term;
- a DMA stall;
- a write refused while busy.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/em_pkg.sv tb/em_ref_pkg.sv tb/tb_em_pij_top.sv --top-module tb_em_pij_top
./obj_dir/Vtb_em_pij_top
```

Replace `tb_em_pij_top` with `tb_pij_head`, `tb_exp_unit`, `tb_pij_accum`,
`tb_pij_tail`, `tb_pij_pipeline`, `tb_param_regs`, `tb_mem_ctrl`, `tb_lad_if`,
`tb_dma_ctrl` or `tb_result_bram` to run a single block. Each testbench
finishes in well under a second of wall time.

## Fit to the original workload

The original clusters 12-dimensional PCA data (4 channels × 10 waveform
components, reduced by PCA) into 12 clusters:

- **Dimensions:** the 12 dimensions match the 12 mean and 12 variance registers exactly.
- **Clusters:** there is no limit on the cluster count, because clusters run one after another.
- **Datapoints:** the original does not state how many datapoints its baseline set has.
  - One run holds up to 1024 results, the block RAM depth.
  - The assumed 2 MiB SRAM holds 87 381 datapoints (6 words each).
  - Larger sets run in chunks of 1024 by moving BASE.
