# Pair HMM forward-algorithm accelerator built from PE rings

Variant callers such as GATK's HaplotypeCaller spend most of their time
scoring every sequenced read against every candidate haplotype with the
forward algorithm of a pair hidden Markov model (Pair HMM). This RTL computes
that score in hardware. It follows the PE-ring architecture of the thesis
*Hardware Acceleration of the Pair HMM Algorithm for DNA Variant Calling*: a
short ring of floating-point processing elements sweeps the dynamic-programming
matrix along anti-diagonals. Several rings run side by side, and each ring
keeps twelve independent matrices in its pipelines at once.

The default configuration matches the thesis' main Stratix V design:

- 8 rings of 8 PEs each (64 PEs in total);
- single-precision adders with 7 cycles of latency and multipliers with 5;
- 12 jobs interleaved per ring;
- reads and haplotypes of up to 302 bases.

## What is computed

A job is a haplotype of `hlen` bases and a read of `rlen` bases. Read base `r`
has a quality-derived descriptor, which the host computes (`phmm_pkg::read_desc_t`):

| field | meaning |
|---|---|
| `base` | read base, A/C/G/T = 0..3 |
| `prior_match`, `prior_mismatch` | emission prior `1-Q_base` and `Q_base` |
| `a_mm` | `1-(Q_i+Q_d)` |
| `a_dm` | `1-Q_g`, also used as `a_im` |
| `a_mi`, `a_md` | `Q_i`, `Q_d` |
| `a_ii`, `a_dd` | `Q_g` |

All values are IEEE-754 single precision. Rows are read bases and columns are
haplotype bases. The recursion is run with the destination row's probabilities:

```
M(c,r) = prior(c,r) * ( a_mm*M(c-1,r-1) + a_dm*(I(c-1,r-1) + D(c-1,r-1)) )
I(c,r) = a_mi*M(c-1,r) + a_ii*I(c-1,r)
D(c,r) = a_md*M(c,r-1) + a_dd*D(c,r-1)
result = M(hlen,rlen) + I(hlen,rlen) + D(hlen,rlen)
```

On the border, `M(0,0) = 1` and every other border value is 0. This is a
global alignment, as in the thesis. It is **not** GATK's variant, which seeds
the first row with a scaled constant so that a read can start anywhere in the
haplotype. One consequence: for pairs that need long gaps or have many
mismatches, the likelihood drops below the single-precision normal range
(about 1e-38), and the design returns 0.

## The PE ring

PE `k` owns one read row and walks along the haplotype one column per
*step*. It stays one step behind PE `k-1`, so the PEs of a ring always sit on
one anti-diagonal of the matrix. A cell only needs three things:

- its own result of the previous step, for `I`;
- the upstream PE's result of the previous step, for `D`;
- the upstream PE's result of two steps earlier, for `M`.

Every value is therefore consumed by the PE itself or by its neighbour within
two steps.

A ring of `N_PE` PEs covers a read in passes of `N_PE` rows. The last PE of a
pass writes each cell it computes into the **internal buffer**. On the next
pass, the first PE reads those cells back as its upstream row, so the ring
handles any read length up to `R_MAX` without changing the hardware. A cell
waits in the buffer for at most `H_MAX + 1 - N_PE` steps. This is the
buffer's depth per slot, so shorter rings need deeper buffers.

## Inside a PE: one adder and one multiplier per step

Computed directly, `M` needs an add, two multiplies, another add and a final
multiply: 24 cycles deep. The PE starts part of it one step early instead.
From the upstream result it forms:

```
t_a = a_dm * (I + D)
t_b = a_mm * M
```

These terms feed the next column's `M`. After that, every path through the PE
is one adder and one multiplier (7 + 5 = 12 cycles):

```
M = prior * (t_a + t_b)
I = a_mi*M_own + a_ii*I_own
D = a_md*M_up  + a_dd*D_up
```

That is 7 multipliers and 4 adders per PE, as in the thesis. The thesis
places the `t` operators in the upstream PE. Here they sit at the input of the
consuming PE and are fed from the upstream result. They start on the same
cycle and produce the same numbers.

## Twelve matrices per ring (slots)

A step lasts as long as the PE pipeline: `L = ADD_LAT + MUL_LAT` = 12 cycles.
The pipelines are never idle waiting for a step to finish. Instead they carry
`L` independent jobs, called slots. Slot `s` owns every cycle whose count is
`s` modulo `L`. A PE's result for slot `s` comes out of its pipelines exactly
when slot `s` comes round again, which is when the PE and its neighbour need
it. Per slot, each PE keeps two read descriptors: its current row's and its
next row's. The internal buffer and the input memory have one region per slot.

## Schedule of a job (`ring_ctrl`)

The control word (`ring_tok_t`) enters PE 0 and moves one PE further every
step. It carries:

- the column and its haplotype base;
- first-pass and last-pass flags;
- the index of the last PE that holds a real row;
- optionally, a read descriptor addressed to one PE.

Only PE 0 receives data from outside; every other PE gets its inputs from its
neighbour. For one job the controller issues:

1. **Preload pass**, `N_PE` steps. Step `q` sends the descriptor of row `q`
   to PE `q`.
2. **Row passes**, `P = ceil(rlen/N_PE)` of them, each
   `W = max(hlen+1, N_PE)` steps long; the last pass is `hlen+1` steps.
   - Step `q` is column `q` for PE 0. Column 0 is the border step, which only
     prepares `t` for column 1.
   - On steps `q < N_PE`, PE `q` receives the descriptor of its row in the
     next pass. It switches to that descriptor when its own column 0 comes.
   - The spacing `W` makes sure the buffer already holds a cell when PE 0
     needs it.
   - When `W = N_PE`, the cell is read in the same cycle as it is written, and
     the buffer passes it straight from its write port to its read port.
3. **Result.** The PE holding row `rlen` hands its last-column cell to
   `result_sum`, which adds `M + I + D` with two more pipelined adders. The
   slot stays busy until this result has been delivered.

The latency from the start handshake to the result strobe is between `E+1`
and `E+L` cycles. The offset depends on where the slot's turn falls.

```
E = L*(N_PE + (P-1)*W + hlen + k + 1) + 2*ADD_LAT + 1,   k = rlen-1-(P-1)*N_PE
```

The testbenches check this latency for every job. At the end of a read, the
PEs beyond the last row idle for the rest of the last pass; the thesis
discusses these idle PEs. The preload pass costs `N_PE` steps per job. The
pass spacing and the preload pass are this design's own choices: the thesis
gives the ring organisation but not its control.

## Host interface (`phmm_accel`)

The rings share nothing. The host chooses a ring and an idle slot, then:

1. Writes the haplotype bases (`wr_hap_en`, address = base index) and the
   read descriptors (`wr_read_en`) through the write port, one per cycle.
2. Raises `start_valid` with the ring, slot, `hlen`, `rlen` and a 16-bit tag.
   `start_ready` is high when that slot is idle.
3. Watches `busy[ring][slot]`, which stays high until the result leaves.
4. Collects `res_valid[ring]` with `res_slot`, `res_tag` and `res_value` (the
   likelihood) for one cycle.

Do not write into a busy slot. This interface is this design's own: the
thesis does not describe how data reach the rings.

## Floating point

`fp_add` and `fp_mul` are fully pipelined single-precision units. They have
the latencies the thesis quotes for its vendor cores at 200 MHz (7 and 5
cycles) and accept one operation per cycle.

- Rounding is to nearest-even.
- Subnormals are flushed to zero.
- Infinities and NaN follow IEEE-754.

All logic sits in the first stage, and the remaining stages are plain
registers meant for retiming. To approach 200 MHz, a real implementation
would need to spread that logic. Mapping operators to DSP blocks or to logic
is a synthesis decision and is not modelled.

## Configurations

| parameter | default | meaning |
|---|---|---|
| `NUM_RINGS` | 8 | rings in the accelerator |
| `N_PE` | 8 | PEs per ring |
| `ADD_LAT`, `MUL_LAT` | 7, 5 | operator latencies; `ADD_LAT+MUL_LAT` slots per ring |
| `H_MAX`, `R_MAX` | 302 | longest haplotype and read |

The thesis compares rings of 8x8, 16x4, 32x2 and 64x1 PEs; each is a
parameter setting here. Its Arria 10 design (16 rings of 8 PEs, 3-cycle
operators, so 6 slots) is `NUM_RINGS=16, ADD_LAT=3, MUL_LAT=3`. Its test
data have lengths from 10 to 302 bases, which fit the default sizes.

## Throughput on benchmark-shaped batches

Each ring finishes one step of one slot per cycle, so a batch needs at least
`sum(steps of all jobs) / NUM_RINGS` cycles. The single host write port needs
`hlen + rlen + 1` cycles per job, a second limit. `tb_workloads` runs three
synthetic batches at the default configuration. They have the pair counts and
length ranges of the benchmark sets the thesis reports. Lengths are uniform
over each range, and every read is within 3 bases of its haplotype.

| batch | pairs | lengths | cycles | at 200 MHz | ring-work bound | write-port cycles |
|---|---|---|---|---|---|---|
| "tiny" | 332 | 10..41 | 20,452 | 0.10 ms | 4,946 | 17,667 |
| "10s" | 3,550 | 10..263 | 1,430,097 | 7.15 ms | 1,337,571 | 957,589 |
| "1m" sample | 600 of 29,307 | 10..302 | 421,054 | 2.11 ms | 308,554 | 189,192 |

Short pairs are limited by the write port, not by the rings. A wider or
per-ring load path would remove that limit. The thesis reports 5.3 ms for the
real "10s" set on the same 8 x 8 configuration. Its length mix is not known
here, so the two numbers are not directly comparable. Every likelihood in
these runs is checked against the reference, and each batch must finish
within 1.3 times the larger bound plus one job's latency.

## What is not here

- The host software that parses datasets and computes the probabilities.
- The FPGA board and the host link.
- Any arbitration of a shared memory between rings. Each ring has its own
  input memory, so the memory-port contention the thesis warns about for many
  small rings does not arise.
- `N` bases. Bases are 2 bits.

## Files and simulation

- `rtl/phmm_pkg.sv`: types (`read_desc_t`, `fvec_t`, `ring_tok_t`) and limits.
- `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/delay_line.sv`, `rtl/delay_line_r.sv`:
  arithmetic and pipeline registers.
- `rtl/phmm_pe.sv`, `rtl/internal_buffer.sv`, `rtl/ring_ctrl.sv`,
  `rtl/ring_input_mem.sv`, `rtl/result_sum.sv`, `rtl/pe_ring.sv`,
  `rtl/phmm_accel.sv` (top).
- `tb/tb_fp_pkg.sv`: reference arithmetic, with double-to-single rounding and
  a double-precision forward algorithm.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_phmm_accel` runs the top at its default parameters. It starts 48 jobs
spread over all 8 rings, including a 302 x 302 job, short-haplotype jobs that
use the buffer bypass, reads shorter than the ring, and slot reuse. It checks
every likelihood against the double-precision reference (relative error below
1e-4) and every latency against the formula above. It simulates in a few
seconds. To run it:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/phmm_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_phmm_accel.sv \
  --top-module tb_phmm_accel -Mdir obj && obj/Vtb_phmm_accel
```

`tb_workloads` (the batches above) simulates in about a minute. The other
testbenches run the same way with their own top module. The ring
testbench uses 4-PE rings so that short reads already take several passes.
