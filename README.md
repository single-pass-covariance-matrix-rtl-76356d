# Single-pass covariance matrix accelerator

This design computes the covariance matrix of a data set with `m` dimensions
and `n` samples while reading the data exactly once. It is the FPGA half of a
hybrid FPGA/CPU accelerator. The RTL follows the architecture published as
*Single-Pass Covariance Matrix Calculation on a Hybrid FPGA/CPU Platform*. The
widths, interfaces and control are this implementation's own.

## The idea: two moments instead of two passes

The textbook covariance needs two passes over the data. The first pass finds the
means. The second pass sums the products of the centred values. The identity

```
K(i,j) = ( A(i,j) - S(i) * S(j) / n ) / n
A(i,j) = sum over samples k of x_i[k] * x_j[k]      (A = X X^T)
S(i)   = sum over samples k of x_i[k]               (S = X 1)
```

replaces both passes with two raw moments. Each moment grows by one term per
sample, so each sample can be dropped once it has been added:

* `A` grows by the tensor product of each sample with itself: `A += x^T (x) x`.
* `S` grows by the sample itself.

The hardware only does these integer accumulations. The divisions need floating
point, and only `m^2` of them are done once per job, so they are left to the
host CPU.

`A` is symmetric. Only its upper triangle, `m(m+1)/2` entries, is computed,
stored and sent back.

## Data path

```
            cache lines                             result lines
 host ──► cl_receive ──┬──► par_engine  (m ≤ 16) ──┐
          (assemble a  │     XX^T regs + X1 sums   ├──► result_writer ──► host
           sample,     └──► semi_engine (m > 16) ──┘     (X1, then the
           pick engine)      xxt_row_ram + X1 sums        XX^T triangle)
                         cov_ctrl: clear / run / write / done
```

| Module | Role |
|---|---|
| `cov_top` | Top level. Wires everything together and chooses which engine answers readout. |
| `cl_receive` | Assembles one sample from one or more cache lines. Sends it to the engine that matches `m`. |
| `par_engine` | Fully parallel engine. One multiplier per triangle entry, one sample per cycle. |
| `semi_engine` | Semi-parallel engine. One triangle row per cycle, `m` cycles per sample. |
| `xxt_row_ram` | Upper-triangle row storage used by the semi-parallel engine. |
| `sum_acc` | Per-dimension sums `S`. Each engine has one. |
| `result_writer` | Streams `S` and the triangle of `A` back as cache lines. |
| `cov_ctrl` | Job sequencing, sample counting and configuration checks. |
| `cov_pkg` | Default sizes and triangle-index helpers. |

### Input format

A sample of `m` signed `DATA_W`-bit values is sent as `ceil(m / LANES)` lines,
where `LANES = CL_W / DATA_W` (16 by default). Value `k` sits in bits
`[(k % LANES)*DATA_W +: DATA_W]` of line `k / LANES`.

Every sample starts on a new line. When `m` is small, most of each line is
therefore unused. Unused lanes may hold anything; they are zeroed on entry.

## The two engines

The size of the tensor product grows with `m^2`. Whether all of it fits into
multipliers decides the engine, and this choice is the core of the design.

The threshold is one cache line: `m ≤ LANES` (16 with the defaults) uses the
parallel engine, and anything larger uses the semi-parallel one. `cl_receive`
makes this choice from the configured `m`, and `semi_mode_o` reports it.

### Fully parallel engine (`m ≤ 16`)

`par_engine` has `16·17/2 = 136` signed multipliers, one per upper-triangle
pair `(i,j)`. It works as a two-stage pipeline:

```
cycle t   : sample taken; all 136 products computed and registered (DSP output register);
            sample added to the X1 sums
cycle t+1 : each product added to its own 64-bit accumulator register (entries with j ≥ m skipped)
```

It takes a new sample every cycle. A one-line sample also arrives every cycle,
so in this range the speed is set by the input stream, not by the arithmetic.

The triangle lives in registers, not RAM, because every entry changes every
cycle.

### Semi-parallel engine (`17 ≤ m ≤ 160`)

A full tensor product of 160 values would need 12880 multipliers.
`semi_engine` instead has one multiplier per dimension (160) and produces one
row of the product per cycle.

* When a sample is taken, it is copied into two registers:
  * the *operand buffer* `opnd_q`, which holds still;
  * the *duplicated buffer* `shreg_q`, which shifts down by one value per cycle.
* Element 0 of `shreg_q` is the *multiplier register*. In cycle `i` it holds
  `x_i`.
* All 160 multipliers form `x_i * x_j` against the operand buffer. That is row
  `i` of the sample's tensor product.
* The products are registered. In the next cycle they are added to row `i` of
  `xxt_row_ram` by a one-cycle read-modify-write. Only columns `i ≤ j < m` are
  written.

```
take sample ──► row 0 ──► row 1 ──► ... ──► row m-1 ─┐  (multiply stage)
                   └─► acc row 0 ──► ... ──► acc row m-1   (accumulate stage, one cycle behind)
                                      next sample taken in the row m-1 cycle
```

A sample takes exactly `m` cycles, and samples follow each other without a gap.
`acc_done` for a sample comes `m+1` cycles after it was taken.

Each sample brings `4m` bytes and takes `m` cycles. The engine therefore
consumes a constant 4 bytes per cycle whatever `m` is. At around 200 MHz that is
about 0.8 GB/s, which matches the flat throughput the original design reports
above 16 dimensions. The `tb_cov_sweep` testbench prints this rate for every
dimension count:

| `m` | Engine | Cycles per sample | Sample bytes per cycle |
|---|---|---|---|
| 2, 3, 4, 5, 6, 8, 12, 16 | parallel | 1 | `4m` (8 … 64) |
| 17, 29, 32, 48, 56, 64, 72, 96, 128, 144, 160 | semi-parallel | `m` | 4 |

In the parallel range the engine is never the limit. There, the measured
throughput of a real system is set by how fast the host link delivers lines.
Every sample takes a whole line even when `m` is small, so the bytes of
useful data per line grow with `m`.

### XX^T storage (`xxt_row_ram`)

The storage is addressed by row. An address selects row `i`, and the word is
the whole row, 160 entries of 64 bits.

Physically, column `j` is its own memory of depth `j+1`, because only rows
`0..j` exist in that column. This gives exactly the upper triangle, 12880
entries (824,320 bits).

Reads are asynchronous. That is what lets a row's read-modify-write finish in
one cycle. On an FPGA this maps to distributed RAM or to registers; a
block-RAM version would need a registered read and one more pipeline stage.

The RAM is never swept clean. Instead, the first sample of a job writes its
products without adding the old contents. Every entry a job later reads has
been written by that first sample.

## Results and the host's part

After the `n`-th sample has been accumulated, `result_writer` reads one
accumulator per cycle from the active engine. It packs `CL_W/ACC_W` (8) words
per line; word `w` is bits `[w*ACC_W +: ACC_W]`. The stream is:

1. `S(0) .. S(m-1)`, zero-padded to a whole line.
2. `A(0,0), A(0,1) .. A(0,m-1), A(1,1) .. A(m-1,m-1)`: the upper triangle, row
   by row. It is packed continuously and zero-padded in the last line, which
   carries `out_last_o`.

All words are signed two's complement. The host then computes, in double
precision,

```
K(i,j) = K(j,i) = ( A(i,j) - S(i)*S(j)/n ) / n
```

This is the population covariance, dividing by `n`. Use `n-1` in the outer
division for the sample covariance.

## Job control and status

1. Set `cfg_dims_i = m` (1..`MAX_DIM`) and `cfg_samples_i = n` (≥ 1), then
   pulse `start_i`.
2. An invalid configuration is refused. `cfg_error_o` goes high and nothing
   starts.
3. A valid job spends one cycle clearing the accumulators.
4. `in_ready_o` then admits exactly `n` samples. It stays low afterwards even
   if the host sends more.
5. Once all `n` samples are in `A`, the results are streamed out.
6. `done_o` rises when the last line has been taken. It stays high until the
   next `start_i`, which may come at any time after `done_o`.

Other status outputs:

* `acc_count_o` counts the samples accumulated so far.
* `busy_o` is high from the start until the results are out.
* `overflow_o` is sticky for the job. It reports that a signed 64-bit
  accumulator addition (in `A` or `S`) wrapped, which means the results of the
  job are unusable.

The sample count is not limited by design, only by accumulator range. With
64-bit accumulators and 32-bit values, `n · max|x|² < 2^63` guarantees no
wrap. For example, 3·10^9 samples are safe if `|x|` stays below about `2^15.7`,
but full-range 32-bit values can wrap after two samples.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CL_W` | 512 | Cache-line width. The parallel/semi-parallel threshold is `CL_W/DATA_W`. |
| `DATA_W` | 32 | Signed sample value width. |
| `ACC_W` | 64 | Accumulator width for `A` and `S`. Must be at least `2*DATA_W` and divide `CL_W`. |
| `MAX_DIM` | 160 | Largest `m`. Sets the semi-parallel multiplier count and the storage size. |
| `CNT_W` | 40 | Width of the sample count `n`. |

From the original design: 160 dimensions at most, and the switch at 16
dimensions, the size of one cache line. The value and accumulator widths, the
line width, the 40-bit count and all interface details are choices of this
implementation. The original does not state them. 16 values of 32 bits fill a
512-bit line, which makes the two stated facts agree.

## Where this RTL departs from, or goes beyond, the original

* **Storage of the parallel engine.** The original says the values are kept in
  RAM blocks holding rows of `XX^T`. Here only the semi-parallel engine does
  that. The parallel engine keeps its 136 accumulators in registers, because
  all of them change every cycle.
* **Platform interface.** The original runs on a CPU/FPGA platform with
  shared memory and a vendor interface, and uses a database framework on the
  software side. Neither is part of this RTL. Plain valid/ready cache-line
  streams take their place and must be adapted to the platform's shell.
* **Host software.** The division step is described above but not delivered as
  code. The end-to-end testbenches contain a model of it.
* **Own additions.**
  * The overflow flag.
  * The refusal of invalid configurations.
  * The first-sample-overwrite instead of a clearing pass.
  * The result line format.
* **Not modelled.** No clock frequency is fixed. Rates are given in cycles.
  The absolute bandwidths of the original depend on its platform's link.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_sum_acc` | Sums against a reference, the dimension mask, clear, and the overflow flag. |
| `tb_xxt_row_ram` | Triangle shape, masked writes, and one-cycle read-modify-write. |
| `tb_cl_receive` | Sample assembly over 1–3 lines, zeroing, the engine choice at and around the threshold, back-pressure, and one line per cycle. |
| `tb_par_engine` | All entries at 16 dimensions, one sample per cycle, `acc_done` latency, and overflow. |
| `tb_semi_engine` | All entries (at 40 dimensions), `m` cycles per sample, `m+1` latency, no carry-over between jobs, and overflow. |
| `tb_result_writer` | Line layout, padding, `out_last`, and back-pressure. |
| `tb_cov_ctrl` | Refusals, one-cycle clear, exactly `n` samples admitted, and the writer started once. |
| `tb_cov_top` | End to end at reduced sizes (8 lanes of 16 bits, 32-bit accumulators, up to 20 dimensions). It covers both engines, the threshold case, multi-line samples, input stalls, output back-pressure, overflow and a refused start. |
| `tb_cov_top_full` | End to end with every parameter at its default: 160, 16 and 17 dimensions. |
| `tb_cov_sweep` | Defaults, every dimension count of the original throughput plot (2 to 160). It prints the cycles per sample and bytes per cycle. |

The end-to-end testbenches check the raw moments. They also compute `K` the
way the host would and compare it with a conventional two-pass covariance of
the same data.

To run one with Verilator:

```
verilator --binary --timing --assert rtl/cov_pkg.sv rtl/*.sv tb/tb_cov_top.sv \
          --top-module tb_cov_top -Mdir obj_tb_cov_top
./obj_tb_cov_top/Vtb_cov_top
```

Replace `tb_cov_top` with any testbench name. The default-size runs take
seconds to simulate; building them takes longer.

The RTL uses concurrent assertions for stream stability (`cl_receive`,
`result_writer`) and for idle engines during readout (`cov_top`). Run with
`--assert` to have them checked.
