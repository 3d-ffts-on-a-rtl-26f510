# Single-chip 3D FFT engine

A 3D FFT of N^3 complex single-precision points, with the whole data cube held
in on-chip RAM. The cube of N^3 points is split over P RAMs, one per 1D FFT
pipeline. The 3D transform is done as three passes of N^2 one-dimensional
N-point FFTs, along x, then y, then z. Because no data ever leaves the chip, the
pipelines run with no stalls. Each pass costs N^3/P cycles of streaming plus the
latency of one 1D FFT. For the default 32^3 cube with 32 pipelines, a transform
takes 3695 clock cycles.

The engine has four kinds of parts:

| part | module | count |
|---|---|---|
| slab RAMs | `fft3d_ram` | P |
| RAM-to-FFT and FFT-to-RAM crossbars | `fft3d_xbar` | 2 |
| controller | `fft3d_ctrl` (uses `fft3d_addr_gen`) | 1 |
| 1D FFT pipelines | external vendor cores | P |

`fft3d_top` connects all of them. The 1D FFTs are streaming floating-point FFT
cores from an FPGA vendor. They are not part of this RTL, and their ports are
brought out of the top (see "The 1D FFT pipelines" below).

## Data placement

Point (x, y, z) has a fixed home for the whole run:

    RAM     r = z mod P
    address a = {z div P, y, x}     (x in the low log2 N bits, y above it)

Every RAM therefore holds N/P complete x-y slabs. For example, with N = 16 and
P = 4, address bits [3:0] give x, bits [7:4] give y, and bits [9:8] give the
slab number inside the RAM. Slabs are interleaved: slab z goes to RAM z mod P.

The transform is done in place. A word read for a pass is written back to the
same RAM and the same address after its 1D FFT. After the third pass, the
address of (x, y, z) holds the transform coefficient X(kx = x, ky = y, kz = z).

## The three passes and the skew

This is the part that takes most care. In every pass, each pipeline takes
W = N^3/P words, one per clock, as W/N back-to-back N-point frames. Pipeline p
runs exactly p cycles behind pipeline 0, so at base time t it takes word
u = t - p of its own stream.

* **D1 (along x).** Pipeline p reads its own RAM p at address u. Consecutive
  addresses are already the lines along x.
* **D2 (along y).** Pipeline p reads its own RAM p. Frame f = u div N, point
  k = u mod N, and the address is {f div N, k, f mod N}. Each frame is a column
  of one slab.
* **D3 (along z).** A line along z crosses all P RAMs. Frame f of pipeline p is
  the line g = f·P + p, so (y, x) = g. Point k of the frame is z = k, which
  lives in RAM k mod P at address {k div P, g}. The RAM-to-FFT crossbar sends
  that RAM's output to pipeline p.

The skew exists for D3. Without it, all P pipelines would want point k of their
lines in the same cycle, and all those points sit in the same RAM. With pipeline
p delayed by p cycles, pipeline p wants a word from RAM (t - p) mod P. These are
P different RAMs in every cycle, so each RAM has a single reader. For P = 4:

| base time t | pipeline 0 | pipeline 1 | pipeline 2 | pipeline 3 |
|---|---|---|---|---|
| 3 | RAM 3 | RAM 2 | RAM 1 | RAM 0 |
| 4 | RAM 0 | RAM 3 | RAM 2 | RAM 1 |
| 5 | RAM 1 | RAM 0 | RAM 3 | RAM 2 |

D1 and D2 use the same skew, even though they do not need it. Keeping it makes
every pass the same shape: in every pass, RAM r is busy exactly for base times
t in [r, r + W). The skew then costs P cycles once per run, not once per pass.

## Write-back: the same schedule, later

A point's RAM and address never change. So the controls that return a
pipeline's output to the RAMs are the read controls, delayed by the time a word
takes to travel from RAM through the FFT. The controller computes both sides
from one combinational schedule function, `fft3d_addr_gen`, of (pass, t):

* the **read side** evaluates it at t and produces:
  * the RAM read enables and addresses;
  * the RAM-to-FFT selects (delayed 1 cycle, for the RAM read);
  * the pipeline `valid` and `last` flags (delayed 2 cycles, for the RAM and
    the crossbar register).
* the **write side** evaluates it at t - (2 + FFT_LATENCY) and produces:
  * the FFT-to-RAM selects (RAM r takes the output of the pipeline it fed);
  * the RAM write enables and addresses, one cycle later (after the crossbar
    register).

No control state has to travel alongside the data through the FFT latency. The
write side also predicts which pipelines should present output in each cycle.
If a pipeline's `out_valid` differs from that prediction, or a pipeline raises a
status bit, the controller sets the sticky `err` flag.

**Pass dependency.** A pass may only read a point after the previous pass has
written it back. The next pass therefore starts PERIOD = W + FFT_LATENCY + 3
cycles after the current one. That is the first moment at which every RAM has
received all its write-backs before its own first read of the new pass. The
write-back of one pass still overlaps the start of the next: the high-numbered
RAMs are still being written while the low-numbered ones are being read.

**Run time.** `done` rises 3·(N^3/P + FFT_LATENCY + 3) + P clock edges after the
edge that samples `start`.

| N | P | FFT_LATENCY | cycles (this RTL) | published measurement |
|---|---|---|---|---|
| 32 | 32 | 194 | 3695 | 3694 |

The FFT latency of the real vendor core was not published. The default of 194
was chosen so that the total matches the published measurement. The published
cycle counts for one cube size barely change with the number of pipelines. That
fits a schedule that pays the skew once, as this one does.

## Modules

All modules use the types in `fft3d_pkg`:

* `cplx_t`: a packed {re, im} pair of binary32 words, 64 bits in all.
* `phase_t`: the pass, D1, D2 or D3.
* `fft_status_t`: the pipeline status bits.

**`fft3d_top`** has these parameters:

* `N` = 32: points per dimension, a power of two.
* `P` = 32: number of pipelines and RAMs, a power of two, at most N.
* `FFT_LATENCY` = 194.

Its ports:

* `start`, `busy`, `done` and `err` control and report a run.
* The host port: `host_we`, `host_waddr`, `host_wdata`, `host_re`, `host_raddr`
  and `host_rdata`. The address is the point index {z, y, x}. A read returns
  its word one cycle later. The host port only works while the engine is not
  busy.
* For each pipeline p: `fft_in_valid`, `fft_in_last`, `fft_in_data`,
  `fft_out_ready`, `fft_out_valid`, `fft_out_data` and `fft_status`.

To run a transform:

1. Write the N^3 points through the host port.
2. Pulse `start`.
3. Wait for `done`.
4. Read the result back from the same indices.

A `start` pulse while busy is ignored.

**`fft3d_ram`** is a simple dual-port array with one read port and one write
port. A read returns its word one cycle later, and the output holds while no
read is made. On a read and write of the same address in the same cycle, the
read returns the old word. Synthesis maps the array onto block RAM, ganging
several blocks where needed (1024 × 64 bits per RAM at the default size).

**`fft3d_xbar`** is a registered NUM_IN × NUM_OUT word multiplexer with one
binary select per output. The top uses it twice. In D1 and D2 both crossbars are
set to the identity. In D3 they rotate.

**`fft3d_ctrl`** holds two pass/time counters, one for the read side and one
for the write side, and two instances of `fft3d_addr_gen`. It also contains:

* the conflict check: an assertion that no RAM gets two readers in one cycle;
* the output-valid and status check that drives `err`;
* the start/busy/done handshake.

`fft_out_ready` is held high while busy. The pipelines run in real-time mode and
are never throttled.

## The 1D FFT pipelines

Each pipeline must behave as a fixed delay:

* it accepts one word per clock;
* it expects frames of N words in natural order, with `last` on word N-1;
* it presents output word i exactly FFT_LATENCY cycles after it sampled input
  word i, in natural order (X[k] as word k);
* it accepts back-to-back frames.

A vendor streaming ("pipelined streaming I/O") floating-point FFT core in
real-time mode behaves this way. If you use such a core, set FFT_LATENCY to its
latency as measured on the cycle where the core samples input to the cycle
where it presents output. Also add any extra register stages you put around the
core.

The testbenches use `tb/fft1d_model.sv` as the pipeline. It is a behavioural
model that computes the exact forward DFT of each frame (unscaled,
exp(-2πi·nk/N)) in simulator reals and rounds the result to binary32. It
reports misplaced `last` flags on its status bits.

## Sizes

Other sizes are parameter changes.

| cube | P | RAM per pipeline | cycles |
|---|---|---|---|
| 16^3 | 16 | 256 × 64 bit | 3·(256 + L + 3) + 16 |
| 32^3 | 32 | 1024 × 64 bit | 3695 with L = 194 |
| 64^3 | 64 | 4096 × 64 bit | 3·(4096 + L + 3) + 64 |

Fewer pipelines than N (for example 32^3 with 8) give each RAM several slabs and
multiply the streaming time accordingly. More pipelines than N (for example
16^3 with 32) would need more than one pipeline per slab. The slab mapping does
not cover that case, and the RTL rejects it with an elaboration-time assertion.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| testbench | what it checks |
|---|---|
| `tb_fft3d_ram` | random reads and writes against a reference array, including same-address collisions |
| `tb_fft3d_xbar` | identity, rotating and random selects, 32 × 32 |
| `tb_fft3d_ctrl` | described below |
| `tb_fft3d_top` | end to end at N = 8, P = 4, FFT latency 12, twice in a row |
| `tb_fft3d_full` | end to end at the defaults (32^3, 32 pipelines) |
| `tb_fft3d_sizes` | end to end for 16^3 with 16 and with 8 pipelines, and 32^3 with 8 pipelines |

**`tb_fft3d_ctrl`** runs the controller alone. It moves point tags instead of
data through a model of the RAMs, crossbars and pipelines, then checks that:

* every frame is one whole line along the current dimension, in order, with
  `last` in the right place;
* every point goes through a pipeline exactly once per pass;
* no point is read before its previous write-back;
* every point is written back to its home;
* the cycle count is as computed;
* `err` reacts to an injected stray valid and to an injected status bit.

**`tb_fft3d_top`** loads a random cube through the host port, runs it, reads it
back, and compares every point with a double-precision 3D DFT computed in the
testbench. The DFT is three passes of 1D DFTs on a plain array, so it does not
depend on the engine's data placement or schedule. The testbench also checks:

* the cycle count;
* that `err` stays low;
* that each mechanism occurs at least once: the skew, three passes per run, D3
  crossbar rotation, write-back overlapping the next pass, and a `start` ignored
  while busy.

**`tb_fft3d_full`** is the same test at the defaults. The largest error it
reports is about 3e-5 on results of magnitude up to about 180.

**`tb_fft3d_sizes`** runs the same test, through the `tb/fft3d_e2e.sv` harness,
for three more configurations side by side. It also compares each cycle count
with the published measurement:

| cube | P | FFT latency | cycles | published |
|---|---|---|---|---|
| 16^3 | 16 | 120 | 1153 | 1149 |
| 16^3 | 8 | 120 | 1913 | 1916 |
| 32^3 | 8 | 194 | 12887 | 12907 |
| 32^3 | 32 | 194 | 3695 | 3694 |

The FFT latencies are fitted values. The remaining differences of a few cycles
come from the published runs, whose other overheads are not known. 64^3 was not
simulated: a 64-pipeline build is slow to compile. It is the same RTL with
N = 64 and P = 64.

To simulate with Verilator 5 (from the folder holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fft3d_pkg.sv tb/fft3d_tb_pkg.sv tb/tb_fft3d_top.sv \
        --top-module tb_fft3d_top -o sim && ./obj_dir/sim

For the other testbenches, replace the last file and the top module. The
testbenches of the RAM and the crossbar do not need `tb/fft3d_tb_pkg.sv`. The
full-size test and the sizes test each take about two and a half minutes to
build, and under a second to run.

## Choices made here, and limits

These points were not fixed by the original design description. They are this
RTL's own choices:

* **Host load/unload port.** How data reaches the RAMs from outside the chip was
  not described.
* **Latencies.** RAM read: 1 cycle. Each crossbar: 1 cycle, through an output
  register.
* **FFT latency default.** 194 cycles, fitted to the published cycle count.
* **Data word format.** `{re, im}`, real part high.
* **Pipeline status bits.** Only two are used: an early `last` and a missing
  `last`.
* **Frame order within a pass.**
* **Slab interleave.** Slab z goes to RAM z mod P, rather than consecutive slabs
  per RAM.
* **Pass spacing.** A pass starts only when every RAM has all its write-backs. A
  finer per-address dependency check could overlap passes further.
* **Controller form.** The original controller was generated as microcode,
  which was not published. This one uses counters and a closed-form address
  function. The schedule it produces follows the published description: slabs,
  skew, and write-back as a delayed mirror of the reads.

The data path does no arithmetic on the points. Accuracy is entirely that of the
1D FFT cores, and throughput is one word per pipeline per clock.
