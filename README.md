# Gravitational N-body force accelerator

This RTL computes the direct-summation gravitational forces of an N-body
simulation, the O(N^2) part of every time step. For each particle *i* it sums,
over all particles *j*,

```
dr    = r_i - r_j
r2    = |dr|^2 + eps^2              (eps = 0.03, softening)
f_i   = -m_i * sum_j  m_j * dr / r2^(3/2)
phi_i =  m_i * sum_j  m_j / r2^(1/2)
```

in IEEE single precision. It is meant to sit next to an embedded CPU in a
CPU+FPGA system-on-chip: the CPU keeps the particles in double precision,
converts them to float, streams them to the accelerator and adds up what
comes back.

The accelerator is a set of identical **channels**. Each channel is one
**force pipeline** (local memories, arithmetic lanes, loop controller) behind
its own **DMA engine**. There are two ways to add parallelism, and both are
parameters:

* `P_UNROLL` — lanes inside one pipeline. Each lane holds a different
  i-particle; all lanes see the same j-particle at the same time. This is the
  i-loop unrolled by hand.
* `P_DMA` — whole channels, each with its own memories and DMA engine. The
  host gives each channel a slice of the i-particles and all of the
  j-particles.

The total number of lanes is `P_DMA * P_UNROLL`. The defaults are
`P_DMA = 7`, `N_LOCAL = 2048`, `P_UNROLL = 1` and `II = 5`. That is the
configuration that a resource and performance model picks as the fastest one
that fits a Zynq UltraScale+ ZU3EG (432 block RAMs, about 70k LUTs) for
8192 particles. Unrolling inside a pipeline is cheaper in resources than more
channels. Channels need no software unrolling and run independently.

## What one call does

The unit of work is one *call* of the force routine on one channel:

1. The host sends a command `(ni, nj)`. Both must be between 1 and `N_LOCAL`.
2. The host streams `4*ni` words: x, y, z and mass of each i-particle. They go
   to the channel's `posi` memory.
3. The host streams `4*nj` words in the same format. They go to `posj`.
4. The pipeline computes the force on every i-particle from every
   j-particle. It writes (fx, fy, fz, potential), already multiplied by m_i,
   to `forcef`.
5. The channel streams back `4*ni` words. `m_tlast` marks the last one.

A particle is interacting with itself when it appears in both the i and the j
set. That adds zero force, because dr = 0, and a finite potential term
m_j/eps. Nothing excludes it, so the host must subtract that term if it does
not want it.

**Problems larger than the local memory.** If N > `N_LOCAL`, the host cuts
the j-particles into blocks of at most `N_LOCAL`. It runs one call per block
and adds the partial results in double precision. The i-slice of a channel
is cut the same way if it is too large. Every refill costs a full transfer of
`posi` and `posj`. That is why a small `N_LOCAL` hurts large problems, and a
large `N_LOCAL` hurts small ones through long transfers. The
test benches contain a host model that does exactly this.

## The lane: one interaction datapath (`nbody_force_lane`)

A lane runs the loop body of the force routine. It keeps that routine's
float operation order:

| stage | operation |
|---|---|
| 1 | dx, dy, dz = x_i - x_j, ... (3 adders) |
| 2 | dx^2, dy^2, dz^2 (3 multipliers) |
| 3 | r2 = ((EPS2 + dx^2) + dy^2) + dz^2 (3 chained adders) |
| 4 | r_1 = 1/sqrt(r2) (`fp_rsqrt`) |
| 5 | pot = m_j * r_1;  rr = r_1 * r_1 |
| 6 | s = pot * rr  (= m_j / r^3) |
| 7 | t_k = s * d_k (3 multipliers) |
| acc | f_k -= t_k; phi += pot (4 adders, one clock) |

Stage *k* registers its result at the end of its clock. A j-particle that is
valid in cycle t is part of the accumulators from cycle t+8
(`LANE_LATENCY`). The output `force_o` is the accumulator times m_i,
computed combinationally. The same `i_load` that loads a new i-particle
clears the accumulators.

A lane could take a j-particle every clock. The controller feeds it one every
`II = 5` clocks. At 100 MHz that is 50 ns per interaction, the rate of the
high-level-synthesis pipeline this design reproduces. Lowering `II` to 1 is
allowed and speeds the pipeline up five-fold. The results stay the same
because the accumulator takes one addition per clock.

## The loop controller (`nbody_force_pipeline`)

The controller walks the i-particles in groups of `P_UNROLL`:

```
LOADI   read posi[ig .. ig+P_UNROLL-1], one per clock, into the lanes
RUNJ    every II clocks read posj[j] and broadcast it to all lanes
DRAIN   wait until the last j-particle has left the lanes
WRITEF  write each lane's force_o to forcef, one per clock
```

It then moves to the next group, and pulses `done` after the last one. If
`ni` is not a multiple of `P_UNROLL`, the last group's unused lanes compute
garbage and their write-back is suppressed. The number of clocks from the
start being sampled to `done` is exactly

```
1 + ceil(ni / P_UNROLL) * (2*P_UNROLL + (nj - 1)*II + 10)
```

Here 10 is 1 clock of memory read latency, 8 clocks of lane latency and
1 clock to see the lanes empty. For the default build and a full memory
(ni = nj = 2048) that is 2048 * 10247 + 1 ≈ 21 M clocks, or 0.21 s at
100 MHz per channel.

Each pipeline owns three `particle_ram`s of `N_LOCAL` x 128 bits: `posi`,
`posj` and `forcef`. They have one write port and one read port with a
registered output. The DMA engine writes `posi` and `posj` and reads
`forcef`. An assertion makes sure that it does not write while the pipeline
is busy.

## The DMA engine (`nbody_dma`)

The engine turns the 32-bit streams into 128-bit memory words. It collects
four words and writes them with the fourth. It then starts the pipeline,
waits for `done` and reads `forcef` back one particle at a time, so there is
one idle clock per particle. Both streams use valid/ready. An assertion
checks that an offered output word stays stable while it is stalled.
`cmd_ready` is high only when the engine is idle. A channel therefore runs
one call at a time. The transfer of the next call does not overlap with the
computation of the current one.

## Arithmetic units

* `fp_add`, `fp_mul`: single precision, round to nearest even. They match
  IEEE-754 bit for bit for normal numbers. Subnormal inputs count as zero and
  subnormal results are flushed to zero. NaN and infinity inputs are not
  treated specially. Neither case arises for positions in a bounded box with
  softening.
* `fp_rsqrt`: `1/sqrt(x)` as one unit. It finds an exact integer square root
  of the widened significand, digit by digit, then divides a power of two by
  it. It rounds with a sticky bit, so the result is always within one unit in the
  last place. In a test of 20,000 random inputs, 19,998 results were
  correctly rounded. A routine that calls `sqrtf` and then divides rounds twice and can
  differ from it in the last bit.

All three are combinational and are timed by the lane's registers. They are
written for clarity, not for timing closure at 100 MHz. In particular, the
divider and square root in `fp_rsqrt` are long combinational chains. A real
implementation would pipeline them inside stage 4. That changes
`LANE_LATENCY` but nothing else.

## Where this departs from, or adds to, the published design

* The published design comes from a high-level-synthesis tool. Its pipeline
  depth, DMA engines and CPU–FPGA interconnect are generated, not described.
  The following are choices of this RTL: the stage cut, the controller's
  state machine, the stream protocol (32-bit valid/ready, words in the order
  x, y, z, m) and the command interface.
* The CPU–FPGA interconnect and the CPU itself are not part of the RTL. Each
  channel's command and streams are top-level ports.
* Division and square root are merged into one reciprocal-square-root unit.
* The transfer cost the performance model attributes to communication
  (about 140 ns per particle and 0.22 ms to set up a transfer) comes mostly
  from host software and the generated interconnect. This RTL does not
  reproduce it. The engine itself moves one word per clock.
* Resource numbers (block RAM, LUT, DSP counts) of the original tool flow do
  not carry over. By its own count, the default build holds
  7 x 3 x 2048 x 16 bytes = 672 KiB of local memory, about 150 BRAM36.

## Files

| file | contents |
|---|---|
| `rtl/nbody_pkg.sv` | `float_t`, `float4_t`, EPS2, II and lane latency |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_rsqrt.sv` | float units |
| `rtl/nbody_force_lane.sv` | one interaction lane with accumulator |
| `rtl/particle_ram.sv` | local particle memory |
| `rtl/nbody_force_pipeline.sv` | memories, lanes, loop controller |
| `rtl/nbody_dma.sv` | per-channel stream/memory engine |
| `rtl/nbody_accel.sv` | top: `P_DMA` channels |
| `tb/tb_float_pkg.sv` | float <-> real conversion, reference interaction, random particles |
| `tb/tb_<module>.sv` | one self-checking bench per module |
| `tb/tb_nbody_accel_full.sv` | end-to-end run at the default parameters |

## Simulating

Every bench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
A watchdog counts a failure if the bench hangs. Build one with Verilator 5,
for example the end-to-end bench:

```
verilator --binary --timing --assert --top-module tb_nbody_accel \
  rtl/nbody_pkg.sv tb/tb_float_pkg.sv rtl/fp_add.sv rtl/fp_mul.sv \
  rtl/fp_rsqrt.sv rtl/particle_ram.sv rtl/nbody_force_lane.sv \
  rtl/nbody_force_pipeline.sv rtl/nbody_dma.sv rtl/nbody_accel.sv \
  tb/tb_nbody_accel.sv
./obj_dir/Vtb_nbody_accel
```

* `tb_nbody_accel` runs 3 channels with 16-entry memories and 2 lanes, on 40
  and then 11 particles. It has to refill the memories and leave unroll groups partly
  filled, and it applies random gaps and stalls on all streams. It checks
  every force against a double-precision reference to a relative 1e-5. It
  checks each pipeline's busy time against the formula above. It also
  counts and requires each of these mechanisms.
* `tb_nbody_accel_full` runs the same checks at the default parameters
  (7 channels, 2048-entry memories) on two problem sizes. With N = 256, each
  channel makes a single call. With N = 8192, each channel takes about 1170
  i-particles and makes four calls, one per block of 2048 j-particles. That
  is about 48 M clocks, roughly four minutes in Verilator.
* The unit benches test the float units bit for bit against a
  double-precision reference. They test the lane's latency and accuracy,
  the controller's exact clock count and its untouched forcef entries, and
  the DMA engine against a modelled pipeline.

Reduce the size by changing the localparams at the top of a bench. The
design's parameters are `P_DMA`, `N_LOCAL`, `P_UNROLL` and `II` on
`nbody_accel`.

## Trust and limits

* The float units are checked bit-exactly (add, multiply) or to one ulp
  (rsqrt) on tens of thousands of random operands. Forces are checked to a
  relative 1e-5 of the sum of term magnitudes against a double-precision
  reference. They are not compared bit for bit with a C implementation.
* The streams' flow control, memory refills and parallel channels are
  exercised with random stalls. Reset is asynchronous and active low, and
  reset in the middle of a call was not tested.
* Timing at 100 MHz has not been closed. See the note on `fp_rsqrt` above.
