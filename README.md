# Random equivalent sampling with a vernier time measurement

A periodic signal that is far faster than the A/D converter can still be captured. Sample
it many times, each time at a slightly different, random offset from a trigger, then merge
the acquisitions on a common time axis. This works only if every acquisition knows one
number exactly: **t**, the time from the trigger to the first sampling-clock edge after it.
This design measures t digitally, with the vernier caliper principle, in 100 ps steps. That
step is an equivalent sampling rate of 10 GSps, reached with an A/D converter clocked at
about 100 MHz.

The RTL follows the architecture of Shi and He, *Design of a New Random Equivalent Sampling
Technology Based on Vernier Method* (Sensors & Transducers, 2013). That design was built in
an FPGA for a portable digital storage oscilloscope. Where the original gives a schematic
(the phase monitor, the peak detector, the PLL settings), this RTL follows it. Everything
else is this design's own, and is marked as such below and in each file's header.

## The vernier measurement

Two clocks are involved:

| clock | period | source |
|---|---|---|
| sampling clock `sampclk` (SAMPCLK) | T1 = 9.9 ns (101.01 MHz) | free-running; two PLLs, ×10/9 then ×10/11, from a 100 MHz reference |
| trigger clock `trigclk` | T2 = 10 ns (100 MHz) | stopped; an external clock generator whose enable is TRIG, first edge within 35 ps of the trigger |

The trigger clock starts at the trigger. The first sampling edge after the trigger comes t
later, with 0 < t ≤ T1. From there, each period the sampling clock gains T2 − T1 = 100 ps
on the trigger clock. After k periods, sampling edge k overtakes trigger edge k. At that
moment:

    k·T2 = t + k·T1   →   t = n2·T2 − n1·T1   with n1 = n2 = k

Coincidence always comes within about 100 periods (1 µs). Edge k is the first at which the
sampling edge is no longer later than the trigger edge. The measured value therefore lies in
`[t, t + 100 ps)`.

**Phase monitor** (`phase_monitor`). Two flip-flops run on the trigger clock. The first
samples the *level* of the sampling clock; the second delays that sample by one edge.
`SAME = q1 & ~q2` marks the first trigger edge that finds the sampling clock high after
finding it low. This happens at the edge a sampling rising edge has just overtaken. While
TRIG is low, both flip-flops are cleared to 1. This keeps a sampling clock that is already
high at the very first trigger edge from counting as a coincidence. SAME is high for exactly
one trigger period.

**Counting** (`vernier_measure`). The module straddles two clock domains:

* *Trigger-clock domain.* It is cleared while TRIG is low. Edges are numbered from the one
  that starts the clock (edge 0). SAME for edge k is seen at edge k+1, which latches
  `n2 = k`.
* *Sampling-clock domain.* One flip-flop captures TRIG. The first sampling edge that sees it
  high is edge 0, the "first sampling pulse" of the original design. `first_pulse` is high
  in the period after it. SAME rises just after sampling edge k, less than 100 ps after it.
  It stays high for 10 ns, so sampling edge k+1 samples it safely and latches `n1 = k`.
  The `n2`-done flag crosses through a two-flip-flop synchroniser. When both counts are in,
  `t_ps = n2·10000 − n1·9900` is registered and `valid` is set.
* `valid` rises at most k + 6 sampling periods after the trigger. Both it and `t_ps` hold
  until TRIG falls. `err` is set if no coincidence shows within N_MAX + 4 = 104 periods.
  With a running trigger clock this cannot happen.

The trigger clock's start-up delay (20 ps in the model) leaves a narrow window. If a sampling
edge falls between TRIG and the first trigger-clock edge, the data path counts that edge as
the first sampling pulse. The measurement then reports the next edge instead: one sampling
period of error, with a probability of about 20 ps / 9.9 ns per acquisition.

## The data path: peak detection and the sample memory

`data_storage` holds the storage-pulse divider, the peak detector and a 512 × 8 dual-port
RAM.

**Peak detector** (`peak_detect`). This is the maximum-peak-value circuit of the original
schematic:

* An input register latches the A/D data on the rising edge of the sampling clock.
* A comparator raises `agb` when the new sample (dataa) exceeds the running maximum (datab).
* A byte multiplexer feeds the maximum register with the new sample when
  `SEL = trans_load | agb`; otherwise the maximum register keeps its own value.
* The maximum register is clocked on the *falling* edge, 180° from the input register.

`trans_load` marks the first sample of each storage interval. That sample becomes the
default maximum.

**Storage pulse.** The input `div` sets how many samples make up one stored value. With
`div = 5` (a 20 MHz storage rate at 100 MHz sampling, the case the original describes) each
stored byte is the maximum of five samples. This keeps narrow peaks visible at slow time
bases. With `div = 1` every sample is stored, which is what equivalent sampling wants. The
sequence at a group boundary:

1. The write enable (`stored`, standing in for the original's TRANS_LATCH clock) is high in
   the last cycle of a group.
2. The write at the end of that cycle stores the finished maximum.
3. `trans_load` is the same pulse delayed one cycle. It loads the first sample of the next
   group.

The first pulse after `run` rises is skipped, because no complete group lies behind it.

**Memory layout.**

| addresses | contents |
|---|---|
| 0 … 255 | pre-trigger values, written as a ring while waiting for the trigger |
| 256 … 511 | post-trigger values, in order |

When the storage switches to the back half, it captures two values:

* `trig_ptr`: the ring position of the oldest pre-trigger value.
* `trig_phase`: the divider position at that moment.

**Time of each stored word** (`div = 1`). E0 is the first sampling edge after TRIG. The
trigger clock starts at time 0.

* Back-half word `256 + i` holds the sample taken at sampling edge E(i), at time `t + i·T1`.
* Pre-trigger word `(trig_ptr + j) mod 256` holds the sample of edge E(j − 256), at time
  `t − (256 − j)·T1`, for j = 0 … 255.

With `div > 1`, back-half word i is the maximum of the samples of edges
`E(div·i − trig_phase) … E(div·i − trig_phase + div − 1)`. The fixed latency of the
A/D converter adds to all of these and is the host's to subtract.

## One acquisition

`acq_controller` runs the sequence from a host `start`:

1. **PREFILL.** Storage runs into the front half. The trigger is not allowed yet.
2. **ARMED.** After 256 stored values the trigger is allowed. The front half keeps
   circulating as a ring.
3. A trigger event (`trig_in`, from the analog trigger circuit) sets the trigger latch. Its
   output TRIG enables the trigger clock generator and starts the measurement.
4. **POST.** At `first_pulse` the storage switches to the back half. `run` falls right after
   the 256th back-half value.
5. **DONE.** This state is reached once the back half is full and the measurement has
   finished. The host reads the 512 bytes (one cycle read latency), `t_ps` and `trig_ptr`.

TRIG stays high until the next `start`. This keeps the measurement readable. The next
`start` clears TRIG and stops the trigger clock.

The host merges many acquisitions. Each has a random t, and it places each word at its time
from the table above. Many acquisitions with random t then fill the signal period at 100 ps
spacing.

## Clock generation models

Two parts cannot be synthesised and are given as behavioural models, in ps:

* `sampling_clock_gen` chains two `pll_model` instances with ratios 10/9 and 10/11, as in
  the original PLL settings (phase 0, duty cycle 50 %). Each PLL measures its input period,
  locks after a few edges and then runs at the ratio. The second PLL is held in reset until
  the first locks.
* `trigger_clock_gen` models the external clock synthesiser enabled by CE = TRIG. Its first
  rising edge comes 20 ps after CE rises, then it runs at 10 ns. When CE falls it finishes
  the current period and stops low. The crystal pins exist as ports only.

`res_top` contains both models, so it simulates the complete system. The FPGA logic proper is
everything under it except these two; to synthesise it, take `vernier_measure`,
`data_storage` and `acq_controller` with a real PLL.

## Top-level interface (`res_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `samp` | in | 1 | 100 MHz reference for the PLLs |
| `rst_n` | in | 1 | asynchronous reset, active low; released on sampclk after PLL lock |
| `trig_in` | in | 1 | trigger event from the analog trigger circuit (rising edge) |
| `sampclk` | out | 1 | sampling clock for the A/D converter |
| `cha_d` | in | 8 | A/D data, latched on sampclk rising edges |
| `start` | in | 1 | start an acquisition (one sampclk cycle) |
| `div` | in | 8 | samples per stored value (1 = every sample, 0 acts as 1) |
| `done`, `state` | out | 1, 3 | acquisition finished; controller state |
| `raddr`, `rdata` | in, out | 9, 8 | memory read, data one sampclk cycle after the address |
| `t_ps` | out | 32 signed | measured trigger-to-first-sample time in ps |
| `n1`, `n2`, `meas_valid`, `meas_err` | out | 7, 7, 1, 1 | vernier counts and status |
| `trig_ptr`, `trig_phase` | out | 8, 8 | oldest pre-trigger word; divider phase at the trigger |
| `trig`, `trigclk` | out | 1, 1 | TRIG and the trigger clock, for observation |

The host side is synchronous to `sampclk`. Parameters: `W = 8` (data), `AW = 9` (address),
`CNT_W = 7` (counters). The clock periods and N_MAX live in `res_pkg`.

## Simulating

Every testbench is self-checking. Each ends with `TB_RESULT checks=N failures=M` and has a
watchdog. Example, from the project root:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/res_pkg.sv tb/tb_res_top.sv --top-module tb_res_top -Mdir obj -o sim
    ./obj/sim +verilator+rand+reset+2

| testbench | what it checks |
|---|---|
| `tb_res_top` | full system at its default sizes, 12 acquisitions (see below) |
| `tb_res_equivalent` | full system, 40 acquisitions of a 10.06 MHz sine, reconstructed on a 100 ps grid from `t_ps` alone: every word within two codes of the sine, at least 90 % of the 100 ps bins of a period filled (all 994 are) |
| `tb_vernier_measure` | 80 random trigger times: n1 = n2 = expected k, t_ps within [t, t + 100 ps), first_pulse, latency; error flag with a stopped trigger clock |
| `tb_phase_monitor` | SAME at the coincidence edge predicted from clock arithmetic, exactly once, one period wide |
| `tb_peak_detect` | running maximum and comparator against a reference, random interval lengths |
| `tb_data_storage` | div = 1, 5, 3: storage pulse cycles, every memory word, trig_ptr, trig_phase |
| `tb_sample_ram` | all words, read latency, read-during-write |
| `tb_acq_controller` | trigger gating, fill counts, post switch, done waiting for the measurement |
| `tb_sampling_clock_gen`, `tb_trigger_clock_gen` | periods, duty cycle, start delay, stop |

`tb_res_top` drives a periodic ramp whose 8-bit code equals the time since the start of its
period in 100 ps steps. Each stored code therefore tells when its sample was taken. For
every acquisition the testbench checks:

* `t_ps` against the true delay.
* With `div = 1`, every back-half word against the code predicted from `t_ps` alone, within
  one step. This is the host's reconstruction.
* Every pre-trigger word against the converter log.
* With `div = 5` and `div = 2`, every back-half word against the maximum of its group.

It also counts the mechanisms (early triggers ignored, ring wrap-around, peak detector
holding an earlier sample) and fails if any never happens. It runs in well under a second.

Registers that can only be cleared by an edge of a stopped clock carry power-up values:

* the trigger-clock domain;
* the trigger latch;
* the reset synchroniser.

FPGA registers have power-up values too, and without them a two-state simulator would start
these registers at random values.

## Departures from the original and open points

* **Comparator sense.** The original text says the comparator output `agb` goes high when
  datab exceeds dataa. Its signal name (a greater than b) and the function (keep the maximum)
  both require dataa = new sample > datab = maximum, and that is what is built.
* **Storage clock.** The original writes the RAM with a separate storage clock (TRANS_LATCH)
  that the original calls the same signal as TRANS_LOAD. Here it is a write enable in the
  sampling-clock domain, one cycle ahead of `trans_load`. The effect is the same.
* **Input latch clock.** The input register is clocked by the sampling clock. The original
  uses the converter's returned clock, stated to be the same frequency.
* **Own additions.** The front-half ring, `trig_ptr`/`trig_phase`, the runtime divider, the
  start/done handshake, the trigger latch, the measurement error flag and the reset
  synchroniser are this design's own. The original gives no detail for them.
* **Storage rate during equivalent sampling.** The original says that in equivalent-sampling
  mode the RAM address advances at 20 MHz. Here the host sets the rate with `div`. The
  reconstruction tests use `div = 1`, and the peak-capture tests use `div = 2` and `div = 5`.
  The time-base threshold (below 1 µs per division) that selects equivalent sampling is a
  host decision.
* **Host bus.** The host interface is a plain synchronous read port. The original's
  microprocessor bus is not described.
* **Unconnected output.** The peak detector's separate output pin (CHA_HD in the original
  schematic) has no visible connection there and is not built.
* **Not included.** The A/D converter, the analog trigger circuit and the host processor
  are outside the design. Waveform reconstruction is host software.
* **Metastability.** Capturing TRIG and SAME on the sampling clock relies on the fixed phase
  relations described above, not on synchronisers. In an FPGA, the phase monitor and the
  counters need placement constraints so that the 100 ps relations hold. The RTL cannot
  express that.
