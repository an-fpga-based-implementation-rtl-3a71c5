# Real-time loss processing for the LHC Beam Loss Monitor surface card

The Beam Loss Monitor (BLM) of the LHC protects the machine by measuring the
radiation from lost beam particles with about 4000 ionisation chambers. Tunnel
electronics digitise each chamber every 40 µs and send the values over optical
links to surface cards. Each surface card serves 16 chambers. It must decide
whether the beam may keep circulating or must be dumped.

Both a short, intense loss and a long, moderate loss can quench a
superconducting magnet. So each chamber's signal is integrated over twelve
windows at once, from 40 µs up to 84 s, and each integral is compared with a
threshold that depends on the chamber, the window and the beam energy. The
84 s window holds 2,097,152 acquisitions. Keeping that history for 16
channels, and re-summing it every 40 µs, is impossible in an FPGA.

This RTL solves it with **Successive Running Sums**: short running sums
are reused as the input of longer ones. The longest window then needs only a
few dozen stored values per channel.

This SystemVerilog implements the surface card's processing FPGA:

* the merging of the two raw measurements into one detector value;
* the twelve running sums per channel;
* the threshold comparison that drives the two beam-permit lines;
* the data kept for logging, collimator set-up and post-mortem analysis.

## Signal chain

```
            per channel (x16)                               shared
 acq_cnt ─┐  ┌──────────────────┐   ┌───────────┐        ┌──────────────────────┐
 acq_adc ─┴─►│ blm_data_combine │──►│ blm_srs   │─RS0..──►│ blm_mux              │
             │  (blm_adc_range) │   │ 6 stages  │  RS11   │ 192 sums, 1 per clock│
             └──────────────────┘   └───────────┘        └──────────┬───────────┘
                                                                    │ stream
          ┌──────────────────────────┬──────────────────┬───────────┼─────────────────┐
          ▼                          ▼                  ▼           ▼                 │
 blm_threshold_comparator ◄── blm_tables     blm_max_log   blm_collimation   blm_post_mortem
   permit_maskable            (thresholds,   (1 Hz maxima)  (32 x 640 µs)    (20,000 turns
   permit_unmaskable           maskable bits)                                  of 40 µs data)
```

The top module is `blm_surface_fpga`. All 16 channels share one acquisition
strobe `acq_valid` and run in lock step.

## Merging the counter and the ADC value

Each chamber's current drives a current-to-frequency converter (CFC). The CFC
integrates the charge and emits a pulse for each fixed quantum. In every 40 µs
acquisition the tunnel card sends two values:

* an 8-bit count of the pulses;
* a 12-bit ADC reading of the integrator voltage, which is the part of a
  quantum collected since the last pulse.

Together they cover about nine decades of current.

**Range correction (`blm_adc_range`).** The ADC does not use its full scale.
The block tracks the smallest and the largest sample since reset. It then
multiplies each sample by the effective range `max - min` and keeps the upper
12 bits of the 24-bit product:

```
rc = (adc * (max - min)) >> 12          max/min include the current sample
```

A one-register delay makes a sample meet the range that already includes
it. The latency is two cycles. Note that the operation is a multiplication
by the range, not a division. The correction therefore scales the sample by
`range/4096`.

**Combination (`blm_data_combine`).** The ADC difference between the previous
and the newest corrected value is the fraction of a quantum gained in the
last 40 µs. It is formed as a 12-bit two's-complement number
(`previous - newest`), sign-extended to 20 bits, and added to the count
shifted up by 12 bits:

```
det = (cnt << 12) + sext20(previous_rc - newest_rc)      (12-bit signed difference)
```

An 8-bit count with 12 bits appended fills all 20 bits, so `det` is treated
as an unsigned value. The addition uses one extra bit. A negative result
(count 0 and a falling ADC value) is floored at 0. The first sample after
reset has difference 0. The latency is three cycles.

## Successive Running Sums

### One running sum

A running sum over the last `T` values needs no adder tree. For each new value
`v[n]`, the accumulator adds `v[n] - v[n-T]`. The old value comes from tap `T`
of a shift register. The difference can be negative, so the accumulator is
signed. The accumulator always equals the sum of the newest `T` entries of the
shift register.

### Several windows from one shift register

`blm_running_sum` reads its shift register at two points. Each tap feeds its
own subtract/accumulate pair. For example, one 8-entry register gives both the
2-value and the 8-value sums, and the overlapping history is stored once.

### Cascading

The longest sum of a stage becomes the input of the next stage. It is passed
on only once every `T_last` updates, when its window has been completely
renewed. The next stage's register therefore holds consecutive sums that do
not overlap. Each of its entries stands for `T_last` (or more) acquisitions.

The gate is a counter per stage (`cnt_q`/`fire_q` in `blm_srs`). It plays the
role of a read delay between one shift register and the next.

The stages used (in `blm_pkg`, functions `stage_tap`, `rs_window`, `rs_refresh`):

| stage | input (window) | taps | outputs, window in acquisitions (time) | refreshed every |
|---|---|---|---|---|
| – | – | – | RS0 = 1 (40 µs) | 1 |
| 1 | RS0 (1) | 2, 8 | RS1 = 2 (80 µs), RS2 = 8 (320 µs) | 1 |
| 2 | RS2 (8) | 2, 8 | RS3 = 16 (640 µs), RS4 = 64 (2.56 ms) | 8 |
| 3 | RS4 (64) | 4, 32 | RS5 = 256 (10.24 ms), RS6 = 2048 (81.9 ms) | 64 |
| 4 | RS6 (2048) | 8, 16 | RS7 = 16384 (655 ms), RS8 = 32768 (1.31 s) | 2048 |
| 5 | RS8 (32768) | 4, 16 | RS9 = 131072 (5.24 s), RS10 = 524288 (21.0 s) | 32768 |
| 6 | RS10 (524288) | 4 | RS11 = 2097152 (83.9 s) | 524288 |

Per channel the shift registers hold 8 + 8 + 32 + 16 + 16 + 4 = 84 values
instead of two million.

The price is coarser time steps for the long windows. A sum in stage `s` is
only updated every `refresh` acquisitions. Its value is the sum of the `W`
acquisitions ending at the latest multiple of `refresh`. It does not include
the up to `refresh-1` newest ones, which wait in the previous stage. The
testbenches check exactly this rule:

```
RS_k(n) = Σ det[i],  i in (e - W_k, e],  e = floor(n / refresh_k) * refresh_k
```

All sums are 42-bit signed numbers. That is 41 bits for 2^21 unsigned 20-bit
values, plus a sign bit for the accumulators.

`blm_srs` raises `out_valid` six cycles after its input strobe. At that point
every stage has settled. `refresh_o[k]` tells which sums changed in this
acquisition.

## From sums to the beam permit

**Scan (`blm_mux`).** After each acquisition the multiplexer presents the
16 × 12 sums, one per clock, in the order channel 0 RS0 … RS11, channel 1 …
Each entry carries its channel, its period and its refresh flag. A scan takes
192 cycles. If an acquisition arrives during a scan, the scan restarts and the
sticky `overrun` flag is set.

**Tables (`blm_tables`).** The tables hold one threshold per (energy level,
channel, period) in a memory at address `((level*16 + channel)*12 + period)`.
There are 32 levels, so the memory has 6144 × 42 bits. The memory has a
synchronous read port for the comparator and a write port for loading. The
tables also hold one *maskable* bit per channel, which resets to 0
(unmaskable).

**Comparison (`blm_threshold_comparator`).** For each stream entry the
comparator reads the threshold for the energy level latched at the start of
the scan. It marks the channel when the sum is strictly greater than the
threshold. At the end of the scan:

* `permit_maskable` drops if any channel is marked;
* `permit_unmaskable` drops if a channel that is not maskable is marked.

The permits are recomputed on every scan and are low from reset until the
first scan ends. Latching a dump request is left to the equipment that
receives the permits.

## Data kept for the control room

* **`blm_max_log`** keeps the largest value of each channel and period seen
  since the last `log_strobe`, which is intended to pulse once per second.
  The strobe copies them to a snapshot that can be read at leisure.
* **`blm_collimation`** keeps, per channel, the last 32 consecutive 640 µs sums
  (RS3), which span 20.48 ms. RS3 refreshes every 8 acquisitions, so only
  every second refresh is stored: those sums do not overlap. While
  `coll_freeze` is high nothing is written, so that a reader sees one
  consistent picture. Age 0 is the newest entry.
* **`blm_post_mortem`** keeps the 40 µs detector values of all channels for
  20,000 LHC turns. At 88.924 µs per turn that is 44,462 acquisitions, about
  14 Mbit. `pm_trigger` freezes the buffer until `pm_release`.

## Interface and timing of `blm_surface_fpga`

| group | ports |
|---|---|
| acquisition | `acq_valid`, `acq_cnt[16]` (8 b), `acq_adc[16]` (12 b) |
| tables | `energy_level` (5 b), `thr_wr_en/addr/data`, `mask_we`, `mask_data` |
| permits | `permit_maskable`, `permit_unmaskable`, `over[16]`, `scan_done`, `overrun` |
| logging | `log_strobe`, `log_rd_ch/rs`, `log_rd_value` (combinational), `log_valid` |
| collimation | `coll_freeze`, `coll_rd_ch/age`, `coll_rd_value` (1 cycle), `coll_count` |
| post mortem | `pm_trigger`, `pm_release`, `pm_rd_ch/age`, `pm_rd_value` (1 cycle), `pm_frozen` |

Latency from the cycle with `acq_valid` to the cycle in which `scan_done` is
high and the permits are valid is 203 cycles:

* 3 cycles of combination;
* 6 cycles of running sums;
* 1 cycle to start the scan;
* 192 scan entries;
* 1 cycle of comparison.

Acquisitions must therefore be at least 204 cycles apart. At a 40 MHz clock,
40 µs is 1600 cycles, which leaves ample margin. Reset `rst_n` is
asynchronous and active low. The threshold memory is not reset and must be
loaded before its permits mean anything.

## How far to trust it, and where it is this design's own

The following come from the description of the system this RTL follows:

* the overall arrangement of blocks;
* the range correction with Max/Min trackers, a 12×12 multiplication and
  the 12 low bits cut;
* the combination: a held previous value, a 12-bit signed difference
  extended to 20 bits, and the count with 12 bits appended;
* subtract-and-accumulate running sums on multipoint shift registers,
  cascaded;
* 16 channels and 12 periods from 40 µs to 84 s;
* 32 × 640 µs collimation sums;
* 20,000 turns of post-mortem data and 1 Hz logging.

These are choices of this design:

* the intermediate window lengths and their grouping into six stages (they
  follow the windows used in the LHC BLM system, not a stated table);
* all word widths beyond 8/12/20 bits;
* 32 energy levels, given as a level index (conversion from a beam-energy
  value is not built);
* the permit/masking rule;
* the scan order and the overrun handling;
* freeze/release of the buffers;
* the floor at 0 for a negative detector value;
* the first-sample rule.

These are known gaps:

* **Not built:** the reception and cross-checking of the redundant optical
  links, error and status reporting, the VME interface and the loading of
  the tables from NVRAM. Their data enter or leave as plain ports.
* **Post-mortem:** the 40-minute averages of the post-mortem data are not
  built. The buffer is an on-chip array, while on the card it sits in an
  external SRAM.
* **12-bit difference:** kept as specified, the ADC difference wraps if two
  consecutive corrected values differ by more than 2047.
* **Reading of the range correction:** it is built as drawn (multiply by the
  range). If it was meant to normalise by division, `blm_adc_range` is the
  one place to change.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`blm_pkg.sv` must come first; `-y rtl` lets Verilator find the modules by
file name, and `-Wno-fatal` keeps width warnings of the testbenches from
stopping the build. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/blm_pkg.sv \
          tb/tb_blm_surface_fpga.sv --top-module tb_blm_surface_fpga -o sim
./obj_dir/sim
```

What the testbenches cover:

* **`tb_blm_srs`** feeds 2.1 million acquisitions and checks all twelve sums
  and refresh flags after every one against prefix sums of the input. This
  includes the first refresh of the 84 s window. It takes about 7 s.
* **`tb_blm_surface_fpga`** runs the whole design with default parameters
  over 3000 acquisitions. It models the full chain independently and checks,
  after every scan, the over flags, both permits and the 203-cycle latency.
  It then checks the logged maxima, the collimation buffer and the
  post-mortem buffer, and provokes an overrun. It counts that each of the
  following happened: a maskable-only drop, a drop of both permits, a
  recovery, an energy change, a loss seen by a window of 2048 acquisitions or
  longer, the floor at
  0, and range growth. It runs in a few seconds.
* **`tb_blm_pm_20000_turns`** runs the full design for 44,600 acquisitions,
  so that the 20,000-turn post-mortem buffer wraps. It then reads back all
  44,462 ages of three channels. It takes about 15 s.
* **The remaining block testbenches** compare against reference models
  written in the testbench: range correction, combination, a two-tap running
  sum, scan order, table read-back, comparator cases, maxima, collimation and
  post-mortem (with a 50-entry depth so that it wraps).

## Changing it

* **Window lengths:** change `stage_tap`/`stage_ntaps` in `blm_pkg.sv`.
  `rs_window` and `rs_refresh` follow automatically. A stage has at most two
  taps. The product of the last taps must stay within `LOG2_MAX_WIN` for the
  sum width.
* **Channels, periods and widths:** these are package constants.
  `N_LEVELS` and `PM_DEPTH` are parameters of the top.
