# Energy-detection receiver for 2-PPM impulse-radio UWB

This receiver recovers binary pulse-position-modulated (2-PPM) UWB data without
estimating the channel. Each symbol period Ts holds one pulse, early for a 0
and late (Ts/2 later) for a 1. The receiver squares the incoming signal,
integrates it over the first and the second half of the symbol, and decides
for the half with more energy:

    z0 = energy in [t_synch, t_synch + Ts/2)
    z1 = energy in [t_synch + Ts/2, t_synch + Ts)
    bit = 0 if z0 > z1, else 1

Everything therefore depends on finding t_synch, where a symbol starts in the
receiver's own time base. The receiver finds it with a sweep over a preamble
of identical symbols. It integrates half a symbol per preamble repetition and
starts the window a little later each time. It locks to the start that gave
the most energy.

The design is a mixed model. The RF and analog parts (LNA, square-law module,
integrate-and-dump, A/D converter) are behavioural SystemVerilog with
`real`-valued ports. Everything after the converter is synthesizable RTL: the
time base, the pre-synchronizer, the maximum search, the decision, the system
controller and the power manager.

## Signal chain and block map

```
rf_in ─► lna ─► squarer ─► int_dump ─► adc ─► code/valid ─┬─► presync ─────┐
 (real)  (gain)  (v²)        ▲ dump/integ   ▲ sample        ├─► sync_search ─┤ t_synch
                             │              │               └─► decision ──► demod_out
                        timing_gen ◄── state ── sys_ctrl ◄──────────────────┘
                             ▲ t_synch            │
                                              power_mgr ─► pwr_en (per-block enables)
```

| file | block | kind |
|---|---|---|
| `rtl/uwb_pkg.sv` | shared constants, `rx_state_e` phase enum, `pwr_en_t` enable struct | package |
| `rtl/lna.sv` | low-noise amplifier, ideal gain | behavioural |
| `rtl/squarer.sv` | square-law module, K·v² | behavioural |
| `rtl/int_dump.sv` | integrate-and-dump, discrete-time (one rectangle per tick) | behavioural |
| `rtl/adc.sv` | 8-bit converter of the held integral, 1 clock latency | behavioural |
| `rtl/timing_gen.sv` | free-running symbol counter; all window, dump, sample and sweep timing; locked clock | RTL |
| `rtl/presync.sv` | pre-synchronizer, tells signal from noise only | RTL |
| `rtl/sync_search.sv` | maximum-energy search over the M sweep windows | RTL |
| `rtl/decision.sv` | 2-PPM decision z0 > z1 | RTL |
| `rtl/sys_ctrl.sv` | phase sequencer: idle, pre-sync, sync, demod | RTL |
| `rtl/power_mgr.sv` | per-phase block enables and stand-by | RTL |
| `rtl/uwb_ed_rx.sv` | top: the whole receiver | top (simulation model) |

Because of its `real` ports, `uwb_ed_rx` is a simulation model. To build the
digital part into a chip, take the six RTL modules and drive them from a real
converter.

## Time base: ticks, windows and tags

All timing comes from one clock, the *tick*. The design's tick is 1.01 ns, so:

| quantity | ticks | time |
|---|---|---|
| symbol period Ts | `SYM_TICKS` = 200 | 202 ns |
| window length Ts/2 | 100 | 101 ns |
| sweep step (Ts/2)/(M-1), M = 11 | 10 | 10.1 ns |

`timing_gen` keeps a counter `tick` that runs 0…199 from reset, whatever the
phase. Every window follows the same rules. Its first tick raises `dump` and
`integ` together. `integ` then stays high for 100 ticks. On the tick after the
last one, `sample` is raised and the converter reads the held integral. In the
continuous phases, that tick is also the `dump` of the next window. This is
safe because the integrator and the converter both update on the same edge,
so the converter reads the value from before the dump.

Where the windows fall depends on the phase from the controller:

* **Pre-sync.** Windows start at tick 0 and tick 100, back to back.
* **Sync.** Window m of repetition m = 0…10 starts at tick 10·m and ends by
  tick 10·m + 99. After the window, the integral is held until it is sampled.
  For m = 10 the window ends on the last tick of the period, so its sample
  falls on tick 0 of the next period. `timesweep` marks these windows and
  `delay_step` shows the current offset 10·m.
* **Demod.** Windows start at t_synch and t_synch + 100 (wrapping at 200).
  They give z0 and z1 alternately. `locked_clk` is high during the z0 window.

Each sample carries a tag with it: the sweep index m in sync, the half (0 or 1)
otherwise, and the phase it belongs to. The converter adds one clock, so the
top delays the tag by one register. The consumers then see `adc_valid`, the
code and the tag in the same cycle. A window of a continuous phase is only
sampled once it has been *armed* by a dump in that phase. This way a phase
change never produces a sample of a partial window.

The controller changes phase only on `period_end` (the last tick of a
period). Every phase therefore starts at tick 0, and the offsets above are
relative to the receiver's own period start.

## Acquisition: pre-sync, sweep, lock

1. **Pre-sync.** `presync` compares each half-symbol energy with the input
   `presync_thr`. It declares signal present after 3 windows above threshold
   (`PRE_HITS`). Two quiet windows in a row clear the count. A 2-PPM preamble
   puts energy in one half of every symbol, so the count keeps growing, while
   noise below threshold keeps clearing it.
2. **Sweep.** At the next period boundary the controller enters sync. The
   transmitter keeps sending the same preamble symbol, and repetition m
   integrates [10·m, 10·m + 100). `sync_search` keeps the largest energy and
   its m. On a tie the earlier offset wins, so integration does not start
   inside a pulse.
3. **Lock.** When the sample of m = 10 arrives (tick 2 of the period after the
   last sweep window), `sync_search` fixes `t_synch` = 10·m_best. The
   controller enters demodulation at the end of that period and raises
   `lock`.

The sync phase thus lasts M + 1 = 12 periods. The preamble has to cover the
pre-sync symbols and those 12 periods. About M + 5 symbols is the minimum; the
test uses 20.

The sweep covers only offsets 0…Ts/2. A pulse arriving later than Ts/2 in the
receiver's period is caught by the last window only in part. This is a
property of the algorithm, which the design keeps.

## Demodulation timing

In demodulation `decision` stores z0, and on z1 it outputs
`demod_out = !(z0 > z1)` with a one-clock `demod_valid`. Ties decide 1. For
the symbol whose window starts at period tick t_synch, the bit appears at
tick t_synch + 2 of the period after the symbol ends. The parts of that delay
are: the sample strobe at the window end, one clock for the converter and one
for the decision. After that there is exactly one bit every 200 ticks. The
receiver has no frame delimiter. The remaining preamble symbols come out as
zeros, and finding the start of a frame is left to the MAC.

## Control and power

`sys_ctrl` moves IDLE → PRESYNC → SYNC → DEMOD on `rx_en`, `presync_det` and
`sync_done`. `resync` returns it from DEMOD to PRESYNC for the next packet,
and `rx_en` low returns it to IDLE from any phase. Events in mid-period are
remembered until the period ends.

`power_mgr` turns each block on only in the phases that use it. The outputs
are registered, so they follow a phase change one clock later.

| phase | fe (LNA+squarer) | I&D | ADC | presync | sync | demod | ranging | decoder |
|---|---|---|---|---|---|---|---|---|
| IDLE | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| PRESYNC | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 0 |
| SYNC | 1 | 1 | 1 | 0 | 1 | 0 | 0 | 0 |
| DEMOD | 1 | 1 | 1 | 0 | 0 | 1 | 1 | 1 |

`standby` forces every enable low. Because the enable lags by one clock, the
first pre-sync window after IDLE misses its first tick. Detection does not
depend on that window.

## Top-level interface (`uwb_ed_rx`)

Inputs are `clk` (tick), `rst_n` (asynchronous, active low), `rx_en`,
`resync`, `standby`, `rf_in` (real, volts) and `presync_thr`.

Outputs:
* `state`, `lock`, `locked_clk`, `t_synch` (ticks).
* `demod_valid`, `demod_out`.
* `timesweep`, `delay_step`, `sweep_idx`, `tick`.
* `presync_det`.
* `adc_code`, `adc_valid`, `best_e`, `z0`, `z1`.
* `pwr_en`.

The ranging block and the decoder are not part of this RTL. The converter
samples, `t_synch`, the bits and the `pwr_en.ranging` and `pwr_en.decoder`
enables are the signals they would connect to.

Parameters and their defaults:

| parameter | default | note |
|---|---|---|
| `SYM_TICKS` | 200 | Ts = 202 ns at the 1.01 ns tick. Must be even, and Ts/2 must divide into M−1 whole steps. |
| `M_SWEEPS` | 11 | Preamble repetitions and sweep offsets. |
| `ADC_BITS` | 8 | Converter resolution. |
| `PRE_HITS` | 3 | Pre-sync hits needed to declare signal. |
| `LNA_GAIN`, `SQ_GAIN`, `TICK_NS`, `ADC_VFS` | 10, 1, 1.01, 1.0 | Behavioural analog scaling. |

The window energy reaches full scale at about
`100 · (LNA_GAIN·A)² · TICK_NS / ADC_VFS`, for a constant-envelope burst of
amplitude A that fills a whole window.

## What follows the published design and what is this design's choice

Taken from the published design:
* The block structure.
* Energy detection with the z0 > z1 rule.
* M = 11 and Ts = 202 ns.
* Sweep offsets of (Ts/2)/(M−1)·m with Ts/2-long windows.
* The maximum-energy choice of t_synch and the locked symbol clock.
* Half-symbol demodulation windows.
* Placing the converter after the integrate-and-dump, so that the decision and
  the search are digital. The design proposes this as the simpler option.

Choices of this design:
* The 1.01 ns tick and the discrete-time integrator.
* The 8-bit converter and its one-clock latency.
* The pre-synchronizer's threshold and hit-count rule.
* The tie rule of the search.
* Phase changes at period boundaries, and window arming.
* The tag pipeline.
* The controller's `resync` input.
* The power table and `standby`.
* All analog gains.

The analog models are ideal: no noise figure, offset, leakage, jitter or
non-linearity.

Not included: the ranging block (fine synchronization on the first echo), the
decoder for multiple access or channel coding, the transmitter and the MAC.
The first two are named as receiver blocks but their workings are not defined.
The last two lie outside the receiver.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_timing_gen` lists the expected dump, integrate and sample instants of
  every phase in absolute ticks and compares them tick by tick with the
  outputs. The phases include demodulation at t_synch = 0, 40 and 100. It also
  checks tags, `period_end`, `timesweep`, `delay_step` and `locked_clk`.
* `tb_sync_search` checks random sweeps, including ties and maxima at either
  end, against its own first-maximum search. `tb_decision` checks random and
  equal pairs. `tb_presync` runs directed and random sequences against a
  reference count. `tb_sys_ctrl` checks the phase sequence and that changes
  happen only at boundaries. `tb_power_mgr` checks the enable table.
* The behavioural models have their own testbenches: gain, squaring, window
  sums, and quantisation with clipping and latency.
* `tb_uwb_ed_rx` runs the whole receiver at its default sizes. The testbench
  plays the channel: noise, plus 2-PPM bursts of Ts/2 ticks at a clock
  offset tau. The run goes through these steps:
  * Noise only, which pre-sync must reject.
  * Packet 1: tau = 43 with little noise. The sweep must pick m = 4, and the
    testbench derives that offset independently from the window overlap.
  * `resync`, then packet 2: tau = 87 with more noise. t_synch must land
    within two steps of 90. At this noise level a neighbouring offset can
    win, and demodulation still works there.
  * Stand-by, which must power everything down.
  * `rx_en` low, which must return the receiver to idle.

  Every decided packet bit is compared with what was sent (64 data bits). The
  run also checks that bits leave exactly 200 ticks apart, 2 ticks after their
  symbol. It counts noise rejections, detections, sweep windows, locks,
  locked-clock cycles, 0 and 1 decisions, resyncs, stand-by and returns to
  idle, and fails if any of them never happened.

* `tb_ber_sweep` measures the bit error rate of the whole receiver at five
  noise levels, from about 29 dB down to 14 dB Eb/N0. The channel is
  multipath-like: 60 taps with exponential decay and random signs. At each
  level the receiver is switched off and on again, so it goes through
  pre-sync, the sweep and lock itself, and then decodes 400 bits. The
  pre-sync threshold is set from the expected noise energy, and the converter
  full scale is raised to 6 so that noise does not clip. Typical results:
  no errors down to about 17 dB, and a BER of about 0.3–3 % at 14 dB. The
  testbench requires no errors at the lowest noise and some errors at the two
  highest noise levels.

Not verified: bit error rate on standard (IEEE 802.15.3a) channel
realisations. The channels above are simple stand-ins.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/uwb_pkg.sv \
          tb/tb_uwb_ed_rx.sv --top-module tb_uwb_ed_rx -Mdir obj_top
./obj_top/Vtb_uwb_ed_rx
```

Replace `tb_uwb_ed_rx` with any other testbench name to run that testbench.
`uwb_pkg.sv` must come first, because every module imports it. The end-to-end
run simulates about 27,000 ticks in well under a second.

To try other channel offsets or noise levels, edit the `pkts[]` entries in
`tb/tb_uwb_ed_rx.sv` (start symbol, tau, noise sigma). To change Ts or M,
override `SYM_TICKS` and `M_SWEEPS` on `uwb_ed_rx`. Keep `SYM_TICKS/2`
divisible by `M_SWEEPS−1`; `timing_gen` asserts this at start-up.
