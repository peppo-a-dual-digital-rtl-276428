# PEPPO: a dual digital delay and gate generator in SystemVerilog

A gate generator turns a trigger (a "start" pulse) into an output pulse that
begins a set delay after the trigger and lasts a set width. Analog gate
generators derive both times from RC one-shots, and they need time to recover
between triggers. This design gets both times by counting: a start pulse
opens a gated clock, and each channel counts clock periods. It counts first
the delay, then the width. The output is a flip-flop that is set at the end
of the delay count and reset at the end of the width count. Delay and width
come in units of the time base T, with three decimal digits each (0 to 999
units). T is selected in decades from 100 ns (10 MHz) to 10 ms (100 Hz), so
delays and widths span 100 ns to 9.99 s with a resolution of one part in a
thousand.

There are two channels. They share one time base and one start input, but
have separate delay and width settings and separate outputs. When the longer
of the two channels has finished, the generator resets itself. It can accept
the next start on the next clock, so it has no dead time.

The RTL is a synchronous rendering of a discrete TTL/ECL instrument.
It keeps that instrument's counting scheme, ranges and reset sequence. The
analog parts (input and output level shifters, oscillator, power supply) are
not in the RTL; their logic signals are brought out as ports.

## How one cycle runs

Everything runs on one free-running 10 MHz clock, `clk`. The "gated clock" of
the original is a one-clock enable called a **tick**. A tick happens:

* on the clock in which the start pulse is seen (the start pulse itself is
  the first tick, at t = 0), and then
* every T = 10^`timebase_sel` clocks while the cycle runs.

Each channel holds two three-decade BCD counters, the **delay scaler R1** and
the **width scaler R2**. They do not count down. Instead they are preset to
the nine's complement of the setting and count *up* to 999. A channel set to
delay 3 and width 5 presets R1 to 996 and R2 to 994. "All nines" is a single
AND gate per scaler (the `full` output), and no comparator is needed.

Ticks are steered by three gates:

| gate | open while            | effect of a tick                                   |
|------|-----------------------|----------------------------------------------------|
| K1   | R1 not full           | R1 counts                                          |
| K2   | R1 full, R2 not full  | R2 counts                                          |
| K3   | R2 full (`done`)      | the tick is this channel's request for the reset   |

The output flip-flop M1 is clocked by the ticks. Its D input is
"R1 full and R2 not full". The worked example is delay m = 3 and width w = 5,
with ticks numbered from 0 (the start):

```
tick index   0    1    2    3    4    5    6    7    8
R1 (delay)  997  998  999  999  ...                       (full after tick 2)
R2 (width)  994  994  994  995  996  997  998  999  999   (full after tick 7)
M1 D         0    0    0    1    1    1    1    1    0
out_l        0    0    0   _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_   on from tick 3 to tick 8
```

The output is on from t = 3T to t = 8T: it starts m·T after the start and
lasts w·T. The tick that sets M1 is also the first tick that R2 counts. In
general the output rises on tick m and falls on tick m + w. Edge cases:

* **Delay 0:** R1 is preset to 999, so it is already full. The start tick
  itself sets the output.
* **Width 0:** R2 is already full, so D never goes high. The channel gives no
  pulse and is done as soon as its delay has been counted.

The **reset pulse** is the first tick of a running cycle on which *every*
channel's K3 is open. With two channels that is tick L, where L is the
larger m + w of the channels that have a width (at least 1). This is the same
tick that ends the longer channel's gate. The reset pulse does the following:

* clears the clock-gate flip-flop `run`, which stops the ticks;
* clears the divider;
* presets every scaler from the thumbwheel inputs on the same clock edge;
* clears M1.

While `run` is low, the scalers keep reloading from the settings every clock.
A new start is therefore counted correctly on the very next clock. The
settings are read at the start and ignored while a cycle runs.

A **stop** edge produces the reset pulse at once. This ends any gate that is
on and makes the generator ready for the next start.

## Time base

The five-decade divider is a chain of BCD counters with carry look-ahead. It
counts clocks from 0 while `run` is high and is held at 0 otherwise. Its flag
`tc[k]` is high while the lowest k decades read all nines, which happens once
every 10^k clocks. The range multiplexer picks `tc[timebase_sel]`. Because
the divider starts at 0 on the clock after the start tick, the first divided
tick lands exactly T after the start. The multiplexer gives a tick only while
`run` is high. While `run` is low, the only tick it passes is the start pulse.

| `timebase_sel` | 0      | 1     | 2       | 3      | 4     | 5      | 6, 7     |
|----------------|--------|-------|---------|--------|-------|--------|----------|
| T              | 100 ns | 1 us  | 10 us   | 100 us | 1 ms  | 10 ms  | as 5     |
| longest gate   | 99.9 us| 999 us| 9.99 ms | 99.9 ms| 0.999 s| 9.99 s | as 5    |

Changing `timebase_sel` during a cycle takes effect at once. A hardware
switch behaves the same way.

## Timing at the pins

* `start_n` and `stop_n` are asynchronous and act on their falling edge. Each
  passes a two-flop synchroniser and an edge detector (`edge_oneshot`). A
  level must last at least one clock to be seen.
* If a start edge arrives before clock edge s+1, the start is counted at edge
  s+3. From there, with T in clocks:
  * `out_l` rises at s+3+m·T and falls at s+3+(m+w)·T;
  * `busy` is high from s+3 to s+3+L·T.
* If a stop edge arrives before clock edge p+1, the cycle ends at edge p+3.
* A start that arrives while a cycle runs is ignored.
* Between two back-to-back cycles, `busy` is low for exactly one clock: the
  clock in which the new start is counted.
* `led` is on while the gate is on, or for 3000 clocks (300 us) from the
  gate's rising edge, whichever is longer.

## Ports of the top, `peppo`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 10 MHz master clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start_n`, `stop_n` | in | 1 | start / stop, falling edge, asynchronous |
| `timebase_sel` | in | 3 | range, 0 = 10 MHz ... 5 = 100 Hz |
| `delay_set`, `width_set` | in | `bcd_t [CHANNELS][3]` | dialled BCD settings per channel, digit 0 = units |
| `out_l`, `out_l_n` | out | CHANNELS | logic output and complement (the NIM outputs) |
| `out_g`, `out_g_n` | out | CHANNELS | the same gate, for the +12 V gate outputs |
| `led` | out | CHANNELS | channel indicator |
| `busy` | out | 1 | cycle in progress (clock gate open) |

The parameters are `CHANNELS` (2), `SCALER_DIGITS_P` (3), `DECADES` (5) and
`LED_CYCLES_P` (3000). The package `peppo_pkg` holds the shared constants,
the `bcd_t` type, the `timebase_e` names of the switch positions and
`nines_complement()`.

## Module map

```
peppo
├── edge_oneshot   u_start, u_stop   synchroniser + falling-edge one-shot
├── time_base      u_tb              shared time base
│   ├── run_ff                       clock-gate flip-flop (set by start, cleared by reset)
│   ├── freq_divider                 five BCD decades, tc[k] every 10^k clocks
│   │   └── bcd_counter ×5
│   └── timebase_mux                 range select, start ORed in as first tick
├── end_of_cycle   u_eoc             reset pulse: all channels done, or stop
└── g_ch[c]
    ├── gate_channel                 K1/K2/K3 gates and output flip-flop M1
    │   └── preset_scaler ×2         R1 delay, R2 width (3 BCD decades, all-nines flag)
    │       └── bcd_counter ×3
    └── led_stretch                  300 us LED one-shot
```

## Where this design departs from the original instrument

* **One synchronous clock.** The original gates the oscillator itself and
  clocks its counters with the gated pulses. Here the clock runs freely and
  the ticks are enables. The two analog trims are not needed: one set the
  10 MHz frequency, and the other evened out the spacing between the start
  pulse and the first oscillator pulse. In this design the first divided tick
  comes exactly T after the start.
* **Input delay and pulse width.** The original reacts to start pulses
  narrower than 3 ns. This design samples its inputs with the clock, so a
  start or stop must be low for at least one clock (100 ns). It also adds
  2 to 3 clocks of delay from input to output. If narrow pulses must be
  caught, add an external pulse stretcher or an asynchronous set flip-flop
  ahead of `start_n`.
* **Thumbwheels.** The original uses nine's-complement thumbwheel switches
  that deliver the complement code directly. Here the ports take the dialled
  BCD value and `gate_channel` forms the complement. Digit codes above 9 are
  treated as 9.
* **Details the original leaves open, chosen here:**
  * a start during a running cycle is ignored;
  * reset wins over a simultaneous start;
  * a stop also clears the output flip-flop;
  * the LED one-shot is not retriggered while it runs;
  * switch codes 6 and 7 select the 100 Hz range;
  * both channels always take part, so a channel that should stay silent is
    set to width 0.
* **Maximum range.** The longest delay or width is taken as 999 units of the
  10 ms base, that is 9.99 s.
* **Not in the RTL.** These parts have no logic function:
  * the NIM-to-logic input converter;
  * the oscillator;
  * the output level converters (NIM ‑700 mV and +12 V gate drivers, with
    their rise and fall times);
  * the power converter;
  * the bridged input connectors.

  `out_l`/`out_g` and their complements are the logic levels those drivers
  would take.
* **Oscillator mode.** The generator can run as an oscillator if `out_l_n` of
  the longer channel is fed back to `start_n` with some delay. The period is
  L·T plus the 3-clock input delay plus the external delay.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
the module with an independent reference and prints
`TB_RESULT checks=N failures=M`.

* `tb_bcd_counter`: random load/enable, including illegal codes.
* `tb_preset_scaler`:
  * `full` after exactly N pulses, for N = 0, 1, 3, 5, 10, 100, 999 and
    random N;
  * the presets 996/994 from the worked example.
* `tb_freq_divider`: every flag for 250 000 clocks; clear and freeze.
* `tb_timebase_mux`: exhaustive.
* `tb_run_ff`: random set and reset, including both at once.
* `tb_edge_oneshot`: random input waveforms; the pulse clock and the pulse
  count.
* `tb_end_of_cycle`: exhaustive.
* `tb_led_stretch`:
  * gates shorter than, equal to and longer than the one-shot;
  * the full 3000-clock default.
* `tb_gate_channel`:
  * the example, delay and width 0 and 999, and 30 random settings;
  * extra ticks after the channel's end (a longer other channel);
  * two stopped cycles.
* `tb_time_base`:
  * the spacing of every tick in all six ranges, and codes 6 and 7;
  * a start during a cycle;
  * a start on the clock after a reset.
* `tb_peppo`: the whole generator, with every parameter at its default. It
  predicts every edge of `out_l` and `busy` from the timing rules above, and
  the LED on-time, then compares them exactly. It covers:
  * all six ranges;
  * the worked example;
  * zero delay and zero width;
  * an end at the longer channel;
  * a stop while both gates are on;
  * an ignored start during a cycle;
  * delay and width 999 at 10 MHz;
  * two back-to-back cycles.

  Each of these mechanisms is counted, and one that never happened is a
  failure. It simulates about 27 ms of instrument time in well under a
  second.

`tb_peppo_oscillator` runs the generator as an oscillator. The longer
channel's gate is fed back to `start_n` through a delay line of D clocks.
Three settings are run for 5 to 30 periods each. The test checks that:

* the period is L·T + D + 3 clocks every time;
* both gates keep their delay and width in every period;
* a stop ends the oscillation.

Concurrent assertions check two rules in simulation:

* a scaler is never clocked past 999;
* K1 and K2 are never open together.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/peppo_pkg.sv tb/tb_peppo.sv --top-module tb_peppo
./obj_dir/Vtb_peppo
```

Replace `tb_peppo` by any other testbench name. For lint only:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/peppo_pkg.sv rtl/peppo.sv --top-module peppo
```

Lint leaves some warnings, and they are expected:

* unused package constants, in modules that import the package;
* the scalers' BCD count outputs, which the channel does not use;
* `rst_n` is used both as an asynchronous reset and in the assertions'
  `disable iff`.

Simulation has not checked the 100 Hz range with large settings. A 9.99 s
gate is 10^8 clocks. The same logic is covered at the short ranges and with
settings up to 999.
