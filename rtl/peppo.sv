// peppo: dual digital delay and gate generator (top level).
//
// A start edge opens a gated time base built from the 10 MHz master clock.
// The start itself is the first counted pulse (t = 0) and further pulses
// come every T = 10^timebase_sel clock periods (T = 100 ns .. 10 ms). Each of
// the two channels counts those pulses in a delay scaler and then a width
// scaler, both three-decade BCD, and its output gate is on from t = m*T to
// t = (m+w)*T, m and w being the channel's thumbwheel settings (0..999).
// When both channels have finished, the next pulse resets the time base and
// presets the scalers, so the generator is ready for a new start on the next
// clock (no dead time). A stop edge ends the cycle at any time.
//
// Interface: start_n/stop_n are asynchronous, active on their falling edge,
// and are synchronised (2..3 clocks of input delay). delay_set/width_set are
// BCD digits per channel, least significant first; they are read at the
// start and while idle, not during a cycle. out_l/out_g and their
// complements are the logic levels that the analog NIM and +12 V output
// drivers would take; led drives each channel's indicator (on for the gate
// or 300 us, whichever is longer); busy is the clock gate.
//
// The counting scheme, the ranges, the nine's-complement presetting and the
// end-of-longest-cycle reset follow the published instrument; the single
// synchronous clock with enables, the input synchronisers and the handling
// of a start during a cycle (ignored) are this design's choices.
module peppo
  import peppo_pkg::*;
#(
  parameter int unsigned CHANNELS        = NUM_CHANNELS,
  parameter int unsigned SCALER_DIGITS_P = SCALER_DIGITS,
  parameter int unsigned DECADES         = DIVIDER_DECADES,
  parameter int unsigned LED_CYCLES_P    = LED_CYCLES
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start_n,
  input  logic                                 stop_n,
  input  logic [2:0]                           timebase_sel,
  input  bcd_t [CHANNELS-1:0][SCALER_DIGITS_P-1:0] delay_set,
  input  bcd_t [CHANNELS-1:0][SCALER_DIGITS_P-1:0] width_set,
  output logic [CHANNELS-1:0]                  out_l,
  output logic [CHANNELS-1:0]                  out_l_n,
  output logic [CHANNELS-1:0]                  out_g,
  output logic [CHANNELS-1:0]                  out_g_n,
  output logic [CHANNELS-1:0]                  led,
  output logic                                 busy
);

  logic                start_pulse, stop_pulse;
  logic                tick, run, reset_pulse;
  logic [CHANNELS-1:0] q, done;

  edge_oneshot u_start (
    .clk   (clk),
    .rst_n (rst_n),
    .in_n  (start_n),
    .pulse (start_pulse)
  );

  edge_oneshot u_stop (
    .clk   (clk),
    .rst_n (rst_n),
    .in_n  (stop_n),
    .pulse (stop_pulse)
  );

  time_base #(.DECADES(DECADES)) u_tb (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_pulse (start_pulse),
    .reset_pulse (reset_pulse),
    .sel         (timebase_sel),
    .tick        (tick),
    .run         (run)
  );

  end_of_cycle #(.CHANNELS(CHANNELS)) u_eoc (
    .tick        (tick),
    .run         (run),
    .done        (done),
    .stop_pulse  (stop_pulse),
    .reset_pulse (reset_pulse)
  );

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    gate_channel #(.DIGITS(SCALER_DIGITS_P)) u_ch (
      .clk       (clk),
      .rst_n     (rst_n),
      .tick      (tick),
      .preset    (!run),
      .clear     (reset_pulse),
      .delay_set (delay_set[c]),
      .width_set (width_set[c]),
      .q         (q[c]),
      .done      (done[c])
    );

    led_stretch #(.CYCLES(LED_CYCLES_P)) u_led (
      .clk   (clk),
      .rst_n (rst_n),
      .q     (q[c]),
      .led   (led[c])
    );
  end

  assign out_l   = q;
  assign out_l_n = ~q;
  assign out_g   = q;
  assign out_g_n = ~q;
  assign busy    = run;

endmodule
