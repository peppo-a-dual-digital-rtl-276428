// time_base: the time base generator shared by both channels.
//
// Made of the clock gate flip-flop (run_ff), the five-decade divider
// (freq_divider) and the range multiplexer (timebase_mux). A start pulse at
// t = 0 is itself the first tick and opens the clock gate; from then on a
// tick comes every T = 10^sel clock periods until the reset pulse closes the
// gate again. While the gate is closed the divider is held at 0, so the
// first divided tick lands exactly T after the start pulse. `tick` is a
// one-clock enable; `run` is high from the clock after the start pulse
// through the reset-pulse clock. The structure (gate flip-flop, decade
// divider, range multiplexer, start ORed in as the first pulse) follows the
// original instrument; building it around one free-running clock with a
// tick enable is this design's choice.
module time_base
  import peppo_pkg::*;
#(
  parameter int unsigned DECADES = DIVIDER_DECADES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_pulse,
  input  logic       reset_pulse,
  input  logic [2:0] sel,
  output logic       tick,
  output logic       run
);

  logic [DECADES:0] tc;

  run_ff u_gate (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_pulse (start_pulse),
    .reset_pulse (reset_pulse),
    .run         (run)
  );

  freq_divider #(.DECADES(DECADES)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (!run || reset_pulse),
    .en    (run),
    .tc    (tc)
  );

  timebase_mux #(.RANGES(DECADES + 1)) u_mux (
    .sel         (sel),
    .tc          (tc),
    .run         (run),
    .start_pulse (start_pulse),
    .tick        (tick)
  );

endmodule
