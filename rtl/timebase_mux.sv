// timebase_mux: TIME BASE switch and multiplexer with the start OR.
//
// Picks the divider flag tc[sel] as the counted clock pulse of a running
// cycle, so that T = 10^sel clock periods (10 MHz, 1 MHz, .. 100 Hz). The
// multiplexer is inhibited while the clock gate is closed (`run` low). The
// start pulse is ORed in and becomes the first pulse counted, at t = 0; the
// next pulse follows T later. `tick` is combinational and is used as a clock
// enable by the scalers and output flip-flops. Switch codes above the last
// range select the slowest range (this design's choice).
module timebase_mux
  import peppo_pkg::*;
#(
  parameter int unsigned RANGES = NUM_RANGES
) (
  input  logic [2:0]        sel,
  input  logic [RANGES-1:0] tc,
  input  logic              run,
  input  logic              start_pulse,
  output logic              tick
);

  logic selected;

  always_comb begin
    if (int'(sel) >= RANGES) selected = tc[RANGES-1];
    else                     selected = tc[sel];
  end

  assign tick = (run && selected) || (!run && start_pulse);

endmodule
