// end_of_cycle: automatic reset/strobe of the generator.
//
// Each channel's K3 gate opens when its width scaler is full. The reset pulse
// is the tick on which every channel's K3 is open, so with two channels it
// comes at the end of the longer cycle, one T after the later gate has been
// counted (the same tick that ends that gate). A stop pulse also ends the
// cycle at once. The reset pulse closes the clock gate, holds the divider
// reset and presets the scalers. Combinational; the AND over channels is this
// design's reading of "the reset pulse occurs at the end of the longest
// cycle".
module end_of_cycle
  import peppo_pkg::*;
#(
  parameter int unsigned CHANNELS = NUM_CHANNELS
) (
  input  logic                tick,
  input  logic                run,
  input  logic [CHANNELS-1:0] done,
  input  logic                stop_pulse,
  output logic                reset_pulse
);

  assign reset_pulse = (run && tick && (&done)) || (run && stop_pulse);

endmodule
