// edge_oneshot: synchroniser and falling-edge one-shot for an input pulse.
//
// Stands in for the input one-shot that the start (and stop) input triggers
// on its negative-going edge. The asynchronous active-low input passes
// SYNC_STAGES flip-flops, then a one-clock `pulse` is made for each high-to-
// low transition. Latency from the input edge to the pulse is SYNC_STAGES to
// SYNC_STAGES+1 clocks. Input pulses must be at least one clock wide and low
// and high for at least a clock each to be seen. The synchroniser is this
// design's addition for a clocked implementation.
module edge_oneshot #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_n,
  output logic pulse
);

  logic [SYNC_STAGES:0] sync;   // sync[SYNC_STAGES] is the previous sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '1;
    else        sync <= {sync[SYNC_STAGES-1:0], in_n};
  end

  assign pulse = sync[SYNC_STAGES] && !sync[SYNC_STAGES-1];

endmodule
