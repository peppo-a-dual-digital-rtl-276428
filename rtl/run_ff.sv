// run_ff: clock gate flip-flop of the time base.
//
// Set by the start pulse, it opens the clock gate for one operating cycle;
// the reset pulse that ends the cycle (or a stop) clears it. While it is
// clear the time-base multiplexer is inhibited, the divider is held reset
// and the scalers are held at their preset. `run` goes high on the clock
// edge that ends the start-pulse cycle and low on the edge that ends the
// reset-pulse cycle. A start during a running cycle is ignored and reset
// wins over set; both are this design's choices.
module run_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic start_pulse,
  input  logic reset_pulse,
  output logic run
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           run <= 1'b0;
    else if (reset_pulse) run <= 1'b0;
    else if (start_pulse) run <= 1'b1;
  end

endmodule
