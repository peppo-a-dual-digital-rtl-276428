// led_stretch: channel LED one-shot.
//
// The LED is lit while the channel's gate is on, or for CYCLES clocks from
// the gate's rising edge, whichever is longer: 3000 clocks is 300 us at
// 10 MHz. A rising edge of `q` loads the counter; it counts down to zero and
// is not retriggered while it runs. `led` is combinational: `q` ORed
// with "counter not zero". The 300 us minimum and the "gate or one-shot,
// whichever is longer" rule follow the original instrument; triggering on
// the rising edge without retriggering is this design's choice.
module led_stretch
  import peppo_pkg::*;
#(
  parameter int unsigned CYCLES = LED_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic q,
  output logic led
);

  localparam int unsigned W = $clog2(CYCLES + 1);

  logic         q_d;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_d <= 1'b0;
      cnt <= '0;
    end else begin
      q_d <= q;
      if (q && !q_d && cnt == '0) cnt <= W'(CYCLES - 1);
      else if (cnt != '0)         cnt <= cnt - 1'b1;
    end
  end

  assign led = q || (cnt != '0);

endmodule
