// bcd_counter: presettable synchronous BCD decade counter.
//
// The basic element of both the five-decade frequency divider and the
// three-decade delay/width scalers. On a clock edge with `en` high the count
// steps 0,1,..,9,0; with `load` high (and `en` low) it takes `load_val`.
// `nine` is high while the count is 9 and is what a caller ANDs into the
// carry of the next decade and into a scaler's all-nines gate. Counting has
// priority over loading; an illegal code (10..15) steps to 0. Asynchronous
// active-low reset clears the count. Decade counters come from the published
// circuit; the priority and the handling of illegal codes are this design's.
module bcd_counter
  import peppo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  bcd_t load_val,
  input  logic en,
  output bcd_t q,
  output logic nine
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (en)      q <= (q >= 4'd9) ? 4'd0 : q + 4'd1;
    else if (load)    q <= load_val;
  end

  assign nine = (q == 4'd9);

endmodule
