// preset_scaler: three-decade presettable scaler with all-nines gate.
//
// DIGITS BCD decades counting up in a synchronous chain. The scaler is
// preset to the nine's complement of the number of pulses it must count, so
// after exactly that many `en` pulses it reads all nines and `full` (the
// all-nines AND gate of the published circuit, given here active high) goes
// high. Example: to count 3 it is preset to 996. `en` must not be given
// while `full` is high (the channel's gates see to that; an assertion
// checks it). `load` is synchronous and loses to `en`. Digits are least
// significant first. Nine's-complement presetting and the all-nines gate
// follow the original instrument; the synchronous carry chain is this
// design's.
module preset_scaler
  import peppo_pkg::*;
#(
  parameter int unsigned DIGITS = SCALER_DIGITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  bcd_t [DIGITS-1:0] load_val,
  input  logic              en,
  output bcd_t [DIGITS-1:0] count,
  output logic              full
);

  logic [DIGITS-1:0] nine;
  logic [DIGITS:0]   carry;

  assign carry[0] = en;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dec
    bcd_counter u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .load_val (load_val[i]),
      .en       (carry[i]),
      .q        (count[i]),
      .nine     (nine[i])
    );
    assign carry[i+1] = carry[i] & nine[i];
  end

  assign full = &nine;

  a_no_count_past_full : assert property (@(posedge clk) disable iff (!rst_n) !(en && full))
    else $error("preset_scaler: count pulse while already full");

endmodule
