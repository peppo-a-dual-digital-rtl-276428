// gate_channel: delay/width gate logic of one channel.
//
// Two preset scalers count the time-base ticks in sequence. R1 (delay) is
// preset to the nine's complement of the delay setting m and counts through
// gate K1 while it is not full. Once R1 is full, K2 passes the ticks to R2
// (width), preset to the complement of the width w. The D input of the
// output flip-flop M1 is "R1 full and R2 not full", sampled on each tick, so
// the output rises on the tick m after the start (t = m*T) and falls on the
// tick m+w (t = (m+w)*T): delay m*T, width w*T. When R2 is full, K3 is open
// (`done`); the next tick through K3 is the channel's bid for the reset
// pulse. The tick that sets M1 is also the first one counted by R2.
//
// While the clock gate is closed (`preset`), the scalers are loaded from the
// thumbwheels every clock; `clear` (the reset pulse) presets them at once
// and clears M1, so a new start may come on the very next clock. The
// settings enter as dialled BCD digits and are complemented here, where the
// original used nine's-complement switches. Clearing M1 on `clear` is this
// design's choice so that a stop also ends a gate that is on.
module gate_channel
  import peppo_pkg::*;
#(
  parameter int unsigned DIGITS = SCALER_DIGITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              preset,
  input  logic              clear,
  input  bcd_t [DIGITS-1:0] delay_set,
  input  bcd_t [DIGITS-1:0] width_set,
  output logic              q,
  output logic              done
);

  bcd_t [DIGITS-1:0] delay_pre, width_pre;
  bcd_t [DIGITS-1:0] r1_count, r2_count;
  logic              r1_full, r2_full;
  logic              k1, k2, load;

  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      delay_pre[i] = nines_complement(delay_set[i]);
      width_pre[i] = nines_complement(width_set[i]);
    end
  end

  // gates K1/K2: ticks go to the delay scaler, then to the width scaler
  assign k1   = tick && !clear && !r1_full;
  assign k2   = tick && !clear &&  r1_full && !r2_full;
  assign load = clear || (preset && !tick);

  preset_scaler #(.DIGITS(DIGITS)) u_r1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .load_val (delay_pre),
    .en       (k1),
    .count    (r1_count),
    .full     (r1_full)
  );

  preset_scaler #(.DIGITS(DIGITS)) u_r2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .load_val (width_pre),
    .en       (k2),
    .count    (r2_count),
    .full     (r2_full)
  );

  // M1: D-type flip-flop clocked by the selected ticks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (clear) q <= 1'b0;
    else if (tick)  q <= r1_full && !r2_full;
  end

  // K3 open: width counted
  assign done = r2_full;

  a_k1_k2_exclusive : assert property (@(posedge clk) disable iff (!rst_n) !(k1 && k2))
    else $error("gate_channel: K1 and K2 open together");

endmodule
