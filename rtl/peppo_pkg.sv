// peppo_pkg: types and constants shared by the dual delay and gate generator.
//
// The generator counts pulses of a selectable time base in BCD decade
// scalers. A BCD digit is a 4-bit code 0..9; a scaler value is an array of
// digits, least significant digit first. The time-base switch has six
// positions, from the undivided 10 MHz clock down to 100 Hz in decades.
// The numbers (three-decade scalers, five-decade divider, six ranges, two
// channels, 300 us LED time) follow the published instrument; the enum
// encoding of the switch is this design's choice.
package peppo_pkg;

  localparam int unsigned CLK_HZ          = 10_000_000; // master oscillator
  localparam int unsigned SCALER_DIGITS   = 3;          // 1 part in 1000
  localparam int unsigned DIVIDER_DECADES = 5;          // 10 MHz .. 100 Hz
  localparam int unsigned NUM_RANGES      = DIVIDER_DECADES + 1;
  localparam int unsigned NUM_CHANNELS    = 2;
  localparam int unsigned LED_TIME_US     = 300;
  localparam int unsigned LED_CYCLES      = CLK_HZ / 1_000_000 * LED_TIME_US;

  typedef logic [3:0] bcd_t;

  // TIME BASE switch position; the value is the power of ten the 10 MHz
  // clock is divided by.
  typedef enum logic [2:0] {
    TB_10MHZ  = 3'd0,
    TB_1MHZ   = 3'd1,
    TB_100KHZ = 3'd2,
    TB_10KHZ  = 3'd3,
    TB_1KHZ   = 3'd4,
    TB_100HZ  = 3'd5
  } timebase_e;

  // Nine's complement of one BCD digit: the code a nine's-complement
  // thumbwheel switch delivers for the digit dialled.
  function automatic bcd_t nines_complement(bcd_t d);
    return (d > 4'd9) ? 4'd0 : 4'd9 - d;
  endfunction

endpackage
