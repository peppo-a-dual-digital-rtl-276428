// freq_divider: five-decade synchronous divider of the master clock.
//
// DECADES BCD counters in a chain count the clock cycles of a running cycle.
// Decade i steps when `en` is high and every lower decade shows 9 (carry
// look-ahead, so all decades change on the same edge). The output
// tc[k] is high while the lowest k decades all show 9, so with the divider
// started at 0, tc[k] is high on every 10^k-th clock; tc[0] is always high.
// `clear` holds every decade at 0 (the divider is kept reset while no cycle
// runs) and wins over `en`. The five decades and division by ten per step
// follow the published instrument; the synchronous chain is this design's.
module freq_divider
  import peppo_pkg::*;
#(
  parameter int unsigned DECADES = DIVIDER_DECADES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [DECADES:0] tc
);

  logic [DECADES-1:0] nine;

  for (genvar i = 0; i < DECADES; i++) begin : g_dec
    bcd_t q;
    bcd_counter u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (clear),
      .load_val ('0),
      .en       (en && !clear && tc[i]),
      .q        (q),
      .nine     (nine[i])
    );
  end

  // tc[k] = all decades below k at 9
  assign tc[0] = 1'b1;
  for (genvar k = 1; k <= DECADES; k++) begin : g_tc
    assign tc[k] = tc[k-1] & nine[k-1];
  end

endmodule
