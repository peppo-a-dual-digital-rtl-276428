// tb_gate_channel: self-checking test of one channel's gate logic.
//
// For a set of delay/width settings (the Fig. 4 example m=3, w=5, the edge
// cases 0 and 999, and random ones) the channel is preset, then given ticks
// with random gaps, the first tick with `preset` still high as the start
// pulse is. After c ticks the output must be high exactly for
// m <= c-1 < m+w and `done` must equal (w == 0 || c >= m+w). The test then
// applies up to three further ticks (as when the other channel runs
// longer), then the reset pulse (`clear` with a tick) and checks that the output is
// off and the scalers are preset again, and also stops some runs early.
module tb_gate_channel;
  import peppo_pkg::*;

  localparam int unsigned D = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick, preset, clear, q, done;
  bcd_t [D-1:0] delay_set, width_set;
  int checks = 0, failures = 0;
  int stops = 0;
  int longer_other = 0;

  always #5 clk = ~clk;

  gate_channel #(.DIGITS(D)) dut (.*);

  function automatic bcd_t [D-1:0] int2bcd(int n);
    bcd_t [D-1:0] v;
    for (int i = 0; i < D; i++) begin v[i] = bcd_t'(n % 10); n /= 10; end
    return v;
  endfunction

  task automatic check(bit cond, string what, int m, int w, int c);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%0d w=%0d c=%0d q=%0b done=%0b", what, m, w, c, q, done);
    end
  endtask

  // runs one cycle; stop_at < 0 runs to the end
  task automatic run(int m, int w, int stop_at);
    int c = 0;
    int last;
    @(negedge clk);
    delay_set = int2bcd(m); width_set = int2bcd(w);
    preset = 1'b1; tick = 1'b0; clear = 1'b0;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "idle output", m, w, c);
    check(done == (w == 0), "idle done", m, w, c);
    // extra ticks after the channel's own end stand for a longer other channel
    last = ((m + w > 0) ? m + w : 1) + int'($urandom % 4);
    while (c < last) begin
      if (stop_at >= 0 && c == stop_at) break;
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      preset = 1'b0;
      c++;
      check(q == (m <= c - 1 && c - 1 < m + w), "output level", m, w, c);
      check(done == (w == 0 || c >= m + w), "done", m, w, c);
      while (($urandom % 3) == 0) @(negedge clk);
    end
    if (c < last) stops++;
    if (c > m + w + 1) longer_other++;
    // reset pulse (end of cycle or stop)
    tick = (stop_at < 0);
    clear = 1'b1;
    @(negedge clk);
    tick = 1'b0; clear = 1'b0; preset = 1'b1;
    check(q == 1'b0, "output off after reset", m, w, c);
    check(done == (w == 0), "preset after reset", m, w, c);
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 1'b0; preset = 1'b1; clear = 1'b0; delay_set = '0; width_set = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(3, 5, -1);
    run(0, 5, -1);
    run(3, 0, -1);
    run(0, 0, -1);
    run(0, 1, -1);
    run(1, 0, -1);
    run(999, 2, -1);
    run(2, 999, -1);
    run(10, 20, 15);
    run(10, 20, 5);
    for (int i = 0; i < 30; i++) run(int'($urandom % 40), int'($urandom % 40), -1);
    check(stops == 2, "stopped runs", 0, 0, 0);
    check(longer_other > 0, "ticks after the channel's end", 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
