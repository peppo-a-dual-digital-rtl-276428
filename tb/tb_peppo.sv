// tb_peppo: end-to-end test of the dual delay and gate generator.
//
// Runs the top level with all its default parameters (two channels,
// three-decade scalers, five-decade divider, 300 us LED time). A scenario
// sets the time base and both channels' delay m and width w, gives a start
// edge (and optionally a stop edge, an extra start during the cycle, or a
// second start timed to land on the first clock after the cycle ends), and
// then compares every edge seen on out_l and busy with the edges worked out
// from the timing rules:
//   start edge applied before clock edge s+1  ->  start counted at edge s+3
//   channel gate on  at s+3 + m*T, off at s+3 + (m+w)*T   (w > 0)
//   busy off at s+3 + L*T, L = max(1, largest m+w of a channel with w > 0)
//   stop edge before edge p+1 ends the cycle at edge p+3.
// T is 10^timebase_sel clocks. out_l_n, out_g and out_g_n are checked against
// out_l every clock, and the LED on-time against max(gate, 3000 clocks).
// Each mechanism (each time base range, delay, zero delay, zero width,
// end at the longer channel, stop, start ignored while running, restart with
// no dead time, LED stretching) is counted; one never seen is a failure.
module tb_peppo;
  import peppo_pkg::*;

  localparam int CH = 2;
  localparam int LEDC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_n, stop_n;
  logic [2:0] timebase_sel;
  bcd_t [CH-1:0][2:0] delay_set, width_set;
  logic [CH-1:0] out_l, out_l_n, out_g, out_g_n, led;
  logic busy;

  int checks = 0, failures = 0;
  int cyc = 0;                       // clock edges since reset release

  // observed and expected edges: {kind, channel, cycle}
  typedef struct { int kind; int ch; int cyc; } ev_t;  // kind 0 rise 1 fall 2 busy rise 3 busy fall
  ev_t obs [$];
  ev_t exp_q [$];
  int  led_on_start [CH], led_len [CH];

  // mechanism counters
  int n_range [6];
  int n_delay, n_zero_delay, n_zero_width, n_longest, n_stop, n_ignored, n_nodead, n_led_stretch, n_led_follow;

  always #50 clk = ~clk;   // 10 MHz

  peppo dut (.*);

  function automatic bcd_t [2:0] int2bcd(int n);
    bcd_t [2:0] v;
    for (int i = 0; i < 3; i++) begin v[i] = bcd_t'(n % 10); n /= 10; end
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // monitor
  logic [CH-1:0] l_prev = '0;
  logic busy_prev = 1'b0;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      cyc++;
      for (int c = 0; c < CH; c++) begin
        if (out_l[c] && !l_prev[c]) obs.push_back('{0, c, cyc});
        if (!out_l[c] && l_prev[c]) obs.push_back('{1, c, cyc});
      end
      if (busy && !busy_prev) obs.push_back('{2, 0, cyc});
      if (!busy && busy_prev) obs.push_back('{3, 0, cyc});
      l_prev = out_l;
      busy_prev = busy;
      for (int c = 0; c < CH; c++) begin
        if (led[c]) led_len[c]++;
      end
      checks++;
      if (out_l_n !== ~out_l || out_g !== out_l || out_g_n !== ~out_l) begin
        failures++;
        if (failures < 20) $display("FAIL @%0d: complementary outputs disagree", cyc);
      end
    end
  end

  // expected edges of one cycle started by an edge applied before clock s+1;
  // stop_p >= 0: stop edge applied before clock stop_p+1
  task automatic expect_cycle(int sel, int m[CH], int w[CH], int s, int stop_p);
    int T = 1, L = 1, t0, e_end;
    for (int i = 0; i < sel; i++) T *= 10;
    t0 = s + 3;
    for (int c = 0; c < CH; c++) if (w[c] > 0 && m[c] + w[c] > L) L = m[c] + w[c];
    e_end = t0 + L * T;
    if (stop_p >= 0 && stop_p + 3 < e_end) e_end = stop_p + 3;
    exp_q.push_back('{2, 0, t0});
    exp_q.push_back('{3, 0, e_end});
    for (int c = 0; c < CH; c++) begin
      int r = t0 + m[c] * T, f = t0 + (m[c] + w[c]) * T;
      if (w[c] > 0 && r < e_end) begin
        exp_q.push_back('{0, c, r});
        exp_q.push_back('{1, c, (f < e_end) ? f : e_end});
      end
    end
  endtask

  function automatic int cycle_len(int sel, int m[CH], int w[CH]);
    int T = 1, L = 1;
    for (int i = 0; i < sel; i++) T *= 10;
    for (int c = 0; c < CH; c++) if (w[c] > 0 && m[c] + w[c] > L) L = m[c] + w[c];
    return L * T;
  endfunction

  task automatic compare();
    check(obs.size() == exp_q.size(), $sformatf("edge count %0d expected %0d", obs.size(), exp_q.size()));
    foreach (exp_q[i]) begin
      bit found = 0;
      foreach (obs[j]) if (obs[j].kind == exp_q[i].kind && obs[j].ch == exp_q[i].ch && obs[j].cyc == exp_q[i].cyc) found = 1;
      check(found, $sformatf("expected edge kind %0d ch %0d at %0d", exp_q[i].kind, exp_q[i].ch, exp_q[i].cyc));
    end
    if (failures > 0 && failures < 20) foreach (obs[j]) $display("  seen kind %0d ch %0d at %0d", obs[j].kind, obs[j].ch, obs[j].cyc);
    obs.delete();
    exp_q.delete();
  endtask

  task automatic settings(int sel, int m[CH], int w[CH]);
    timebase_sel = 3'(sel);
    for (int c = 0; c < CH; c++) begin
      delay_set[c] = int2bcd(m[c]);
      width_set[c] = int2bcd(w[c]);
    end
  endtask

  // start edge at the coming negedge; returns the clock count s
  task automatic start_edge(output int s);
    @(negedge clk);
    s = cyc;
    start_n = 1'b0;
    @(negedge clk);
    start_n = 1'b1;
  endtask

  task automatic stop_edge(output int p);
    @(negedge clk);
    p = cyc;
    stop_n = 1'b0;
    @(negedge clk);
    stop_n = 1'b1;
  endtask

  task automatic wait_idle();
    repeat (3) @(negedge clk);           // input synchroniser delay
    while (busy) @(negedge clk);
    repeat (LEDC + 10) @(negedge clk);   // let the LED one-shots run out
  endtask

  // plain cycle, with LED check and optional stop / extra start
  task automatic scenario(int sel, int m0, int w0, int m1, int w1, int stop_after, bit extra_start);
    int m[CH], w[CH];
    int s, p = -1, len;
    m[0] = m0; m[1] = m1; w[0] = w0; w[1] = w1;
    settings(sel, m, w);
    len = cycle_len(sel, m, w);
    for (int c = 0; c < CH; c++) led_len[c] = 0;
    start_edge(s);
    if (extra_start) begin
      repeat (len / 2) @(negedge clk);
      start_n = 1'b0;
      @(negedge clk);
      start_n = 1'b1;
      n_ignored++;
    end
    if (stop_after >= 0) begin
      repeat (stop_after) @(negedge clk);
      stop_edge(p);
      n_stop++;
    end
    wait_idle();
    expect_cycle(sel, m, w, s, p);
    // LED on-time: max(gate, LEDC) for a channel that produced a gate
    if (stop_after < 0) begin
      int T = 1;
      for (int i = 0; i < sel; i++) T *= 10;
      for (int c = 0; c < CH; c++) begin
        int gate = w[c] * T;
        int exp_led = (w[c] == 0) ? 0 : (gate > LEDC ? gate : LEDC);
        check(led_len[c] == exp_led, $sformatf("LED ch %0d on %0d clocks, expected %0d", c, led_len[c], exp_led));
        if (w[c] > 0 && gate < LEDC) n_led_stretch++;
        if (w[c] > 0 && gate > LEDC) n_led_follow++;
      end
    end
    compare();
    n_range[sel]++;
    for (int c = 0; c < CH; c++) begin
      if (m[c] > 0 && w[c] > 0) n_delay++;
      if (m[c] == 0 && w[c] > 0) n_zero_delay++;
      if (w[c] == 0) n_zero_width++;
    end
    if (m0 + w0 != m1 + w1 && w0 > 0 && w1 > 0) n_longest++;
  endtask

  // two cycles back to back: the second start is counted on the first clock
  // after the first cycle has ended
  task automatic back_to_back(int sel, int m0, int w0, int m1, int w1);
    int m[CH], w[CH];
    int s1, s2, len;
    m[0] = m0; m[1] = m1; w[0] = w0; w[1] = w1;
    settings(sel, m, w);
    len = cycle_len(sel, m, w);
    start_edge(s1);
    // cycle ends at edge s1+3+len; second start counted at s1+4+len,
    // so its edge goes before clock s1+len+2 (negedge at count s1+len+1)
    while (cyc < s1 + len + 1) @(negedge clk);
    s2 = cyc;
    start_n = 1'b0;
    @(negedge clk);
    start_n = 1'b1;
    wait_idle();
    expect_cycle(sel, m, w, s1, -1);
    expect_cycle(sel, m, w, s2, -1);
    // busy is low for exactly the one clock in which the new start is
    // counted: the fall and the rise are both expected
    compare();
    n_nodead++;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start_n = 1'b1; stop_n = 1'b1;
    settings(0, '{0, 0}, '{0, 0});
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // Fig. 4: channel 1 delay 3, width 5 at 10 MHz; channel 2 longer
    scenario(0, 3, 5, 7, 12, -1, 0);
    scenario(0, 0, 4, 2, 0, -1, 0);        // zero delay, zero width
    scenario(1, 4, 2, 1, 1, -1, 0);
    scenario(2, 2, 3, 5, 1, -1, 1);        // extra start ignored
    scenario(3, 1, 6, 0, 2, -1, 0);        // gates longer than the LED time
    scenario(0, 20, 30, 10, 45, 25, 0);    // stop while gates are on
    scenario(4, 1, 2, 2, 1, -1, 0);
    scenario(5, 0, 1, 1, 1, -1, 0);
    scenario(0, 999, 999, 0, 0, -1, 0);    // longest setting at 10 MHz
    back_to_back(0, 3, 5, 2, 2);
    // every mechanism must have happened
    foreach (n_range[i]) check(n_range[i] > 0, $sformatf("range %0d never used", i));
    check(n_delay > 0, "no delayed gate");
    check(n_zero_delay > 0, "no zero-delay gate");
    check(n_zero_width > 0, "no zero-width channel");
    check(n_longest > 0, "no end at the longer channel");
    check(n_stop > 0, "no stop");
    check(n_ignored > 0, "no start during a cycle");
    check(n_nodead > 0, "no back-to-back cycle");
    check(n_led_stretch > 0, "no stretched LED");
    check(n_led_follow > 0, "no LED following a long gate");
    $display("mechanisms: ranges=%p delay=%0d zero_delay=%0d zero_width=%0d longest=%0d stop=%0d ignored_start=%0d back_to_back=%0d led_stretch=%0d led_follow=%0d",
             n_range, n_delay, n_zero_delay, n_zero_width, n_longest, n_stop, n_ignored, n_nodead, n_led_stretch, n_led_follow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
