// tb_time_base: self-checking test of the time base generator.
//
// For each of the six ranges a start pulse is given and the clocks between
// ticks are measured: the start clock itself must tick, then a tick must
// come every 10^sel clocks, and no tick may come between. After a number of
// ticks the testbench returns the reset pulse; `run` must drop and no tick
// may follow until the next start. A start during a running cycle must be
// ignored, and a start on the clock right after the reset must be accepted.
module tb_time_base;
  import peppo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_pulse, reset_pulse, tick, run;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  time_base #(.DECADES(5)) dut (.*);

  task automatic check(bit cond, string what, int s, int k);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%0d clock=%0d tick=%0b run=%0b", what, s, k, tick, run);
    end
  endtask

  // n_ticks counted ticks including the start; extra_start inserts a start
  // pulse in the middle of the cycle
  task automatic cycle(int s, int n_ticks, bit extra_start);
    int period = 1;
    int k = 0, seen = 0;
    for (int i = 0; i < (s > 5 ? 5 : s); i++) period *= 10;
    sel = 3'(s);
    start_pulse = 1'b1;
    #1;
    check(tick == 1'b1 && run == 1'b0, "start is the first tick", s, 0);
    @(negedge clk);
    start_pulse = 1'b0;
    seen = 1;
    while (seen < n_ticks) begin
      k++;
      start_pulse = extra_start && (k == period / 2 + 1);
      #1;
      check(run == 1'b1, "running", s, k);
      check(tick == ((k % period) == 0), "tick spacing", s, k);
      if (tick) seen++;
      if (seen == n_ticks) reset_pulse = 1'b1;
      @(negedge clk);
      reset_pulse = 1'b0;
      start_pulse = 1'b0;
    end
    #1;
    check(run == 1'b0, "stopped after reset", s, k);
    repeat (3) begin
      @(negedge clk); #1;
      check(tick == 1'b0, "no tick while idle", s, k);
    end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start_pulse = 1'b0; reset_pulse = 1'b0; sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cycle(0, 10, 1'b0);
    cycle(1, 6, 1'b1);
    cycle(2, 4, 1'b1);
    cycle(3, 3, 1'b0);
    cycle(4, 3, 1'b0);
    cycle(5, 3, 1'b0);
    // start on the clock right after a reset
    sel = 3'd0;
    start_pulse = 1'b1;
    @(negedge clk); start_pulse = 1'b0;
    @(negedge clk); reset_pulse = 1'b1;
    @(negedge clk); reset_pulse = 1'b0;
    cycle(0, 2, 1'b0);
    // switch codes 6 and 7 select the 100 Hz range
    cycle(6, 2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
