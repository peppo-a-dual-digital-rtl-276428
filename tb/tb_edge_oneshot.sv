// tb_edge_oneshot: self-checking test of the input synchroniser/one-shot.
//
// Drives a random active-low waveform (each level held one or more clocks)
// and checks, clock by clock, that `pulse` is high exactly in the clock that
// follows the second clock edge after a falling input edge, and that the
// number of pulses equals the number of falling edges.
module tb_edge_oneshot;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_n, pulse;
  logic hist [$];          // input value sampled at each clock edge
  int checks = 0, failures = 0;
  int falls = 0, pulses = 0;

  always #5 clk = ~clk;

  edge_oneshot #(.SYNC_STAGES(2)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_n = 1'b1;
    hist.push_back(1'b1);   // synchroniser resets to the idle level
    hist.push_back(1'b1);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic exp_pulse;
      @(negedge clk);
      if (($urandom % 4) == 0) begin
        if (in_n) falls++;
        in_n = ~in_n;
      end
      @(posedge clk);
      hist.push_back(in_n);
      #1;
      // pulse after edge p: sample p-2 high, sample p-1 low
      if (hist.size() >= 3)
        exp_pulse = hist[hist.size()-3] && !hist[hist.size()-2];
      else
        exp_pulse = 1'b0;
      if (pulse) pulses++;
      checks++;
      if (pulse !== exp_pulse) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pulse=%0b exp=%0b", i, pulse, exp_pulse);
      end
    end
    repeat (3) begin @(posedge clk); #1; if (pulse) pulses++; end
    checks++;
    if (pulses != falls) begin
      failures++;
      $display("FAIL pulses=%0d falling edges=%0d", pulses, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
