// tb_run_ff: self-checking test of the clock gate flip-flop.
//
// Random start/reset pulses are compared clock by clock with a reference:
// reset clears, start sets, reset wins when both come together.
module tb_run_ff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start_pulse, reset_pulse, run, exp_run;
  int checks = 0, failures = 0;
  int sets = 0, clears = 0;

  always #5 clk = ~clk;

  run_ff dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start_pulse = 1'b0; reset_pulse = 1'b0; exp_run = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (run !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start_pulse = ($urandom % 5) == 0;
      reset_pulse = ($urandom % 7) == 0;
      if (reset_pulse)      begin if (exp_run) clears++; exp_run = 1'b0; end
      else if (start_pulse) begin if (!exp_run) sets++;  exp_run = 1'b1; end
      @(posedge clk); #1;
      checks++;
      if (run !== exp_run) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d run=%0b exp=%0b", i, run, exp_run);
      end
    end
    checks++;
    if (sets == 0 || clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
