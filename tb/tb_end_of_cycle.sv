// tb_end_of_cycle: exhaustive test of the reset/strobe logic.
//
// Two channels: the reset pulse must come on a tick of a running cycle only
// when both channels are done, or on a stop during a running cycle.
module tb_end_of_cycle;
  logic       tick, run, stop_pulse, reset_pulse;
  logic [1:0] done;
  int checks = 0, failures = 0;

  end_of_cycle #(.CHANNELS(2)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp_r;
      {tick, run, stop_pulse, done} = 5'(v);
      exp_r = run && ((tick && done == 2'b11) || stop_pulse);
      #1;
      checks++;
      if (reset_pulse !== exp_r) begin
        failures++;
        $display("FAIL tick=%0b run=%0b stop=%0b done=%b reset=%0b", tick, run, stop_pulse, done, reset_pulse);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
