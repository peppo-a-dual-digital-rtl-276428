// tb_led_stretch: self-checking test of the LED one-shot.
//
// With the one-shot shortened to 20 clocks, gate pulses of 1, 5, 19, 20, 21
// and 60 clocks are applied; the LED must come on with the gate and stay on
// for max(gate length, 20) clocks. The 300 us default is checked once.
module tb_led_stretch;
  localparam int unsigned C = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic q, led, led_full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  led_stretch #(.CYCLES(C)) dut (.*);
  led_stretch dut_full (.clk(clk), .rst_n(rst_n), .q(q), .led(led_full));

  task automatic pulse(int width, int expect_on, bit full);
    int on = 0;
    @(negedge clk);
    q = 1'b1;
    for (int i = 0; i < width; i++) begin
      #1;
      if (full ? led_full : led) on++;
      @(negedge clk);
      if (i == width - 1) q = 1'b0;
    end
    forever begin
      #1;
      if (!(full ? led_full : led)) break;
      on++;
      @(negedge clk);
    end
    checks++;
    if (on != expect_on) begin
      failures++;
      $display("FAIL width %0d: led on %0d clocks, expected %0d", width, on, expect_on);
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    pulse(1, C, 0);
    pulse(5, C, 0);
    pulse(19, C, 0);
    pulse(20, C, 0);
    pulse(21, 21, 0);
    pulse(60, 60, 0);
    repeat (3100) @(negedge clk);   // let the long one-shot finish
    pulse(2, 3000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
