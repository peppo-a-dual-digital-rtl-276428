// tb_timebase_mux: exhaustive test of the range multiplexer.
//
// Walks every combination of switch position, divider flags, run and start
// and compares `tick` with the expected: the selected flag while running
// (codes 6 and 7 select the last range), the start pulse while idle.
module tb_timebase_mux;
  import peppo_pkg::*;

  localparam int unsigned R = 6;

  logic [2:0]   sel;
  logic [R-1:0] tc;
  logic         run, start_pulse, tick;
  int checks = 0, failures = 0;

  timebase_mux #(.RANGES(R)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int t = 0; t < (1 << R); t++)
        for (int rs = 0; rs < 4; rs++) begin
          logic exp_tick;
          int   idx;
          sel = 3'(s); tc = R'(t); run = rs[0]; start_pulse = rs[1];
          idx = (s >= R) ? R - 1 : s;
          exp_tick = run ? tc[idx] : start_pulse;
          #1;
          checks++;
          if (tick !== exp_tick) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d tc=%b run=%0b start=%0b tick=%0b", s, tc, run, start_pulse, tick);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
