// tb_bcd_counter: self-checking test of the BCD decade counter.
//
// Drives random load/enable/load-value patterns (including illegal codes
// 10..15 as load values) and compares the count and the `nine` flag every
// clock with a reference model kept in the testbench.
module tb_bcd_counter;
  import peppo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en, nine;
  bcd_t load_val, q, exp_q;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcd_counter dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; en = 1'b0; load_val = '0; exp_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load     = ($urandom % 4) == 0;
      en       = ($urandom % 3) != 0;
      load_val = bcd_t'($urandom % 16);
      if (en)        exp_q = (exp_q >= 9) ? 4'd0 : exp_q + 4'd1;
      else if (load) exp_q = load_val;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q || nine !== (exp_q == 4'd9)) begin
        failures++;
        if (failures < 10) $display("mismatch cycle %0d: q=%0d exp=%0d nine=%0b", i, q, exp_q, nine);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
