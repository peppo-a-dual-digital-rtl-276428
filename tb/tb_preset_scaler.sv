// tb_preset_scaler: self-checking test of the three-decade preset scaler.
//
// For random settings N (0..999) the scaler is loaded with the nine's
// complement of N, then given count pulses with random gaps. The test checks
// that `full` comes after exactly N pulses (not one early), that the count
// reads 999 - N + k after k pulses, and the Fig. 4 example presets 996/994.
module tb_preset_scaler;
  import peppo_pkg::*;

  localparam int unsigned D = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en, full;
  bcd_t [D-1:0] load_val, count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  preset_scaler #(.DIGITS(D)) dut (.*);

  function automatic int bcd2int(bcd_t [D-1:0] v);
    int r = 0;
    for (int i = D - 1; i >= 0; i--) r = r * 10 + int'(v[i]);
    return r;
  endfunction

  function automatic bcd_t [D-1:0] int2bcd(int n);
    bcd_t [D-1:0] v;
    for (int i = 0; i < D; i++) begin v[i] = bcd_t'(n % 10); n /= 10; end
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (count=%0d full=%0b)", what, bcd2int(count), full);
    end
  endtask

  task automatic run_setting(int n);
    @(negedge clk);
    load = 1'b1; en = 1'b0; load_val = int2bcd(999 - n);
    @(negedge clk);
    load = 1'b0;
    check(bcd2int(count) == 999 - n, "preset value");
    check(full == (n == 0), "full after preset");
    for (int k = 1; k <= n; k++) begin
      while (($urandom % 3) == 0) @(negedge clk);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(bcd2int(count) == 999 - n + k, "count value");
      check(full == (k == n), "full exactly after N pulses");
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; en = 1'b0; load_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Fig. 4 example: delay 3 -> preset 996, width 5 -> preset 994
    run_setting(3);
    run_setting(5);
    run_setting(0);
    run_setting(1);
    run_setting(10);
    run_setting(100);
    run_setting(999);
    for (int i = 0; i < 20; i++) run_setting(int'($urandom % 250));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
