// tb_freq_divider: self-checking test of the five-decade divider.
//
// Counts the clocks since the divider was released from clear and checks
// each flag tc[k] against "clock count since release is 10^k - 1 mod 10^k"
// for the first 250000 clocks (covering a full 10^5 period of the top
// decade twice), with `en` held high. It then checks that `clear` brings
// every flag back to the all-zero state and that `en` low freezes it.
module tb_freq_divider;
  import peppo_pkg::*;

  localparam int unsigned DEC = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en;
  logic [DEC:0] tc;
  int checks = 0, failures = 0;
  int n;
  int tc_seen [DEC+1];

  always #5 clk = ~clk;

  freq_divider #(.DECADES(DEC)) dut (.*);

  function automatic logic [DEC:0] expected(int cnt);
    logic [DEC:0] e;
    int p = 1;
    for (int k = 0; k <= DEC; k++) begin
      e[k] = (cnt % p) == p - 1;
      p *= 10;
    end
    return e;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s n=%0d tc=%b", what, n, tc);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(tc == expected(0), "cleared state");
    clear = 1'b0; en = 1'b1;
    for (n = 0; n < 250000; n++) begin
      // tc reflects the count of clocks already counted (n)
      check(tc == expected(n), "tc flags");
      for (int k = 0; k <= DEC; k++) if (tc[k]) tc_seen[k]++;
      @(negedge clk);
    end
    // 10^5 - 1 reached twice in 250000 counts
    check(tc_seen[DEC] == 2, "top flag seen twice");
    check(tc_seen[3] == 250, "tc[3] every 1000");
    // freeze
    en = 1'b0;
    repeat (7) @(negedge clk);
    check(tc == expected(n), "frozen with en low");
    // clear
    clear = 1'b1; en = 1'b1;
    @(negedge clk);
    check(tc == expected(0), "clear wins over en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
