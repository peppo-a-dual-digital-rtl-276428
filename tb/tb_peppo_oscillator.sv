// tb_peppo_oscillator: the generator used as an oscillator.
//
// The complement output of the channel with the larger delay + width is fed
// back to the start input through a delay line of D clocks. In the active-low
// logic of this design that is start_n = out_l delayed: the start input sees
// a falling edge when the gate ends, which is also the end of the cycle. A
// kick on the start input starts the first cycle. After that the generator
// must run by itself with a fixed period of L*T + D + 3 clocks (L = larger
// m + w, T = 10^timebase_sel clocks, 3 clocks of input delay). Both channels'
// gates must keep their delay and width in every period. Top parameters are
// left at their defaults.
module tb_peppo_oscillator;
  import peppo_pkg::*;

  localparam int CH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_n, stop_n;
  logic [2:0] timebase_sel;
  bcd_t [CH-1:0][2:0] delay_set, width_set;
  logic [CH-1:0] out_l, out_l_n, out_g, out_g_n, led;
  logic busy;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic kick = 1'b1;
  logic [15:0] dline = '0;
  int dly;

  always #50 clk = ~clk;

  peppo dut (.*);

  // feedback: out_l_n of channel 1, which in NIM terms goes negative at the
  // gate's end; here the start input is active low, so it gets out_l delayed
  always_ff @(posedge clk) dline <= {dline[14:0], out_l[1]};
  assign start_n = kick | dline[dly-1];

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

  always @(posedge clk) if (rst_n) cyc++;

  task automatic oscillate(int sel, int m0, int w0, int m1, int w1, int d, int periods);
    int T = 1, L, per;
    int rise0 [$], rise1 [$], fall0 [$], fall1 [$];
    logic [CH-1:0] prev;
    for (int i = 0; i < sel; i++) T *= 10;
    L = (m0 + w0 > m1 + w1) ? m0 + w0 : m1 + w1;
    per = L * T + d + 3;
    timebase_sel = 3'(sel);
    delay_set[0] = int2bcd(m0); width_set[0] = int2bcd(w0);
    delay_set[1] = int2bcd(m1); width_set[1] = int2bcd(w1);
    dly = d;
    // kick: release the start input once
    @(negedge clk);
    kick = 1'b0;
    prev = out_l;
    while (rise1.size() < periods + 1) begin
      @(posedge clk); #1;
      for (int c = 0; c < CH; c++) begin
        if (out_l[c] && !prev[c]) begin if (c == 0) rise0.push_back(cyc); else rise1.push_back(cyc); end
        if (!out_l[c] && prev[c]) begin if (c == 0) fall0.push_back(cyc); else fall1.push_back(cyc); end
      end
      prev = out_l;
    end
    for (int i = 1; i < rise1.size(); i++) begin
      check(rise1[i] - rise1[i-1] == per, $sformatf("period %0d, expected %0d", rise1[i] - rise1[i-1], per));
    end
    for (int i = 0; i < fall1.size(); i++)
      check(fall1[i] - rise1[i] == w1 * T, "channel 1 width");
    for (int i = 0; i < fall0.size() && i < rise0.size(); i++) begin
      check(fall0[i] - rise0[i] == w0 * T, "channel 0 width");
      // channel 0 starts (m0 - m1) * T after channel 1 in every period
      check(rise0[i] - rise1[i] == (m0 - m1) * T, "channel 0 delay");
    end
    // stop the oscillation: hold the start input high and end the cycle
    kick = 1'b1;
    @(negedge clk);
    stop_n = 1'b0;
    @(negedge clk);
    stop_n = 1'b1;
    repeat (per + 10) @(negedge clk);
    check(!busy, "oscillation stopped");
    check(rise1.size() == periods + 1, "periods seen");
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stop_n = 1'b1; dly = 4;
    timebase_sel = '0; delay_set = '0; width_set = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    oscillate(1, 2, 3, 1, 6, 4, 20);
    oscillate(0, 3, 5, 2, 9, 1, 30);
    oscillate(2, 1, 1, 0, 5, 8, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
