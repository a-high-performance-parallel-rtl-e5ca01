// tb_clock_gating: self-checking testbench for the integrated clock gating
// cell.
//
// clk has a 10 ns period (high from 0 to 5 ns of each period). The enables
// are changed at random, both in the low phase (where they must take effect
// at the next rising edge) and in the high phase, including short glitches
// (where they must not touch the current gclk pulse). Checks, for every
// period:
//   * just after the rising edge, gclk equals the OR of the enables as they
//     stood at that edge;
//   * in the middle of the high phase, after any glitch, gclk is unchanged;
//   * during the low phase gclk is low;
//   * the number of gclk rising edges equals the number of enabled periods.
module tb_clock_gating;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic enable = 1'b0, scan_enable = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int gclk_edges = 0, expected_edges = 0;
  int n_glitch_high = 0, n_scan_only = 0, n_func_only = 0, n_off = 0;

  clock_gating dut (.clk(clk), .enable(enable), .scan_enable(scan_enable), .gclk(gclk));

  always @(posedge gclk) gclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t (en=%b se=%b gclk=%b)", what, $time, enable, scan_enable, gclk);
    end
  endtask

  initial begin
    logic exp_on;
    // start: clk low, enables low, latch settles
    #5;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: new enables 2 ns before the rising edge
      #3;
      enable      = 1'($urandom_range(0, 1));
      scan_enable = 1'($urandom_range(0, 3) == 0);
      exp_on = enable | scan_enable;
      if (exp_on) expected_edges++;
      if (enable && !scan_enable) n_func_only++;
      if (!enable && scan_enable) n_scan_only++;
      if (!exp_on) n_off++;
      #2 clk = 1'b1;
      #1 check(gclk == exp_on, "gclk follows enable sampled at rising edge");
      // high phase: disturb the enables, sometimes with a glitch
      if ($urandom_range(0, 1) == 1) begin
        n_glitch_high++;
        enable = ~enable;
        #0.5 scan_enable = ~scan_enable;
        #0.5 enable = ~enable;
      end else begin
        #1;
      end
      #1 check(gclk == exp_on, "gclk pulse not disturbed by enable change in high phase");
      #2 clk = 1'b0;
      #1 check(gclk == 1'b0, "gclk low in low phase");
      #1;
    end
    check(gclk_edges == expected_edges, $sformatf("gclk edges %0d expected %0d", gclk_edges, expected_edges));
    check(n_glitch_high > 0 && n_scan_only > 0 && n_func_only > 0 && n_off > 0,
          "every enable case exercised");
    $display("cases: high-phase glitches=%0d scan-only=%0d func-only=%0d off=%0d",
             n_glitch_high, n_scan_only, n_func_only, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
