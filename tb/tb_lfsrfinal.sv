// tb_lfsrfinal: end-to-end testbench of the parallel LFSR array with its
// integrated clock gating cell, at the default sizes (four 4-bit LFSRs,
// registers clocked by the gated clock).
//
// A reference model keeps the position in the 15-state sequence (a fixed
// table of states, independent of the RTL feedback) and advances it only in
// clock periods where enable|scan_enable is high at the rising edge. Every
// period the testbench checks all four output words against the model and
// counts gclk pulses. It makes each mechanism happen and counts it:
//   reset      asynchronous clear, at start and once in mid-run
//   run_en     periods clocked because of enable
//   run_scan   periods clocked because of scan_enable only
//   hold       periods with the clock gated off (state must hold)
//   glitch     enable changes during the high phase of clk
//   wrap       the sequence wrapping from 1000 back to 0000
// A mechanism that never happened counts as a failure.
module tb_lfsrfinal;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 4;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, scan_enable = 1'b0;
  logic [N-1:0][3:0] outn;
  logic gclk;
  int checks = 0, failures = 0;
  int n_reset = 0, n_run_en = 0, n_run_scan = 0, n_hold = 0, n_glitch = 0, n_wrap = 0;
  int gclk_edges = 0, expected_edges = 0;
  int idx = 0;

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000};

  lfsrfinal dut (.clk(clk), .rst(rst), .enable(enable), .scan_enable(scan_enable),
                 .outn(outn), .gclk(gclk));

  always @(posedge gclk) gclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  task automatic check_outputs(input string what);
    for (int i = 0; i < N; i++)
      check(outn[i] == SEQ[idx], $sformatf("%s: outn%0d=%b expected %b", what, i, outn[i], SEQ[idx]));
  endtask

  initial begin
    bit on;
    #1 check_outputs("cleared by reset");
    n_reset++;
    #2 rst = 1'b0;
    #2;
    for (int cyc = 0; cyc < 300; cyc++) begin
      // low phase of clk (t = 5..10 within the period): choose enables
      #3;
      case ($urandom_range(0, 3))
        0: begin enable = 1'b0; scan_enable = 1'b0; end
        1: begin enable = 1'b0; scan_enable = 1'b1; end
        default: begin enable = 1'b1; scan_enable = 1'($urandom_range(0, 1)); end
      endcase
      on = enable | scan_enable;
      #2 clk = 1'b1;
      if (on) begin
        expected_edges++;
        if (enable) n_run_en++; else n_run_scan++;
        if (idx == 14) n_wrap++;
        idx = (idx + 1) % 15;
      end else begin
        n_hold++;
      end
      #1 check_outputs(on ? "advance" : "hold");
      if ($urandom_range(0, 3) == 0) begin
        n_glitch++;
        enable = ~enable;
        #0.5 enable = ~enable;
        #0.5;
      end else begin
        #1;
      end
      // mid-run asynchronous clear, once, in the high phase
      if (cyc == 150) begin
        rst = 1'b1;
        #0.5 idx = 0;
        check_outputs("asynchronous clear mid-run");
        n_reset++;
        #0.5 rst = 1'b0;
      end else begin
        #1;
      end
      #1 check_outputs("stable in high phase");
      #1 clk = 1'b0;
      #1 check(gclk == 1'b0, "gclk low in low phase");
      #1;
    end
    check(gclk_edges == expected_edges,
          $sformatf("gclk edges %0d expected %0d", gclk_edges, expected_edges));
    check(n_reset >= 2,    "reset mechanism exercised");
    check(n_run_en > 0,    "enable-clocked periods exercised");
    check(n_run_scan > 0,  "scan_enable-clocked periods exercised");
    check(n_hold > 0,      "gated-off periods exercised");
    check(n_glitch > 0,    "high-phase enable glitches exercised");
    check(n_wrap > 0,      "sequence wrap exercised");
    $display("mechanisms: reset=%0d run_en=%0d run_scan=%0d hold=%0d glitch=%0d wrap=%0d",
             n_reset, n_run_en, n_run_scan, n_hold, n_glitch, n_wrap);
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
