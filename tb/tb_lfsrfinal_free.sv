// tb_lfsrfinal_free: testbench of the parallel LFSR array in its free-clock
// configuration (GATE_LFSR_CLOCK=0), where the four LFSRs run from clk on
// every cycle and the ICG output gclk is only brought out. Checks that every
// output word advances through the 15-state sequence on every rising clk
// edge whatever the enables are, and that gclk pulses exactly in the
// periods where enable|scan_enable was high at the rising edge.
module tb_lfsrfinal_free;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 4;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, scan_enable = 1'b0;
  logic [N-1:0][3:0] outn;
  logic gclk;
  int checks = 0, failures = 0;
  int gclk_edges = 0, expected_edges = 0, n_off = 0;
  int idx = 0;

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000};

  lfsrfinal #(.GATE_LFSR_CLOCK(1'b0)) dut (
    .clk(clk), .rst(rst), .enable(enable), .scan_enable(scan_enable),
    .outn(outn), .gclk(gclk));

  always @(posedge gclk) gclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    #3 rst = 1'b0;
    #2;
    for (int cyc = 0; cyc < 60; cyc++) begin
      #3;
      enable      = 1'($urandom_range(0, 1));
      scan_enable = 1'($urandom_range(0, 3) == 0);
      if (enable | scan_enable) expected_edges++; else n_off++;
      #2 clk = 1'b1;
      idx = (idx + 1) % 15;
      #1;
      for (int i = 0; i < N; i++)
        check(outn[i] == SEQ[idx], $sformatf("outn%0d=%b expected %b", i, outn[i], SEQ[idx]));
      #4 clk = 1'b0;
      #1;
    end
    check(n_off > 0, "gated-off periods exercised");
    check(gclk_edges == expected_edges,
          $sformatf("gclk edges %0d expected %0d", gclk_edges, expected_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
