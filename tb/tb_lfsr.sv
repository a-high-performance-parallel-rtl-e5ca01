// tb_lfsr: self-checking testbench for the 4-bit XNOR LFSR.
//
// Clears the register, then compares 40 successive states against the
// 15-state sequence listed in the block's header (a fixed table, not the
// block's own feedback expression), checks that the sequence repeats with
// period 15, that 1111 never appears, and that an asynchronous clear in the
// middle of a clock period returns the register to 0000 at once.
module tb_lfsr;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [3:0] out;
  int checks = 0, failures = 0;

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000};

  lfsr dut (.clk(clk), .rst(rst), .out(out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: out=%b at %t", what, out, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(out == 4'b0000, "cleared while rst high");
    #1 rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      check(out == SEQ[i % 15], $sformatf("state %0d", i));
      check(out != 4'b1111, "lock-up state reached");
      @(posedge clk); #1;
    end
    // asynchronous clear, asserted away from any clock edge
    @(negedge clk); #2;
    check(out == SEQ[40 % 15], "state before clear");
    rst = 1'b1;
    #1 check(out == 4'b0000, "asynchronous clear takes effect without a clock edge");
    @(posedge clk); #1 check(out == 4'b0000, "held clear while rst high");
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1 check(out == 4'b0001, "first state after clear");
    @(posedge clk); #1 check(out == 4'b0011, "second state after clear");
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
