// lfsr: Fibonacci linear feedback shift register with XNOR feedback.
//
// Every rising clock edge the register shifts one place towards the MSB and
// the new LSB is the XNOR of the tapped bits:
//   out <= {out[WIDTH-2:0], ~^(out & TAPS)}
// For the default WIDTH=4, TAPS=4'b1100 this is ~(out[3] ^ out[2]). From the
// cleared state the register walks through 15 states and repeats:
//   0000 0001 0011 0111 1110 1101 1011 0110 1100 1001 0010 0101 1010 0100 1000
// (1111 is the lock-up state and is never reached from 0000).
//
// Interface: clk, rst (asynchronous, active high, clears the register to all
// zeros, like a flip-flop with asynchronous clear), out (the register state).
// Timing: one new state per rising edge of clk; out is a register output.
//
// The shift direction, the taps, the XNOR feedback and the asynchronous clear
// follow the published design; the parameterised width and tap mask are this
// implementation's generalisation (other widths need their own maximal-length
// tap mask).
module lfsr #(
  parameter int unsigned             WIDTH = lfsr_pkg::LFSR_WIDTH,
  parameter logic [WIDTH-1:0]        TAPS  = lfsr_pkg::LFSR_TAPS
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] out
);
  logic feedback;

  // XNOR of the tapped bits: the XOR reduction, inverted.
  always_comb feedback = ~(^(out & TAPS));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) out <= '0;
    else     out <= {out[WIDTH-2:0], feedback};
  end
endmodule
