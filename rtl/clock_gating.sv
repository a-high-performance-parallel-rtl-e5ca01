// clock_gating: integrated clock gating (ICG) cell.
//
// The two enables are ORed, the result is held in a level-sensitive latch
// that is transparent while clk is low, and the latch output is ANDed with
// clk to form the gated clock:
//   enable_in    = enable | scan_enable
//   enable_latch = enable_in, sampled while clk == 0, held while clk == 1
//   gclk         = clk & enable_latch
// Because the latch is closed for the whole high phase of clk, an enable that
// changes or glitches after a rising edge of clk cannot shorten or split a
// gclk pulse: gclk is either a full copy of a clk pulse or stays low for the
// whole cycle. An enable must settle before the next rising edge of clk to
// pass or stop that edge.
//
// Interface: clk (free-running clock), enable (functional enable),
// scan_enable (test enable that forces the clock on), gclk (gated clock).
// Timing: a clk pulse appears on gclk when enable|scan_enable was high at the
// rising edge that starts the pulse.
//
// The OR gate, the latch and the AND gate follow the published schematic;
// the latch is intended, it is the storage element of the cell, so the latch
// warning a lint tool gives for enable_latch stands.
module clock_gating (
  input  logic clk,
  input  logic enable,
  input  logic scan_enable,
  output logic gclk
);
  logic enable_in;
  logic enable_latch;

  always_comb enable_in = enable | scan_enable;

  always_latch begin
    if (!clk) enable_latch = enable_in;
  end

  always_comb gclk = clk & enable_latch;
endmodule
