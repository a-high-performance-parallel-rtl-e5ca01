// lfsr_pkg: constants shared by the parallel LFSR design.
//
// LFSR_WIDTH is the length of each shift register (4 bits). LFSR_TAPS marks
// the register bits whose XOR, inverted, forms the feedback bit: bits 3 and 2,
// i.e. feedback = ~(out[3] ^ out[2]). With XNOR feedback the all-zero state is
// a valid state (the register leaves it after clear) and the all-ones state is
// the lock-up state that the sequence never reaches. The width, the tap
// positions and the XNOR form follow the published design; collecting them in
// a package is this implementation's choice.
package lfsr_pkg;
  localparam int unsigned LFSR_WIDTH = 4;
  localparam logic [LFSR_WIDTH-1:0] LFSR_TAPS = 4'b1100;
  // Number of LFSRs operated side by side in the parallel architecture.
  localparam int unsigned N_PARALLEL = 4;
endpackage
