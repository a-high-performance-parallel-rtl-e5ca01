// lfsrfinal: parallel LFSR architecture with integrated clock gating.
//
// N_LFSR identical WIDTH-bit LFSRs (four 4-bit registers by default) run side
// by side from one clock and one asynchronous reset, each driving its own
// output word outn[i]. They share a single integrated clock gating cell: the
// cell's gated clock gclk clocks all registers, so that while enable and
// scan_enable are both low no register in the array sees a clock edge and the
// array holds its state without switching. Since all registers share reset
// and clock, all outn[i] carry the same sequence (see lfsr.sv).
//
// Interface: clk, rst (asynchronous, active high), enable and scan_enable
// (clock enables, ORed inside the ICG), outn[N_LFSR] (register states), gclk
// (the gated clock, also brought out as a port as in the published schematic).
// Timing: each rising edge of gclk advances every LFSR by one state.
//
// The four LFSRs, the ICG cell and the gclk output follow the published
// design. Which clock the LFSRs use is this implementation's choice: the
// design text says the ICG's clock drives the LFSRs, which is the default
// here (GATE_LFSR_CLOCK=1); the published waveforms show the registers
// running from the free clock, which GATE_LFSR_CLOCK=0 selects. A further
// block of the published design, whose function is not given, is not part
// of this module; it would share clk and rst.
module lfsrfinal #(
  parameter int unsigned N_LFSR          = lfsr_pkg::N_PARALLEL,
  parameter int unsigned WIDTH           = lfsr_pkg::LFSR_WIDTH,
  parameter bit          GATE_LFSR_CLOCK = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        enable,
  input  logic                        scan_enable,
  output logic [N_LFSR-1:0][WIDTH-1:0] outn,
  output logic                        gclk
);
  logic lfsr_clk;

  clock_gating u_icg (
    .clk         (clk),
    .enable      (enable),
    .scan_enable (scan_enable),
    .gclk        (gclk)
  );

  if (GATE_LFSR_CLOCK) begin : g_gated
    assign lfsr_clk = gclk;
  end else begin : g_free
    assign lfsr_clk = clk;
  end

  for (genvar i = 0; i < N_LFSR; i++) begin : g_lfsr
    lfsr #(.WIDTH(WIDTH)) u_lfsr (
      .clk (lfsr_clk),
      .rst (rst),
      .out (outn[i])
    );
  end
endmodule
