// Counter-clock phase multiplexer.
//
// Picks one of the oscillator phase taps as the clock of the gray counter.
// Moving the selection moves the counter increment relative to the zero phase
// of the oscillator (the counter path delay T_D), which is how the counter
// error correction is calibrated.
//
// Structure, as in the published schematic: every tap passes a switch enabled
// by its own select bit, a disabled branch is pulled to ground, and all
// branches meet in a wide OR gate. Written here as the OR of (phase AND ctrl).
// ctrl is expected to be one-hot; an assertion flags anything else
// (the one-hot requirement is this design's reading of "selects a single tap").
// Purely combinational, no clock.
`timescale 1ps / 1fs
module phase_mux #(
  parameter int unsigned N_PHASES = tdc_pkg::N_PHASES
) (
  input  logic [N_PHASES-1:0] phase,
  input  logic [N_PHASES-1:0] ctrl,
  output logic                clk_out
);
  always_comb clk_out = |(phase & ctrl);

  // exactly one tap may drive the counter clock
  always_comb begin
    assert final ($onehot(ctrl)) else $error("phase_mux: ctrl must be one-hot, got %h", ctrl);
  end
endmodule
