// Bank of sense-amplifier sampling flip-flops.
//
// Samples WIDTH asynchronous bits (oscillator taps or counter bits) on the
// rising edge of a start or stop signal and holds them until the next edge.
// The published cell is a sense-amplifier stage followed by a single-output
// latch; it has no reset and resolves metastability quickly. Only its logic
// function, a rising-edge D flip-flop, is described here. Its metastability
// window is covered by the separate timing model saff_meta_model, which the
// top level can use instead.
`timescale 1ps / 1fs
module saff_bank #(
  parameter int unsigned WIDTH = tdc_pkg::N_PHASES
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
