// Thermometer-to-binary encoder of the sampled oscillator phase (T2B).
//
// The 32 taps of the multipath ring do not rise in index order: consecutive
// rising edges are SKEW taps apart. The encoder first rearranges the taps so
// that row m holds tap (N - SKEW*m) mod N; in that order the high taps form
// one contiguous (circular) run of ones whose lower end moves one row down per
// phase step. A 3-input majority filter over each row and its two neighbours
// removes single-row bubbles caused by edges sampled out of order. The newest
// rising edge is the row that is high while the row below it is low (a one-hot
// word); its row m gives the phase code (N - m) mod N. Only the rising edge is
// tracked, the falling edge is ignored, as in the published backend.
// The majority filter, the lowest-row priority when more than one edge is
// found, and the phase 0 / valid low result when none is found are this
// design's choices; the document only calls its bubble correction rudimentary.
// Combinational.
`timescale 1ps / 1fs
module thermo2bin #(
  parameter int unsigned N_PHASES = tdc_pkg::N_PHASES,
  parameter int unsigned SKEW     = tdc_pkg::SKEW,
  localparam int unsigned PB      = $clog2(N_PHASES)
) (
  input  logic [N_PHASES-1:0] raw,
  output logic [PB-1:0]       phase,
  output logic                valid
);
  logic [N_PHASES-1:0] rearr;   // coherent code
  logic [N_PHASES-1:0] clean;   // after bubble removal
  logic [N_PHASES-1:0] onehot;  // newest rising edge

  for (genvar m = 0; m < N_PHASES; m++) begin : g_row
    localparam int unsigned SRC = (N_PHASES - (SKEW * m) % N_PHASES) % N_PHASES;
    localparam int unsigned UP  = (m + 1) % N_PHASES;
    localparam int unsigned DN  = (m + N_PHASES - 1) % N_PHASES;
    assign rearr[m] = raw[SRC];
    assign clean[m] = (rearr[DN] & rearr[m]) | (rearr[m] & rearr[UP]) | (rearr[DN] & rearr[UP]);
  end

  for (genvar m = 0; m < N_PHASES; m++) begin : g_edge
    localparam int unsigned DN = (m + N_PHASES - 1) % N_PHASES;
    assign onehot[m] = clean[m] & ~clean[DN];
  end

  always_comb begin
    phase = '0;
    valid = 1'b0;
    for (int m = int'(N_PHASES) - 1; m >= 0; m--) begin
      if (onehot[m]) begin
        phase = PB'((N_PHASES - unsigned'(m)) % N_PHASES);
        valid = 1'b1;
      end
    end
  end
endmodule
