// Counter sampling error correction.
//
// The gray counter is sampled twice at each end of the interval: sample A at
// the edge itself and sample B a buffer delay tau_C later. The counter steps
// a short delay T_D after the oscillator's zero phase, so a sample A taken
// just after the zero phase may still show the old count. Rule (per end):
// take A, unless the oscillator phase seen at sample A is in the lower half
// period (< N/2) and B is one count above A; then B is the settled value.
// After this, the begin and end counts are consistent with the zero phase of
// the oscillator. The counter difference is then decremented by one following
// the published half-period table (begin MSB, end MSB, no-borrow of the phase
// subtraction): for every reachable input that equals "end phase < begin
// phase", so that {counter difference, phase difference} is the elapsed time.
// Reading the table's "Diff" column as the no-borrow bit of the phase
// subtraction, and "B higher than A" as B = A + 1 (mod 2^CNT_BITS), are this
// design's readings. Combinational; sel_b_* and dec are status outputs.
`timescale 1ps / 1fs
module counter_err_corr #(
  parameter int unsigned N_PHASES = tdc_pkg::N_PHASES,
  parameter int unsigned CNT_BITS = tdc_pkg::CNT_BITS,
  localparam int unsigned PB      = $clog2(N_PHASES)
) (
  input  logic [PB-1:0]       ph_begin,
  input  logic [PB-1:0]       ph_end,
  input  logic [CNT_BITS-1:0] cb_a,
  input  logic [CNT_BITS-1:0] cb_b,
  input  logic [CNT_BITS-1:0] ce_a,
  input  logic [CNT_BITS-1:0] ce_b,
  output logic [CNT_BITS-1:0] cnt_diff,
  output logic                sel_b_begin,
  output logic                sel_b_end,
  output logic                dec
);
  logic [CNT_BITS-1:0] c_begin, c_end;
  logic                no_borrow;

  always_comb begin
    // delayed double sampling: phase low and B = A + 1 -> B, else A
    sel_b_begin = !ph_begin[PB-1] && (cb_b == CNT_BITS'(cb_a + 1'b1));
    sel_b_end   = !ph_end[PB-1]   && (ce_b == CNT_BITS'(ce_a + 1'b1));
    c_begin     = sel_b_begin ? cb_b : cb_a;
    c_end       = sel_b_end   ? ce_b : ce_a;

    // half-period correction table, index {begin MSB, end MSB, no-borrow}
    no_borrow = (ph_end >= ph_begin);
    unique case ({ph_begin[PB-1], ph_end[PB-1], no_borrow})
      3'b001: dec = 1'b0;
      3'b000: dec = 1'b1;
      3'b011: dec = 1'b0;
      3'b010: dec = 1'b0;
      3'b101: dec = 1'b1;
      3'b100: dec = 1'b1;
      3'b111: dec = 1'b0;
      3'b110: dec = 1'b1;
      default: dec = 1'b0;
    endcase

    cnt_diff = CNT_BITS'(c_end - c_begin - CNT_BITS'(dec));
  end
endmodule
