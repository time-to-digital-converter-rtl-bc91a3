// Parallel carry-propagation logic of the gray counter.
//
// A reflected gray counter with a parity bit toggles bit 0 when the parity is
// even, and otherwise the bit just above the lowest set bit (the top bit when
// all lower bits below it are clear). Each toggle enable is computed in
// parallel from the parity and the current state, so there is no ripple:
//   T0 = ~parity
//   Tk = parity & Q[k-1] & ~Q[k-2] & ... & ~Q[0]     (k = 1 .. CNT_BITS-2)
//   T(n-1) = parity & ~Q[n-3] & ... & ~Q[0]
// These are the complements of the pull-down networks of the published
// pseudo-NMOS gates. The clocked pseudo-NMOS gate drives NOT(pull-down) while
// the clock is low and holds it while high, so at the rising edge the toggle
// flip-flops see exactly the values above, computed from the state before the
// edge; that is how this synchronous description treats it.
// Combinational.
`timescale 1ps / 1fs
module gray_carry_logic #(
  parameter int unsigned CNT_BITS = tdc_pkg::CNT_BITS
) (
  input  logic                parity,
  input  logic [CNT_BITS-1:0] q,
  output logic [CNT_BITS-1:0] t
);
  // pull-down network inputs (pdn); a gate's output is the complement
  logic [CNT_BITS-1:0] pdn;

  always_comb begin
    pdn[0] = parity;
    for (int k = 1; k < CNT_BITS; k++) begin
      pdn[k] = !parity;
      for (int j = 0; j < k - 1; j++) pdn[k] |= q[j];
      if (k < CNT_BITS - 1) pdn[k] |= !q[k-1];
    end
    t = ~pdn;
  end
endmodule
