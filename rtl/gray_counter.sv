// High-speed gray code counter of oscillator cycles.
//
// Counts rising edges of the selected oscillator tap in reflected gray code,
// so only one output bit changes per count and an asynchronous sample taken
// mid-transition is off by at most one. Built as published: a divide-by-two
// flip-flop gives the parity of the count, the carry-propagation logic turns
// parity and state into one toggle enable per bit, and one toggle flip-flop
// per bit holds the state. All flip-flops share the clock, so the count
// changes one clock-to-q after the tap edge.
// rst_n (asynchronous, active low) clears the count and the parity; resetting
// both to zero is this design's choice.
`timescale 1ps / 1fs
module gray_counter #(
  parameter int unsigned CNT_BITS = tdc_pkg::CNT_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [CNT_BITS-1:0] q
);
  logic                parity;
  logic [CNT_BITS-1:0] t;

  // divide-by-two: parity of the number of counts
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) parity <= 1'b0;
    else        parity <= !parity;
  end

  gray_carry_logic #(.CNT_BITS(CNT_BITS)) u_carry (
    .parity (parity),
    .q      (q),
    .t      (t)
  );

  for (genvar k = 0; k < CNT_BITS; k++) begin : g_bit
    tspc_tff u_tff (
      .clk     (clk),
      .t       (t[k]),
      .reset_n (rst_n),
      .set     (1'b0),
      .q       (q[k])
    );
  end
endmodule
