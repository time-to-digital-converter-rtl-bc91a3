// Behavioural model: sense-amplifier sampling flip-flops with a
// metastability window.
//
// Not synthesizable logic but a timing model of the published flip-flop
// characterisation, used in place of saff_bank when the top level enables
// it. Relative to the rising clock edge at time t, a data edge
//   - at or before t + (-T_SETUP_PS) is captured (the cell's setup time is
//     negative: data may arrive slightly after the clock edge);
//   - after t + T_HOLD_PS is not seen, the old value is kept;
//   - in between falls in the metastability window; the cell resolves it
//     quickly but to either value, modelled as a random choice.
// The published values are t_setup = -1.7 ps and t_hold = 3.9 ps, a 2.2 ps
// window. An edge in the same time step as the end of the window may be
// taken either way. The output changes T_HOLD_PS after the clock edge, when the
// decision is known; the clock-to-q delay itself is otherwise not modelled.
// Data may change at most once per bit inside one window, which holds for
// the oscillator taps and counter bits (they change every 54 ps or slower).
// Interface: clk, d[WIDTH], q[WIDTH]; edges of clk at least T_HOLD_PS apart.
`timescale 1ps / 1fs
module saff_meta_model #(
  parameter int unsigned WIDTH      = tdc_pkg::N_PHASES,
  parameter realtime     T_SETUP_PS = -1.7,
  parameter realtime     T_HOLD_PS  = 3.9
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic    b, b_old, qb;
    realtime t_chg;

    assign b    = d[i];
    assign q[i] = qb;

    initial t_chg = -1.0e9;

    always @(posedge b or negedge b) begin
      t_chg <= $realtime;
      b_old <= !b;
    end

    always @(posedge clk) begin
      realtime tc;
      logic    v;
      tc = $realtime;
      #(T_HOLD_PS);
      v = b;
      // an edge seen exactly at the end of the window counts as too late
      if (t_chg >= tc + T_HOLD_PS) v = b_old;
      else if (t_chg > tc - T_SETUP_PS) v = $urandom_range(1) != 0 ? b : b_old;
      qb <= v;
    end
  end
endmodule
