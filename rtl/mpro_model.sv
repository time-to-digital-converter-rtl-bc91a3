// Behavioural model: 32-stage multipath ring oscillator (MPRO).
//
// Not synthesizable logic but a model of the analog oscillator. In the real
// circuit every node is driven by a main-path inverter and a feedback
// inverter from a node several stages away; this raises the frequency to about
// 9.1 GHz and gives 32 distinct taps spaced T_osc/32 (about 3.4 ps) apart. The
// model reproduces only what the rest of the converter sees: a free-running
// phase that advances one step every T_osc/32. At step p the tap
// (SKEW*p) mod N goes high and the tap that went high half a period earlier
// goes low, so every tap has a 50 % duty cycle and consecutive rising edges
// are SKEW taps apart (the order the backend's rearrangement expects).
//
// The 4-bit tune word models the binary-weighted load capacitors: 0 is the
// lightest load and highest frequency, 15 the lowest. Frequency is taken as
// F_MAX_MHZ - tune*F_STEP_MHZ (about 9.19 down to 8.86 GHz); linearity of the
// steps is this model's simplification. A tune change takes effect on the
// next phase step. Startup, oscillation modes, jitter and drift are not
// modelled. At time 0 the model is at phase 0: tap 0 has just risen.
`timescale 1ps / 1fs
module mpro_model #(
  parameter int unsigned N_PHASES   = tdc_pkg::N_PHASES,
  parameter int unsigned SKEW       = tdc_pkg::SKEW,
  parameter real         F_MAX_MHZ  = 9190.0,
  parameter real         F_STEP_MHZ = 22.0
) (
  input  logic [3:0]          tune,
  output logic [N_PHASES-1:0] phase
);
  int unsigned p;  // phase step counter, modulo N_PHASES

  function automatic logic [N_PHASES-1:0] taps_at(int unsigned ph);
    logic [N_PHASES-1:0] v = '0;
    // the taps that rose during the last half period are high
    for (int unsigned k = 0; k < N_PHASES / 2; k++)
      v[(SKEW * ((ph + N_PHASES - k) % N_PHASES)) % N_PHASES] = 1'b1;
    return v;
  endfunction

  // one phase step in ps for the current tune word
  function automatic realtime step_ps(logic [3:0] tw);
    return 1.0e6 / ((F_MAX_MHZ - real'(tw) * F_STEP_MHZ) * real'(N_PHASES));
  endfunction

  initial begin
    p     = 0;
    phase = taps_at(0);
    forever begin
      #(step_ps(tune));
      p     = (p + 1) % N_PHASES;
      phase = taps_at(p);
    end
  end
endmodule
