// Behavioural model: sample-offset delay buffer tau_C.
//
// Not synthesizable logic but a model of an analog delay line: a chain of
// three buffers (two inverters each) placed on the start and on the stop path,
// so that the second counter sample B is taken DELAY_PS after sample A. The
// published chain measures 39.8 ps, inside the window
// 2*max(T_G, T_D) < tau_C < T_D + T_osc/2 required by the counter error
// correction. Modelled as a pure transport delay of both edges. The output
// starts low, the idle level of the start and stop lines, so the first
// rising edge is always passed on whatever the power-up state.
`timescale 1ps / 1fs
module tauc_delay #(
  parameter realtime DELAY_PS = 39.8
) (
  input  logic in_sig,
  output logic out_sig
);
  initial out_sig = 1'b0;

  always @(in_sig) out_sig <= #(DELAY_PS) in_sig;
endmodule
