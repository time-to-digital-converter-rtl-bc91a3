// Digital backend of the time-to-digital converter.
//
// Inputs are the asynchronous samples taken by the sampling flip-flops at the
// start and stop edges: the 32 oscillator taps at start and at stop, and the
// gray counter at start, start+tau_C, stop and stop+tau_C (samples A and B).
// All registers run on the sampling clock clk:
//   stage 1  registers the six samples (two 32-bit, four 5-bit registers);
//   comb     T2B encodes both phases, G2B converts the four counts, the error
//            correction picks A or B per end and applies the half-period
//            correction, and the phase difference (mod 32) is formed;
//   stage 2  registers dout = {counter difference, phase difference}.
// The samples of a conversion must be stable at the first clk rising edge
// after stop; dout then holds that conversion's code from the second edge on,
// one new code per clock. dout = 32*(count_end - count_begin) +
// (phase_end - phase_begin), modulo 1024: an interval longer than 1024 phase
// steps wraps (clips) as in the published design. The register structure
// follows the published block diagram; the asynchronous active-low reset to
// zero is this design's choice.
`timescale 1ps / 1fs
module tdc_backend #(
  parameter int unsigned N_PHASES = tdc_pkg::N_PHASES,
  parameter int unsigned CNT_BITS = tdc_pkg::CNT_BITS,
  parameter int unsigned SKEW     = tdc_pkg::SKEW,
  localparam int unsigned PB      = $clog2(N_PHASES),
  localparam int unsigned OB      = CNT_BITS + PB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_PHASES-1:0] ph_begin_s,
  input  logic [N_PHASES-1:0] ph_end_s,
  input  logic [CNT_BITS-1:0] cb_a_s,
  input  logic [CNT_BITS-1:0] cb_b_s,
  input  logic [CNT_BITS-1:0] ce_a_s,
  input  logic [CNT_BITS-1:0] ce_b_s,
  output logic [OB-1:0]       dout
);
  // stage 1: input registers
  logic [N_PHASES-1:0] ph_begin_q, ph_end_q;
  logic [CNT_BITS-1:0] cb_a_q, cb_b_q, ce_a_q, ce_b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_begin_q <= '0;
      ph_end_q   <= '0;
      cb_a_q     <= '0;
      cb_b_q     <= '0;
      ce_a_q     <= '0;
      ce_b_q     <= '0;
    end else begin
      ph_begin_q <= ph_begin_s;
      ph_end_q   <= ph_end_s;
      cb_a_q     <= cb_a_s;
      cb_b_q     <= cb_b_s;
      ce_a_q     <= ce_a_s;
      ce_b_q     <= ce_b_s;
    end
  end

  // thermometer to binary
  logic [PB-1:0] th_begin, th_end;
  logic          th_begin_valid, th_end_valid;

  thermo2bin #(.N_PHASES(N_PHASES), .SKEW(SKEW)) u_t2b_begin (
    .raw (ph_begin_q), .phase (th_begin), .valid (th_begin_valid));
  thermo2bin #(.N_PHASES(N_PHASES), .SKEW(SKEW)) u_t2b_end (
    .raw (ph_end_q),   .phase (th_end),   .valid (th_end_valid));

  // gray to binary
  logic [CNT_BITS-1:0] cb_a, cb_b, ce_a, ce_b;
  gray2bin #(.WIDTH(CNT_BITS)) u_g2b_ba (.g (cb_a_q), .b (cb_a));
  gray2bin #(.WIDTH(CNT_BITS)) u_g2b_bb (.g (cb_b_q), .b (cb_b));
  gray2bin #(.WIDTH(CNT_BITS)) u_g2b_ea (.g (ce_a_q), .b (ce_a));
  gray2bin #(.WIDTH(CNT_BITS)) u_g2b_eb (.g (ce_b_q), .b (ce_b));

  // counter error correction
  logic [CNT_BITS-1:0] cnt_diff;
  logic                sel_b_begin, sel_b_end, dec;
  counter_err_corr #(.N_PHASES(N_PHASES), .CNT_BITS(CNT_BITS)) u_corr (
    .ph_begin    (th_begin),
    .ph_end      (th_end),
    .cb_a        (cb_a),
    .cb_b        (cb_b),
    .ce_a        (ce_a),
    .ce_b        (ce_b),
    .cnt_diff    (cnt_diff),
    .sel_b_begin (sel_b_begin),
    .sel_b_end   (sel_b_end),
    .dec         (dec)
  );

  // phase difference, wrapping modulo N_PHASES
  logic [PB-1:0] ph_diff;
  always_comb ph_diff = PB'(th_end - th_begin);

  // stage 2: output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= {cnt_diff, ph_diff};
  end
endmodule
