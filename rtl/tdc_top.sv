// Free-running ring-oscillator time-to-digital converter (top level).
//
// Measures the interval between the rising edges of start and stop with about
// 3.4 ps resolution over 10 bits. A 32-tap multipath ring oscillator runs
// continuously; a gray counter clocked by one selectable tap counts its
// cycles. At each edge the 32 taps and the counter are sampled (the counter
// twice, at the edge and tau_C later), and the backend forms
//   dout = 32*(count_end - count_begin) + (phase_end - phase_begin)  mod 1024
// after correcting counter samples caught mid-increment.
//
// Interface and timing: clk is the sampling clock (250 MHz in the published
// design, with start rising when the 0.5 ns sampling phase ends and stop at
// most 3.5 ns later). Both edges of a conversion must fall, with their
// tau_C-delayed copies, before the next clk rising edge; dout shows the code
// from the clk rising edge after that, one code per clock. tune sets the
// oscillator frequency (0 = fastest); ctrl is the one-hot tap that clocks the
// counter and must place the count step after the zero phase (T_D > 0) with
// 2*T_D < tau_C < T_D + T_osc/2. With the defaults the tap 12 (which rises 4
// phase steps, about 14 ps, after tap 0) satisfies this.
//
// The sampling flip-flops are ideal rising-edge flip-flops by default. With
// SAFF_META set, they are replaced by a timing model of the published cell:
// a data edge between -SAFF_SETUP_PS and SAFF_HOLD_PS after the clock edge
// (1.7 to 3.9 ps) resolves randomly to the old or new value. The ideal
// default is this design's choice; it keeps every code exactly predictable.
//
// The block structure is the published one. The oscillator and the tau_C
// buffers are behavioural models of analog circuits, so this top level is a
// simulation model; everything else is synthesizable.
`timescale 1ps / 1fs
module tdc_top #(
  parameter int unsigned N_PHASES   = tdc_pkg::N_PHASES,
  parameter int unsigned CNT_BITS   = tdc_pkg::CNT_BITS,
  parameter int unsigned SKEW       = tdc_pkg::SKEW,
  parameter realtime     TAUC_PS    = 39.8,
  parameter real         F_MAX_MHZ  = 9190.0,
  parameter real         F_STEP_MHZ = 22.0,
  parameter bit          SAFF_META  = 1'b0,
  parameter realtime     SAFF_SETUP_PS = -1.7,
  parameter realtime     SAFF_HOLD_PS  = 3.9,
  localparam int unsigned OB        = CNT_BITS + $clog2(N_PHASES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                stop,
  input  logic [3:0]          tune,
  input  logic [N_PHASES-1:0] ctrl,
  output logic [OB-1:0]       dout
);
  logic [N_PHASES-1:0] phase;
  logic                cnt_clk;
  logic [CNT_BITS-1:0] count;
  logic                start_d, stop_d;

  // oscillator core
  mpro_model #(
    .N_PHASES (N_PHASES), .SKEW (SKEW),
    .F_MAX_MHZ (F_MAX_MHZ), .F_STEP_MHZ (F_STEP_MHZ)
  ) u_mpro (
    .tune  (tune),
    .phase (phase)
  );

  phase_mux #(.N_PHASES(N_PHASES)) u_mux (
    .phase   (phase),
    .ctrl    (ctrl),
    .clk_out (cnt_clk)
  );

  gray_counter #(.CNT_BITS(CNT_BITS)) u_cnt (
    .clk   (cnt_clk),
    .rst_n (rst_n),
    .q     (count)
  );

  // sample-offset buffers for the B samples
  tauc_delay #(.DELAY_PS(TAUC_PS)) u_dly_start (.in_sig (start), .out_sig (start_d));
  tauc_delay #(.DELAY_PS(TAUC_PS)) u_dly_stop  (.in_sig (stop),  .out_sig (stop_d));

  // sense-amplifier sampling flip-flops
  logic [N_PHASES-1:0] ph_begin_s, ph_end_s;
  logic [CNT_BITS-1:0] cb_a_s, cb_b_s, ce_a_s, ce_b_s;

  if (SAFF_META) begin : g_saff_meta
    saff_meta_model #(.WIDTH(N_PHASES), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_ph_begin (.clk (start),   .d (phase), .q (ph_begin_s));
    saff_meta_model #(.WIDTH(N_PHASES), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_ph_end   (.clk (stop),    .d (phase), .q (ph_end_s));
    saff_meta_model #(.WIDTH(CNT_BITS), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_cb_a     (.clk (start),   .d (count), .q (cb_a_s));
    saff_meta_model #(.WIDTH(CNT_BITS), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_cb_b     (.clk (start_d), .d (count), .q (cb_b_s));
    saff_meta_model #(.WIDTH(CNT_BITS), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_ce_a     (.clk (stop),    .d (count), .q (ce_a_s));
    saff_meta_model #(.WIDTH(CNT_BITS), .T_SETUP_PS(SAFF_SETUP_PS), .T_HOLD_PS(SAFF_HOLD_PS))
      u_saff_ce_b     (.clk (stop_d),  .d (count), .q (ce_b_s));
  end else begin : g_saff_ideal
    saff_bank #(.WIDTH(N_PHASES)) u_saff_ph_begin (.clk (start),   .d (phase), .q (ph_begin_s));
    saff_bank #(.WIDTH(N_PHASES)) u_saff_ph_end   (.clk (stop),    .d (phase), .q (ph_end_s));
    saff_bank #(.WIDTH(CNT_BITS)) u_saff_cb_a     (.clk (start),   .d (count), .q (cb_a_s));
    saff_bank #(.WIDTH(CNT_BITS)) u_saff_cb_b     (.clk (start_d), .d (count), .q (cb_b_s));
    saff_bank #(.WIDTH(CNT_BITS)) u_saff_ce_a     (.clk (stop),    .d (count), .q (ce_a_s));
    saff_bank #(.WIDTH(CNT_BITS)) u_saff_ce_b     (.clk (stop_d),  .d (count), .q (ce_b_s));
  end

  tdc_backend #(.N_PHASES(N_PHASES), .CNT_BITS(CNT_BITS), .SKEW(SKEW)) u_backend (
    .clk        (clk),
    .rst_n      (rst_n),
    .ph_begin_s (ph_begin_s),
    .ph_end_s   (ph_end_s),
    .cb_a_s     (cb_a_s),
    .cb_b_s     (cb_b_s),
    .ce_a_s     (ce_a_s),
    .ce_b_s     (ce_b_s),
    .dout       (dout)
  );
endmodule
