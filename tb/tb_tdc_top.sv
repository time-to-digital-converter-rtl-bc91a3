// End-to-end testbench of tdc_top at its default parameters.
//
// Acts as an ideal voltage-to-time converter: clk runs at 250 MHz with a
// 0.5 ns high (sampling) phase; in every period start rises when the sampling
// phase ends (plus a random offset of a few fs so that the edges fall at all
// positions relative to the oscillator) and stop follows after a random
// interval of up to 3.07 ns, the largest interval of the published
// simulations. The expected code is counted independently of the converter:
// the number of oscillator phase steps between the start and the stop edge,
// modulo 1024. One conversion per clock is checked, each exactly two rising
// clock edges after the edge that ends its period. A conversion whose start
// or stop edge falls in the same time step as an oscillator step is not
// scored (the sample is then legitimately either value).
//
// Along the run the tune word and the counter clock tap are changed, and the
// testbench counts how often the backend used counter sample B (at start and
// at stop), applied the half-period decrement, saw the phase difference wrap
// and saw the counter wrap; each must happen at least once.
`timescale 1ps / 1fs
module tb_tdc_top;
  localparam int NCONV = 4000;
  localparam realtime TCLK = 4000.0;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;  // tap 12: rises 4 steps after tap 0
  logic [9:0]  dout;

  int checks = 0, failures = 0, skipped = 0;
  longint ev = 0;                      // oscillator phase steps seen
  realtime last_step = -1.0;
  realtime t_start = -1.0, t_stop = -1.0;
  longint ev_start[NCONV], ev_stop[NCONV];
  bit     amb[NCONV];
  int     cur = -1;
  int n_selb_begin = 0, n_selb_end = 0, n_dec = 0, n_phwrap = 0, n_cwrap = 0;
  int n_tune_seg[2] = '{0, 0};
  int n_tap_seg[3]  = '{0, 0, 0};
  int seg_tune = 0, seg_tap = 0;
  int seg_tune_of[NCONV], seg_tap_of[NCONV];

  tdc_top dut (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .stop  (stop),
    .tune  (tune),
    .ctrl  (ctrl),
    .dout  (dout)
  );

  // independent reference: count oscillator steps
  always @(dut.phase) begin
    ev++;
    last_step = $realtime;
    if (cur >= 0 && ($realtime == t_start || $realtime == t_stop)) amb[cur] = 1'b1;
  end

  // clock: high for the 0.5 ns sampling phase
  initial forever begin
    clk = 1'b1;
    #500.0;
    clk = 1'b0;
    #(TCLK - 500.0);
  end

  // mechanism coverage, sampled before each edge registers the code
  always @(posedge clk) if (rst_n) begin
    n_selb_begin += int'(dut.u_backend.sel_b_begin);
    n_selb_end   += int'(dut.u_backend.sel_b_end);
    n_dec        += int'(dut.u_backend.dec);
    if (dut.u_backend.th_end < dut.u_backend.th_begin) n_phwrap++;
    if (dut.u_backend.u_corr.c_end < dut.u_backend.u_corr.c_begin) n_cwrap++;
  end

  initial begin
    #(TCLK * (NCONV + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: one conversion per clock period
  initial begin
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < NCONV; n++) begin
      realtime jit, dt;
      // period n starts at n*TCLK
      if (real'(n) * TCLK > $realtime) #(real'(n) * TCLK - $realtime);
      if (n == 1000) begin tune = 4'd9;  seg_tune = 1; end
      if (n == 2000) begin ctrl = 32'h0000_0200; seg_tap = 1; end  // tap 9: 3 steps
      if (n == 3000) begin ctrl = 32'h0000_0040; seg_tap = 2; end  // tap 6: 2 steps
      seg_tune_of[n] = seg_tune;
      seg_tap_of[n]  = seg_tap;
      jit = real'($urandom_range(1, 3000)) / 1000.0;
      case (n % 50)
        7:       dt = 0.0;
        8:       dt = 3070.0;
        default: dt = real'($urandom_range(0, 3070000)) / 1000.0;
      endcase
      #(real'(n) * TCLK + 500.0 + jit - $realtime);
      cur = n;
      amb[n] = 1'b0;
      t_start = $realtime;
      start = 1'b1;
      ev_start[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      if (dt > 0.0) #(dt);
      t_stop = $realtime;
      stop = 1'b1;
      ev_stop[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      #(real'(n + 1) * TCLK - 60.0 - $realtime);
      start = 1'b0;
      stop  = 1'b0;
    end
  end

  // checker: conversion n is on dout after the edge at (n+2)*TCLK
  initial begin
    for (int n = 0; n < NCONV; n++) begin
      int expv;
      #(real'(n + 2) * TCLK + 1.0 - $realtime);
      if (n < 2) continue;
      if (amb[n]) begin
        skipped++;
        continue;
      end
      expv = int'((ev_stop[n] - ev_start[n]) % 1024);
      checks++;
      if (dout !== 10'(expv)) begin
        failures++;
        $display("FAIL conversion %0d: dout=%0d expected %0d", n, dout, expv);
      end else begin
        n_tune_seg[seg_tune_of[n]]++;
        n_tap_seg[seg_tap_of[n]]++;
      end
    end
    checks++;
    if (n_selb_begin == 0 || n_selb_end == 0 || n_dec == 0 || n_phwrap == 0 || n_cwrap == 0 ||
        n_tune_seg[0] == 0 || n_tune_seg[1] == 0 ||
        n_tap_seg[0] == 0 || n_tap_seg[1] == 0 || n_tap_seg[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("counter sample B used: begin %0d, end %0d; half-period decrements %0d",
             n_selb_begin, n_selb_end, n_dec);
    $display("phase difference wraps %0d; counter wraps %0d; unscored conversions %0d",
             n_phwrap, n_cwrap, skipped);
    $display("correct conversions per tune segment %0d/%0d, per counter tap %0d/%0d/%0d",
             n_tune_seg[0], n_tune_seg[1], n_tap_seg[0], n_tap_seg[1], n_tap_seg[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
