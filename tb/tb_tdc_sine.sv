// Single-tone workload testbench for tdc_top at its default parameters.
//
// Reproduces the published characterisation set-up with an ideal
// voltage-to-time converter: a sine input sampled at 250 MS/s is turned into
// start/stop intervals of up to 3.07 ns, the converter codes are collected,
// and a 512-point DFT (rectangular window, coherent sampling) gives SNDR and
// ENOB. Two tones are run, at DFT bins 11 and 251 (5.37 MHz and 122.6 MHz,
// the coherent frequencies nearest the published 5 MHz and 124 MHz). Every
// code is also checked against the number of oscillator steps between its
// start and stop edges, except when an edge falls in the same time step as an
// oscillator step. With a noiseless oscillator the published
// behavioural model reaches about 57.5 dB SNDR (9.25 bits ENOB) from a
// 9.8-bit code range; the run must land within 54 to 61 dB.
`timescale 1ps / 1fs
module tb_tdc_sine;
  localparam int NFFT = 512;
  localparam int NSKIP = 4;
  localparam realtime TCLK = 4000.0;
  localparam realtime TMAX = 3070.0;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;
  logic [9:0]  dout;

  int checks = 0, failures = 0;
  longint ev = 0;
  longint ev_start[NFFT + NSKIP], ev_stop[NFFT + NSKIP];
  real    codes[NFFT];
  int     bin;

  tdc_top dut (.*);

  // reference step count; an edge in the same time step as an oscillator
  // step may legitimately be sampled either way and is not scored
  realtime last_step = -1.0, t_start = -1.0, t_stop = -1.0;
  bit      amb[NFFT + NSKIP];
  int      cur = -1, skipped = 0;
  always @(dut.phase) begin
    ev++;
    last_step = $realtime;
    if (cur >= 0 && ($realtime == t_start || $realtime == t_stop)) amb[cur] = 1'b1;
  end

  initial forever begin
    clk = 1'b1;
    #500.0;
    clk = 1'b0;
    #(TCLK - 500.0);
  end

  initial begin
    #(TCLK * (2 * (NFFT + NSKIP + 10) + 10));
    failures++;
    $display("watchdog expired");
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one tone: drive NFFT+NSKIP conversions starting at period base
  task automatic run_tone(int m, int base);
    fork
      begin : drive
        for (int n = 0; n < NFFT + NSKIP; n++) begin
          real x, dt;
          x  = 0.5 + 0.49 * $sin(2.0 * PI * real'(m) * real'(n) / real'(NFFT));
          dt = x * TMAX;
          #(real'(base + n) * TCLK + 500.0 + 0.0013 * real'(n % 7) - $realtime);
          cur = n;
          amb[n] = 1'b0;
          t_start = $realtime;
          start = 1'b1;
          ev_start[n] = ev;
          if (last_step == $realtime) amb[n] = 1'b1;
          #(dt);
          t_stop = $realtime;
          stop = 1'b1;
          ev_stop[n] = ev;
          if (last_step == $realtime) amb[n] = 1'b1;
          #(real'(base + n + 1) * TCLK - 60.0 - $realtime);
          start = 1'b0;
          stop  = 1'b0;
        end
      end
      begin : collect
        for (int n = 0; n < NFFT + NSKIP; n++) begin
          #(real'(base + n + 2) * TCLK + 1.0 - $realtime);
          if (amb[n]) skipped++;
          else checks++;
          if (!amb[n] && dout !== 10'((ev_stop[n] - ev_start[n]) % 1024)) begin
            failures++;
            $display("FAIL tone %0d sample %0d: dout=%0d expected %0d", m, n, dout,
                     (ev_stop[n] - ev_start[n]) % 1024);
          end
          if (n >= NSKIP) codes[n - NSKIP] = real'(dout);
        end
      end
    join
  endtask

  task automatic analyse(int m, real f_mhz);
    real re, im, p, psig, ptot, mean, sndr, enob;
    mean = 0.0;
    for (int n = 0; n < NFFT; n++) mean += codes[n];
    mean /= real'(NFFT);
    psig = 0.0;
    ptot = 0.0;
    for (int k = 1; k < NFFT / 2; k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        re += (codes[n] - mean) * $cos(2.0 * PI * real'(k) * real'(n) / real'(NFFT));
        im -= (codes[n] - mean) * $sin(2.0 * PI * real'(k) * real'(n) / real'(NFFT));
      end
      p = re * re + im * im;
      if (k == m) psig = p;
      else ptot += p;
    end
    sndr = 10.0 * $log10(psig / ptot);
    enob = (sndr - 1.76) / 6.02;
    $display("tone %.2f MHz (bin %0d): SNDR %.2f dB, ENOB %.2f bits", f_mhz, m, sndr, enob);
    checks++;
    if (sndr < 54.0 || sndr > 61.0) begin
      failures++;
      $display("FAIL SNDR outside 54..61 dB");
    end
  endtask

  initial begin
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    run_tone(11, 1);
    analyse(11, 250.0 * 11.0 / 512.0);
    run_tone(251, NFFT + NSKIP + 4);
    analyse(251, 250.0 * 251.0 / 512.0);
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
