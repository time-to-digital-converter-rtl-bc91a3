// Process-corner workload testbench: the same single-tone input (DFT bin 11
// of 512, 250 MS/s, intervals up to 3.07 ns from an ideal voltage-to-time
// converter) drives three converters whose oscillators run at the published
// corner frequencies: 5.71 GHz (slow), 9.17 GHz (typical) and 13.83 GHz
// (fast). Only the oscillator frequency changes between corners; tune is 3
// and each instance's F_MAX_MHZ is set so that tune 3 gives that frequency.
// Checked for each corner:
//  - every code equals the oscillator steps between start and stop, mod 1024;
//  - the code range of a 3.07 ns full scale, log2(3.07 ns * f * 32), is
//    within 0.02 bits of the published 9.13 / 9.82 / 10.41 bits;
//  - the fast corner clips (wraps past 1023) and the others do not;
//  - after unwrapping the fast corner's codes, the SNDR is within 3 dB of
//    the published 54.63 / 57.10 / 63.13 dB.
`timescale 1ps / 1fs
module tb_tdc_corners;
  localparam int NFFT = 512;
  localparam int NSKIP = 4;
  localparam int NC = 3;
  localparam int M = 11;
  localparam realtime TCLK = 4000.0;
  localparam realtime TMAX = 3070.0;
  localparam real PI = 3.14159265358979323846;
  localparam real F_GHZ[NC]     = '{5.71, 9.17, 13.83};
  localparam real RANGE_PUB[NC] = '{9.13, 9.82, 10.41};
  localparam real SNDR_PUB[NC]  = '{54.63, 57.10, 63.13};

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;
  logic [9:0]  dout[NC];

  int checks = 0, failures = 0, skipped = 0;
  longint ev[NC] = '{0, 0, 0};
  longint ev_start[NC][NFFT + NSKIP], ev_stop[NC][NFFT + NSKIP];
  realtime last_step[NC] = '{-1.0, -1.0, -1.0};
  realtime t_start = -1.0, t_stop = -1.0;
  bit      amb[NFFT + NSKIP];
  int      cur = -1;
  real     codes[NC][NFFT];
  int      clipped[NC] = '{0, 0, 0};

  for (genvar c = 0; c < NC; c++) begin : g_corner
    tdc_top #(.F_MAX_MHZ(F_GHZ[c] * 1000.0 + 3.0 * 22.0)) dut (
      .clk (clk), .rst_n (rst_n), .start (start), .stop (stop),
      .tune (tune), .ctrl (ctrl), .dout (dout[c]));

    logic [31:0] ph;
    assign ph = dut.phase;

    always @(ph) begin
      ev[c]++;
      last_step[c] = $realtime;
      if (cur >= 0 && ($realtime == t_start || $realtime == t_stop)) amb[cur] = 1'b1;
    end
  end

  initial forever begin
    clk = 1'b1;
    #500.0;
    clk = 1'b0;
    #(TCLK - 500.0);
  end

  initial begin
    #(TCLK * (NFFT + NSKIP + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // stimulus
  initial begin
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < NFFT + NSKIP; n++) begin
      real x, dt;
      x  = 0.5 + 0.49 * $sin(2.0 * PI * real'(M) * real'(n) / real'(NFFT));
      dt = x * TMAX;
      #(real'(n + 1) * TCLK + 500.0 + 0.0017 * real'(n % 5) - $realtime);
      cur = n;
      amb[n] = 1'b0;
      t_start = $realtime;
      start = 1'b1;
      for (int c = 0; c < NC; c++) begin
        ev_start[c][n] = ev[c];
        if (last_step[c] == $realtime) amb[n] = 1'b1;
      end
      #(dt);
      t_stop = $realtime;
      stop = 1'b1;
      for (int c = 0; c < NC; c++) begin
        ev_stop[c][n] = ev[c];
        if (last_step[c] == $realtime) amb[n] = 1'b1;
      end
      #(real'(n + 2) * TCLK - 60.0 - $realtime);
      start = 1'b0;
      stop  = 1'b0;
    end
  end

  // collection, checks and analysis
  initial begin
    for (int n = 0; n < NFFT + NSKIP; n++) begin
      #(real'(n + 3) * TCLK + 1.0 - $realtime);
      for (int c = 0; c < NC; c++) begin
        longint steps;
        steps = ev_stop[c][n] - ev_start[c][n];
        if (steps > 1023) clipped[c]++;
        if (amb[n]) skipped++;
        else chk(dout[c] == 10'(steps % 1024), $sformatf("corner %0d sample %0d code %0d expected %0d",
                                                         c, n, dout[c], steps % 1024));
        // undo the wrap of an over-range code, as the published analysis did
        if (n >= NSKIP)
          codes[c][n - NSKIP] = real'(dout[c]) + 1024.0 * real'((steps - longint'(dout[c]) + 512) / 1024);
      end
    end

    for (int c = 0; c < NC; c++) begin
      real range_bits, mean, re, im, p, psig, ptot, sndr;
      range_bits = $ln(TMAX * 1.0e-3 * F_GHZ[c] * 32.0) / $ln(2.0);
      mean = 0.0;
      for (int n = 0; n < NFFT; n++) mean += codes[c][n];
      mean /= real'(NFFT);
      psig = 0.0;
      ptot = 0.0;
      for (int k = 1; k < NFFT / 2; k++) begin
        re = 0.0;
        im = 0.0;
        for (int n = 0; n < NFFT; n++) begin
          re += (codes[c][n] - mean) * $cos(2.0 * PI * real'(k) * real'(n) / real'(NFFT));
          im -= (codes[c][n] - mean) * $sin(2.0 * PI * real'(k) * real'(n) / real'(NFFT));
        end
        p = re * re + im * im;
        if (k == M) psig = p;
        else ptot += p;
      end
      sndr = 10.0 * $log10(psig / ptot);
      $display("f_osc %.2f GHz: range %.2f bits (published %.2f), SNDR %.2f dB (published %.2f), ENOB %.2f, clipped codes %0d",
               F_GHZ[c], range_bits, RANGE_PUB[c], sndr, SNDR_PUB[c], (sndr - 1.76) / 6.02, clipped[c]);
      chk(range_bits > RANGE_PUB[c] - 0.02 && range_bits < RANGE_PUB[c] + 0.02, "range");
      chk((clipped[c] > 0) == (c == NC - 1), "clipping only in the fast corner");
      chk(sndr > SNDR_PUB[c] - 3.0 && sndr < SNDR_PUB[c] + 3.0, "SNDR near the published value");
    end
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
