// Static linearity workload testbench (histogram method). A coherently
// sampled sine (16384 conversions, 1237 cycles, so every sample phase is
// visited exactly once) sweeps the interval from 0.01 to 0.99 of the 3.07 ns
// full scale at 250 MS/s, as the published nonlinearity results were made
// from a sine rather than a slow ramp. From the cumulative code histogram C_k
// each code transition level is estimated as mid - A*cos(pi*C_k/N) (in LSB,
// with the sine's own mid and amplitude), giving DNL_k = T(k+1) - T(k) - 1
// and INL_k against an endpoint line, over the codes away from the two ends.
// The oscillator steps are uniform in the model, so both should be close to
// zero; what remains is the histogram's finite sample count and the flutter
// between neighbouring codes. Checked:
//  - every code equals the oscillator steps between start and stop;
//  - max |DNL| < 0.6 LSB and max |INL| < 0.5 LSB. The published values for
//    the fabricated design are 1.25 and 0.83 LSB.
`timescale 1ps / 1fs
module tb_tdc_linearity;
  localparam int N = 16384;
  localparam int M = 1237;
  localparam int NSKIP = 4;
  localparam int EDGE = 3;  // codes excluded at each end of the range
  localparam realtime TCLK = 4000.0;
  localparam realtime TMAX = 3070.0;
  localparam real PI = 3.14159265358979323846;
  localparam real LSB_PS = 1.0e6 / ((9190.0 - 3.0 * 22.0) * 32.0);  // tune 3

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;
  logic [9:0]  dout;

  int checks = 0, failures = 0, skipped = 0;
  longint ev = 0, ev_start[N + NSKIP], ev_stop[N + NSKIP];
  realtime last_step = -1.0, t_start = -1.0, t_stop = -1.0;
  bit      amb[N + NSKIP];
  int      cur = -1;
  int      hist[1024];

  tdc_top dut (.*);

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
    #(TCLK * (N + NSKIP + 20));
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

  function automatic real x_of(int n);
    return 0.5 + 0.49 * $sin(2.0 * PI * real'(M) * real'(n - NSKIP) / real'(N));
  endfunction

  // stimulus
  initial begin
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < N + NSKIP; n++) begin
      #(real'(n + 1) * TCLK + 500.0 + 0.0011 * real'(n % 3) - $realtime);
      cur = n;
      amb[n] = 1'b0;
      t_start = $realtime;
      start = 1'b1;
      ev_start[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      #(x_of(n) * TMAX);
      t_stop = $realtime;
      stop = 1'b1;
      ev_stop[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      #(real'(n + 2) * TCLK - 60.0 - $realtime);
      start = 1'b0;
      stop  = 1'b0;
    end
  end

  // collection and histogram analysis
  initial begin
    real mid, amp, t_lvl[1024], dnl, inl, max_dnl, max_inl, slope;
    int  cum, lo, hi;
    for (int k = 0; k < 1024; k++) hist[k] = 0;
    for (int n = 0; n < N + NSKIP; n++) begin
      #(real'(n + 3) * TCLK + 1.0 - $realtime);
      if (amb[n]) skipped++;
      else chk(dout == 10'((ev_stop[n] - ev_start[n]) % 1024),
               $sformatf("sample %0d code %0d expected %0d", n, dout, (ev_stop[n] - ev_start[n]) % 1024));
      if (n >= NSKIP) hist[dout]++;
    end

    mid = 0.5 * TMAX / LSB_PS;
    amp = 0.49 * TMAX / LSB_PS;
    lo = 1023;
    hi = 0;
    for (int k = 0; k < 1024; k++)
      if (hist[k] > 0) begin
        if (k < lo) lo = k;
        hi = k;
      end
    lo += EDGE;
    hi -= EDGE;
    // t_lvl[k]: transition between codes k-1 and k
    cum = 0;
    for (int k = 0; k < 1024; k++) begin
      t_lvl[k] = mid - amp * $cos(PI * real'(cum) / real'(N));
      cum += hist[k];
    end
    max_dnl = 0.0;
    max_inl = 0.0;
    slope = (t_lvl[hi] - t_lvl[lo]) / real'(hi - lo);
    for (int k = lo; k < hi; k++) begin
      dnl = t_lvl[k + 1] - t_lvl[k] - 1.0;
      inl = t_lvl[k] - (t_lvl[lo] + slope * real'(k - lo));
      if ((dnl < 0.0 ? -dnl : dnl) > max_dnl) max_dnl = dnl < 0.0 ? -dnl : dnl;
      if ((inl < 0.0 ? -inl : inl) > max_inl) max_inl = inl < 0.0 ? -inl : inl;
    end
    $display("codes %0d..%0d analysed; transition spacing %.4f LSB", lo, hi, slope);
    $display("max |DNL| %.3f LSB, max |INL| %.3f LSB (published 1.25 / 0.83 LSB)", max_dnl, max_inl);
    chk(max_dnl < 0.6, "DNL");
    chk(max_inl < 0.5, "INL");
    chk(slope > 0.99 && slope < 1.01, "transition spacing of one LSB");
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
