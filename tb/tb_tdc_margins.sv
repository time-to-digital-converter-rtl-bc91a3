// Counter-sampling margin sweep. The counter clock tap (ctrl) is stepped
// through all 32 taps; tap j rises 11*j mod 32 phase steps after tap 0, so
// the counter delay T_D after the oscillator's zero phase takes every value
// from 0 to 31 steps (0 to 106 ps at 9.124 GHz). For each tap, 500 random
// intervals (random start offset, random length up to 3.07 ns) are
// converted and compared with the oscillator steps between start and stop.
// The correction rule needs the delayed sample B to see the settled count
// whenever sample A was taken inside the window [0, T_D) after the zero
// phase, i.e. T_D < tau_C (39.8 ps), and T_D below half an oscillator period.
// The published margin 2*max(T_G, T_D) < tau_C < T_D + T_osc/2 is stricter,
// because it also covers the counter's glitch time T_G, which the model does
// not have. Checked:
//  - every tap with T_D < tau_C (0..11 steps) converts without error;
//  - every tap with T_D > tau_C (12..31 steps) shows errors;
//  - the taps that meet the published margin (2*T_D < tau_C, 1..5 steps)
//    are among the error-free ones.
`timescale 1ps / 1fs
module tb_tdc_margins;
  localparam int NT = 32;
  localparam int NPER = 500;
  localparam realtime TCLK = 4000.0;
  localparam realtime TMAX = 3070.0;
  localparam real LSB_PS = 1.0e6 / ((9190.0 - 3.0 * 22.0) * 32.0);  // tune 3
  localparam real TAUC = 39.8;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_0001;
  logic [9:0]  dout;

  int checks = 0, failures = 0, skipped = 0;
  longint ev = 0, ev_start[NT * NPER], ev_stop[NT * NPER];
  realtime last_step = -1.0, t_start = -1.0, t_stop = -1.0;
  bit      amb[NT * NPER];
  int      cur = -1;
  int      errs[NT];

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
    #(TCLK * (NT * NPER + 20));
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

  // stimulus; the tap changes late in a period, after that period's edges
  initial begin
    void'($urandom(11));
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < NT * NPER; n++) begin
      real dt, jit;
      if (n % NPER == 0) begin
        #(real'(n + 1) * TCLK - 30.0 - $realtime);
        ctrl = 32'h1 << (n / NPER);
      end
      jit = real'($urandom_range(20000)) * 1.0e-3;
      dt  = real'($urandom_range(1000, 990000)) * 1.0e-6 * TMAX;
      #(real'(n + 1) * TCLK + 500.0 + jit - $realtime);
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
      #(real'(n + 2) * TCLK - 60.0 - $realtime);
      start = 1'b0;
      stop  = 1'b0;
    end
  end

  // collection and margin check
  initial begin
    for (int j = 0; j < NT; j++) errs[j] = 0;
    for (int n = 0; n < NT * NPER; n++) begin
      #(real'(n + 3) * TCLK + 1.0 - $realtime);
      if (amb[n]) skipped++;
      else if (dout != 10'((ev_stop[n] - ev_start[n]) % 1024)) errs[n / NPER]++;
    end
    for (int j = 0; j < NT; j++) begin
      int  s;
      real td;
      s  = (11 * j) % NT;
      td = real'(s) * LSB_PS;
      $display("tap %2d: T_D %2d steps = %5.1f ps, published margin %s, wrong codes %0d of %0d",
               j, s, td, (s > 0 && 2.0 * td < TAUC) ? "met    " : "not met", errs[j], NPER);
      if (td < TAUC) chk(errs[j] == 0, $sformatf("tap %0d inside tau_C must be error-free", j));
      else chk(errs[j] > 0, $sformatf("tap %0d beyond tau_C should show errors", j));
      if (s > 0 && 2.0 * td < TAUC) chk(errs[j] == 0, $sformatf("tap %0d meets the published margin", j));
    end
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
