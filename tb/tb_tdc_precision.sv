// Single-shot precision workload testbench. A constant (DC) interval is
// converted 1024 times at each of eight levels spread over one LSB, the
// published test method (repeated conversions of a DC input, standard
// deviation of the codes per level). The start edge gets a random offset of
// 0..20 ps per conversion, standing in for sampling-clock and oscillator
// jitter, so the oscillator phase at start is spread over several LSBs.
// The converter itself is noiseless here, so the spread of the codes is pure
// quantization: an interval of (k + f) LSB gives code k or k+1 and a
// standard deviation of sqrt(f(1-f)) LSB.
// Checked:
//  - every code equals the oscillator steps between start and stop;
//  - each level's standard deviation is within 0.06 LSB of sqrt(f(1-f));
//  - the mean over the levels is between 0.3 and 0.6 LSB. The published
//    average for the fabricated design, which includes its own noise, is
//    close to 0.5 LSB.
`timescale 1ps / 1fs
module tb_tdc_precision;
  localparam int NLEV = 8;
  localparam int NREP = 1024;
  localparam realtime TCLK = 4000.0;
  localparam real LSB_PS = 1.0e6 / ((9190.0 - 3.0 * 22.0) * 32.0);  // tune 3

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;
  logic [9:0]  dout;

  int checks = 0, failures = 0, skipped = 0;
  longint ev = 0, ev_start[NLEV * NREP], ev_stop[NLEV * NREP];
  realtime last_step = -1.0, t_start = -1.0, t_stop = -1.0;
  bit      amb[NLEV * NREP];
  int      cur = -1;

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
    #(TCLK * (NLEV * NREP + 20));
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

  function automatic real frac_of(int lev);
    return (real'(lev) + 0.5) / real'(NLEV);
  endfunction

  // stimulus: level lev converts (300 + frac_of(lev)) LSB
  initial begin
    void'($urandom(7));
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < NLEV * NREP; n++) begin
      real dt, jit;
      dt  = (300.0 + frac_of(n / NREP)) * LSB_PS;
      jit = real'($urandom_range(20000)) * 1.0e-3;
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

  // collection and statistics
  initial begin
    real sum, sum2, sd, expect_sd, mean_sd;
    int  cnt;
    mean_sd = 0.0;
    for (int lev = 0; lev < NLEV; lev++) begin
      sum = 0.0;
      sum2 = 0.0;
      cnt = 0;
      for (int r = 0; r < NREP; r++) begin
        int n;
        n = lev * NREP + r;
        #(real'(n + 3) * TCLK + 1.0 - $realtime);
        if (amb[n]) skipped++;
        else chk(dout == 10'((ev_stop[n] - ev_start[n]) % 1024),
                 $sformatf("sample %0d code %0d expected %0d", n, dout, (ev_stop[n] - ev_start[n]) % 1024));
        sum  += real'(dout);
        sum2 += real'(dout) * real'(dout);
        cnt++;
      end
      sd = $sqrt(sum2 / real'(cnt) - (sum / real'(cnt)) ** 2);
      expect_sd = $sqrt(frac_of(lev) * (1.0 - frac_of(lev)));
      mean_sd += sd / real'(NLEV);
      $display("interval %.4f LSB: mean code %.3f, single-shot precision %.3f LSB (quantization limit %.3f)",
               300.0 + frac_of(lev), sum / real'(cnt), sd, expect_sd);
      chk(sd > expect_sd - 0.06 && sd < expect_sd + 0.06, $sformatf("level %0d precision", lev));
    end
    $display("average single-shot precision %.3f LSB", mean_sd);
    chk(mean_sd > 0.3 && mean_sd < 0.6, "average precision");
    $display("conversions not scored (edge on an oscillator step): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
