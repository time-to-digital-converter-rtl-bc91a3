// System testbench with the sampling flip-flops' metastability window
// enabled (tdc_top SAFF_META = 1, published window 1.7 .. 3.9 ps after the
// clock edge). 3000 random intervals up to 3.07 ns, with a random 0..20 ps
// start offset, at the default tune and counter tap. With this window every
// flip-flop effectively samples 1.7 to 3.9 ps late, and a tap or counter bit
// changing inside the window resolves randomly. The published claim is that
// a wrongly resolved leading tap costs at most one LSB, and the gray counter
// with double sampling keeps the count correct. Checked:
//  - every code is within +-1 of the oscillator steps between start and
//    stop (so no counter error, which would be a multiple of 32);
//  - some codes do differ by one (the window has an effect);
//  - the mean error is below 0.1 LSB in magnitude (no bias, since both ends
//    of the interval see the same window).
`timescale 1ps / 1fs
module tb_tdc_meta;
  localparam int NCONV = 3000;
  localparam realtime TCLK = 4000.0;
  localparam realtime TMAX = 3070.0;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [3:0]  tune = 4'd3;
  logic [31:0] ctrl = 32'h0000_1000;
  logic [9:0]  dout;

  int checks = 0, failures = 0;
  localparam realtime T_LATE = 1.7;  // -t_setup of the published cell

  longint  ev = 0, ev_start[NCONV], ev_stop[NCONV];
  realtime last_step = -1.0;
  bit      amb[NCONV];
  int      skipped = 0;

  tdc_top #(.SAFF_META(1'b1)) dut (.*);

  always @(dut.phase) begin
    ev++;
    last_step = $realtime;
  end

  initial forever begin
    clk = 1'b1;
    #500.0;
    clk = 1'b0;
    #(TCLK - 500.0);
  end

  initial begin
    #(TCLK * (NCONV + 20));
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

  initial begin
    void'($urandom(3));
    #1.0 rst_n = 1'b0;
    #300.0 rst_n = 1'b1;
    for (int n = 0; n < NCONV; n++) begin
      real dt, jit;
      jit = real'($urandom_range(20000)) * 1.0e-3;
      dt  = real'($urandom_range(1000, 1000000)) * 1.0e-6 * TMAX;
      #(real'(n + 1) * TCLK + 500.0 + jit - $realtime);
      start = 1'b1;
      amb[n] = 1'b0;
      #(T_LATE);
      ev_start[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      #(dt - T_LATE);
      stop = 1'b1;
      #(T_LATE);
      ev_stop[n] = ev;
      if (last_step == $realtime) amb[n] = 1'b1;
      #(real'(n + 2) * TCLK - 60.0 - $realtime);
      start = 1'b0;
      stop  = 1'b0;
    end
  end

  initial begin
    int  err, n_off, hist[3];
    real sum;
    n_off = 0;
    sum = 0.0;
    hist = '{0, 0, 0};
    for (int n = 0; n < NCONV; n++) begin
      #(real'(n + 3) * TCLK + 1.0 - $realtime);
      if (amb[n]) skipped++;
      else begin
        err = (int'(dout) - int'((ev_stop[n] - ev_start[n]) % 1024) + 1024 + 512) % 1024 - 512;
        chk(err >= -1 && err <= 1, $sformatf("sample %0d code %0d, %0d steps", n, dout, ev_stop[n] - ev_start[n]));
        if (err >= -1 && err <= 1) hist[err + 1]++;
        if (err != 0) n_off++;
        sum += real'(err);
      end
    end
    $display("code - steps: -1 in %0d, 0 in %0d, +1 in %0d conversions; mean %.4f LSB",
             hist[0], hist[1], hist[2], sum / real'(NCONV));
    $display("conversions not scored (reference instant on an oscillator step): %0d", skipped);
    chk(n_off > 0, "the window changes some codes");
    chk(sum / real'(NCONV) > -0.1 && sum / real'(NCONV) < 0.1, "no bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
