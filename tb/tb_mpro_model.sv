// Self-checking testbench for the oscillator model mpro_model.
// Every phase step must raise exactly one tap, SKEW taps after the previous
// one, and lower exactly one; every tap must be high for half the taps. The
// period of tap 0 is measured for tune words 0, 3 and 15 and compared with
// 9190 - 22*tune MHz (within 0.1 ps).
`timescale 1ps / 1fs
module tb_mpro_model;
  localparam int N = 32;
  logic [3:0]   tune = 4'd0;
  logic [N-1:0] phase, prev;
  int checks = 0, failures = 0;
  int last_rise = -1;
  realtime t_rise[$];
  bit measuring = 0;

  mpro_model dut (.tune (tune), .phase (phase));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  always @(phase) begin
    logic [N-1:0] rose, fell;
    rose = phase & ~prev;
    fell = prev & ~phase;
    if ($realtime > 0) begin
      chk($countones(rose) == 1 && $countones(fell) == 1, "one tap rises, one falls");
      chk($countones(phase) == N / 2, "half the taps high");
      for (int k = 0; k < N; k++)
        if (rose[k]) begin
          if (last_rise >= 0) chk(k == (last_rise + 3) % N, "tap order");
          last_rise = k;
        end
      if (rose[0] && measuring) t_rise.push_back($realtime);
    end
    prev = phase;
  end

  task automatic measure(logic [3:0] tw);
    real f_exp, t_exp, t_meas;
    tune = tw;
    #500;
    t_rise.delete();
    measuring = 1;
    #3000;
    measuring = 0;
    t_meas = (t_rise[t_rise.size() - 1] - t_rise[0]) / real'(t_rise.size() - 1);
    f_exp  = 9190.0 - 22.0 * real'(tw);
    t_exp  = 1.0e6 / f_exp;
    chk(t_meas > t_exp - 0.1 && t_meas < t_exp + 0.1, "period");
    $display("tune %0d: period %.3f ps (expected %.3f)", tw, t_meas, t_exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    measure(4'd0);
    measure(4'd3);
    measure(4'd15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
