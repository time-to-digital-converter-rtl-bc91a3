// Self-checking testbench for thermo2bin.
// Tap snapshots are built from the oscillator's physical behaviour: at phase
// p the taps SKEW*(p-k) mod 32 that rose in the last L steps are high (L from
// 12 to 20, covering unequal duty). Each must encode to p. Single-tap bubbles
// (a high tap inside the low run, a low tap inside the high run, away from
// the edge) must not change the result. The worked example of the published
// rearrangement table (snapshot D24924B6h) must give phase 23.
`timescale 1ps / 1fs
module tb_thermo2bin;
  localparam int N = 32;
  localparam int SKEW = 3;
  logic [N-1:0] raw;
  logic [4:0]   phase;
  logic         valid;
  int checks = 0, failures = 0;

  thermo2bin #(.N_PHASES(N), .SKEW(SKEW)) dut (.raw (raw), .phase (phase), .valid (valid));

  function automatic logic [N-1:0] snapshot(int p, int len);
    logic [N-1:0] v = '0;
    for (int k = 0; k < len; k++) v[(SKEW * ((p - k + 4 * N) % N)) % N] = 1'b1;
    return v;
  endfunction

  function automatic int tap_of(int p);
    return (SKEW * ((p + 4 * N) % N)) % N;
  endfunction

  task automatic expect_phase(int p, string what);
    #1;
    checks++;
    if (phase !== 5'(p) || !valid) begin
      failures++;
      $display("FAIL %s: raw=%h phase=%0d valid=%b expected %0d", what, raw, phase, valid, p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example
    raw = 32'hD24924B6;
    expect_phase(23, "published example");

    for (int p = 0; p < N; p++) begin
      for (int len = 12; len <= 20; len++) begin
        raw = snapshot(p, len);
        expect_phase(p, "clean");
      end
      // bubble: a tap inside the high run reads low
      raw = snapshot(p, 16);
      raw[tap_of(p - 6)] = 1'b0;
      expect_phase(p, "low bubble");
      // bubble: a tap in the low run reads high
      raw = snapshot(p, 16);
      raw[tap_of(p + 7)] = 1'b1;
      expect_phase(p, "high bubble");
    end

    // no edge at all
    raw = '0;
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL valid set for all-zero input"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
