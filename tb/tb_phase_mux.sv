// Self-checking testbench for phase_mux: for every select position and random
// tap patterns the output must equal the selected tap.
`timescale 1ps / 1fs
module tb_phase_mux;
  localparam int N = 32;
  logic [N-1:0] phase = '0;
  logic [N-1:0] ctrl  = N'(1);
  logic         clk_out;
  int checks = 0, failures = 0;

  phase_mux #(.N_PHASES(N)) dut (.phase (phase), .ctrl (ctrl), .clk_out (clk_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      ctrl = N'(1) << s;
      for (int r = 0; r < 8; r++) begin
        phase = N'($urandom);
        if (r == 0) phase = ~(N'(1) << s);   // only the selected tap low
        if (r == 1) phase = N'(1) << s;      // only the selected tap high
        #1;
        checks++;
        if (clk_out !== phase[s]) begin
          failures++;
          $display("FAIL sel %0d phase %h out %b", s, phase, clk_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
