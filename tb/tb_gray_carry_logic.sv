// Self-checking testbench for gray_carry_logic: for every count n the toggle
// enables given (parity of n, gray(n)) must be exactly the bits that differ
// between gray(n) and gray(n+1).
`timescale 1ps / 1fs
module tb_gray_carry_logic;
  localparam int W = 5;
  logic         parity;
  logic [W-1:0] q, t;
  int checks = 0, failures = 0;

  gray_carry_logic #(.CNT_BITS(W)) dut (.parity (parity), .q (q), .t (t));

  function automatic logic [W-1:0] gray(int n);
    return W'(n) ^ (W'(n) >> 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < (1 << W); n++) begin
      q      = gray(n);
      parity = n[0];
      #1;
      checks++;
      if (t !== (gray(n) ^ gray(n + 1))) begin
        failures++;
        $display("FAIL n=%0d q=%b parity=%b t=%b expected %b", n, q, parity, t,
                 gray(n) ^ gray(n + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
