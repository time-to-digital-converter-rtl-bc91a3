// Self-checking testbench for gray2bin: every code of the default width is
// built as b ^ (b >> 1) from a binary value and must convert back to it.
`timescale 1ps / 1fs
module tb_gray2bin;
  localparam int W = 5;
  logic [W-1:0] g, b;
  int checks = 0, failures = 0;

  gray2bin #(.WIDTH(W)) dut (.g (g), .b (b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      g = W'(v) ^ (W'(v) >> 1);
      #1;
      checks++;
      if (b !== W'(v)) begin
        failures++;
        $display("FAIL gray %b -> %b, expected %b", g, b, W'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
