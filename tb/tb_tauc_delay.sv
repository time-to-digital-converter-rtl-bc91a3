// Self-checking testbench for tauc_delay: each edge of the input must appear
// at the output 39.8 ps later (checked 0.2 ps before and after).
`timescale 1ps / 1fs
module tb_tauc_delay;
  logic in_sig = 1'b0, out_sig;
  int checks = 0, failures = 0;

  tauc_delay dut (.in_sig (in_sig), .out_sig (out_sig));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    for (int i = 0; i < 100; i++) begin
      in_sig = !in_sig;
      #39.6;
      checks++;
      if (out_sig === in_sig) begin
        failures++;
        $display("FAIL output changed early at %t", $realtime);
      end
      #0.4;
      checks++;
      if (out_sig !== in_sig) begin
        failures++;
        $display("FAIL output not changed at %t", $realtime);
      end
      #($urandom_range(50, 400));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
