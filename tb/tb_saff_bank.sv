// Self-checking testbench for saff_bank: data changing faster than the
// sampling edges; the output must equal the data present at the last rising
// edge and must not follow the data in between.
`timescale 1ps / 1fs
module tb_saff_bank;
  localparam int W = 32;
  logic         clk = 1'b0;
  logic [W-1:0] d = '0, q, captured;
  int checks = 0, failures = 0;

  saff_bank #(.WIDTH(W)) dut (.clk (clk), .d (d), .q (q));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d = W'($urandom);
      #7;
      captured = d;
      clk = 1'b1;
      #3;
      d = W'($urandom);              // changes after the edge must not pass
      #2;
      checks++;
      if (q !== captured) begin
        failures++;
        $display("FAIL q=%h expected %h", q, captured);
      end
      clk = 1'b0;
      d = ~captured;
      #4;
      checks++;
      if (q !== captured) begin
        failures++;
        $display("FAIL falling edge changed q=%h expected %h", q, captured);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
