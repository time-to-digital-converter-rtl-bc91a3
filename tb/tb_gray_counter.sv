// Self-checking testbench for gray_counter: after reset the output must be the
// gray code of the number of clock edges seen (modulo 32), with exactly one
// bit changing per edge, over several wraps; a mid-run reset must clear it.
`timescale 1ps / 1fs
module tb_gray_counter;
  localparam int W = 5;
  logic         clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] q, prev;
  int checks = 0, failures = 0;
  int n;

  gray_counter #(.CNT_BITS(W)) dut (.clk (clk), .rst_n (rst_n), .q (q));

  function automatic logic [W-1:0] gray(int v);
    return W'(v) ^ (W'(v) >> 1);
  endfunction

  always #50 clk = !clk;  // 10 GHz

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #229;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %b", q); end
    @(negedge clk) rst_n = 1'b1;
    n = 0;
    prev = q;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      n++;
      #10;
      checks++;
      if (q !== gray(n)) begin
        failures++;
        $display("FAIL count %0d: q=%b expected %b", n, q, gray(n));
      end
      checks++;
      if ($countones(q ^ prev) != 1) begin
        failures++;
        $display("FAIL %0d bits changed: %b -> %b", $countones(q ^ prev), prev, q);
      end
      prev = q;
      if (i == 150) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (q !== '0) begin failures++; $display("FAIL mid-run reset %b", q); end
        @(negedge clk) rst_n = 1'b1;
        n = 0;
        prev = q;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
