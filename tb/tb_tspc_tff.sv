// Self-checking testbench for tspc_tff: random toggle enables over many clock
// edges against a reference bit, plus asynchronous reset and set between
// clock edges.
`timescale 1ps / 1fs
module tb_tspc_tff;
  logic clk = 1'b0, t = 1'b0, reset_n = 1'b1, set = 1'b0, q;
  logic ref_q;
  int checks = 0, failures = 0;

  tspc_tff dut (.clk (clk), .t (t), .reset_n (reset_n), .set (set), .q (q));

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %t", what, q, exp, $realtime);
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
    #1 reset_n = 1'b0;
    #4 check(1'b0, "reset");
    reset_n = 1'b1;
    ref_q   = 1'b0;
    for (int i = 0; i < 400; i++) begin
      t = 1'($urandom_range(0, 1));
      #5 clk = 1'b1;
      if (t) ref_q = !ref_q;
      #1 check(ref_q, "toggle");
      #4 clk = 1'b0;
      if (i % 50 == 25) begin
        set = 1'b1;
        #1 check(1'b1, "async set");
        set = 1'b0;
        ref_q = 1'b1;
      end
      if (i % 50 == 40) begin
        reset_n = 1'b0;
        #1 check(1'b0, "async reset");
        reset_n = 1'b1;
        ref_q = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
