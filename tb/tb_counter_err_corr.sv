// Self-checking testbench for counter_err_corr.
// 1) The rows of the published sampling-case table (A/B selection) and of the
//    half-period correction table, checked directly.
// 2) A physical model: the counter steps T_D phase steps after the zero phase,
//    sample A is taken at phase step U and sample B S steps later, with
//    2*T_D < S < T_D + 16 as the published margin requires. For random begin
//    steps and intervals D of 0..1023 steps the corrected counter difference
//    must be D / 32 (the interval's coarse part).
`timescale 1ps / 1fs
module tb_counter_err_corr;
  localparam int N = 32;
  logic [4:0] ph_begin, ph_end, cb_a, cb_b, ce_a, ce_b, cnt_diff;
  logic       sel_b_begin, sel_b_end, dec;
  int checks = 0, failures = 0;

  counter_err_corr dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pb=%0d pe=%0d cb=%0d/%0d ce=%0d/%0d diff=%0d selb=%b/%b dec=%b",
               what, ph_begin, ph_end, cb_a, cb_b, ce_a, ce_b, cnt_diff, sel_b_begin,
               sel_b_end, dec);
    end
  endtask

  // number of counter steps seen at phase step x (x >= 0), modulo 32
  function automatic logic [4:0] cnt_at(longint x, int td);
    return 5'((x + N - td) / N);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // sampling-case table: oscillator phase high (20) or low (5)
    ph_end = 5'd20; ce_a = 5'd9; ce_b = 5'd9;
    ph_begin = 5'd20; cb_a = 5'd9;  cb_b = 5'd9;  #1 chk(!sel_b_begin, "case 1");
    ph_begin = 5'd20; cb_a = 5'd9;  cb_b = 5'd10; #1 chk(!sel_b_begin, "case 2");
    ph_begin = 5'd5;  cb_a = 5'd9;  cb_b = 5'd10; #1 chk(sel_b_begin, "case 3/4");
    ph_begin = 5'd5;  cb_a = 5'd10; cb_b = 5'd10; #1 chk(!sel_b_begin, "case 5");
    ph_begin = 5'd5;  cb_a = 5'd31; cb_b = 5'd0;  #1 chk(sel_b_begin, "case 3 wrap");

    // half-period table, reachable rows {begin>=16, end>=16, end>=begin}
    cb_a = 5'd0; cb_b = 5'd0; ce_a = 5'd4; ce_b = 5'd4;
    ph_begin = 5'd3;  ph_end = 5'd5;  #1 chk(dec == 1'b0, "row 001");
    ph_begin = 5'd5;  ph_end = 5'd3;  #1 chk(dec == 1'b1, "row 000");
    ph_begin = 5'd3;  ph_end = 5'd20; #1 chk(dec == 1'b0, "row 011");
    ph_begin = 5'd20; ph_end = 5'd3;  #1 chk(dec == 1'b1, "row 100");
    ph_begin = 5'd17; ph_end = 5'd20; #1 chk(dec == 1'b0, "row 111");
    ph_begin = 5'd20; ph_end = 5'd17; #1 chk(dec == 1'b1, "row 110");
    chk(cnt_diff == 5'd3, "decremented difference");

    // physical model
    for (int i = 0; i < 40000; i++) begin
      int td, s, d;
      longint ub, ue;
      td = $urandom_range(1, 5);
      s  = $urandom_range(2 * td + 1, td + 15);
      ub = longint'($urandom_range(0, 4095));
      d  = (i < 1024) ? i : $urandom_range(0, 1023);
      ue = ub + d;
      ph_begin = 5'(ub % N);
      ph_end   = 5'(ue % N);
      cb_a = cnt_at(ub, td);
      cb_b = cnt_at(ub + s, td);
      ce_a = cnt_at(ue, td);
      ce_b = cnt_at(ue + s, td);
      #1 chk(cnt_diff == 5'(d / N), "physical model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
