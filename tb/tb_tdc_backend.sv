// Self-checking testbench for tdc_backend.
// The sampling flip-flop outputs are driven as a model of the front end would
// leave them: for a conversion whose start falls in phase step UB and stop in
// UE = UB + D, the tap snapshots are those of the oscillator at UB and UE and
// the counter samples are the gray counts at UB, UB+S, UE, UE+S, with the
// counter stepping T_D steps after the zero phase. One conversion is presented
// per clock; its code must appear on dout exactly two rising clock edges
// later and equal D modulo 1024 (intervals of 1024 to 1100 steps check the
// wrap of an over-range interval).
`timescale 1ps / 1fs
module tb_tdc_backend;
  localparam int N = 32;
  localparam int SKEW = 3;
  localparam int NCONV = 3000;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic [31:0] ph_begin_s = '0, ph_end_s = '0;
  logic [4:0]  cb_a_s = '0, cb_b_s = '0, ce_a_s = '0, ce_b_s = '0;
  logic [9:0]  dout;
  int checks = 0, failures = 0;
  int expd[NCONV];
  int n_wrap = 0, n_selb = 0, n_dec = 0;

  tdc_backend dut (.*);

  function automatic logic [N-1:0] snapshot(longint u);
    logic [N-1:0] v = '0;
    for (int k = 0; k < N / 2; k++) v[(SKEW * ((u - k + 4 * N) % N)) % N] = 1'b1;
    return v;
  endfunction

  function automatic logic [4:0] gray_at(longint x, int td);
    logic [4:0] b = 5'((x + N - td) / N);
    return b ^ (b >> 1);
  endfunction

  always #2000 clk = !clk;  // 250 MHz

  initial begin
    #((NCONV + 20) * 4000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // status of the correction logic, counted for coverage
  always @(posedge clk) if (rst_n) begin
    n_selb += int'(dut.sel_b_begin) + int'(dut.sel_b_end);
    n_dec  += int'(dut.dec);
  end

  initial begin
    #1 rst_n = 1'b0;
    #2999 rst_n = 1'b1;
    for (int n = 0; n < NCONV + 2; n++) begin
      @(posedge clk);
      // check the conversion presented two edges ago
      if (n >= 2) begin
        #1;
        checks++;
        if (dout !== 10'(expd[n-2])) begin
          failures++;
          $display("FAIL conversion %0d: dout=%0d expected %0d", n - 2, dout, expd[n-2] % 1024);
        end
      end
      if (n < NCONV) begin
        int td, s, d;
        longint ub, ue;
        td = $urandom_range(1, 5);
        s  = $urandom_range(2 * td + 1, td + 15);
        ub = longint'($urandom_range(0, 100000));
        d  = (n % 10 == 9) ? $urandom_range(1024, 1100) : $urandom_range(0, 1023);
        if (n % 10 == 9) n_wrap++;
        ue = ub + d;
        ph_begin_s <= snapshot(ub);
        ph_end_s   <= snapshot(ue);
        cb_a_s     <= gray_at(ub, td);
        cb_b_s     <= gray_at(ub + s, td);
        ce_a_s     <= gray_at(ue, td);
        ce_b_s     <= gray_at(ue + s, td);
        expd[n] = d % 1024;
      end
    end
    checks++;
    if (n_selb == 0 || n_dec == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage: B-sample selections %0d, decrements %0d, wraps %0d",
               n_selb, n_dec, n_wrap);
    end
    $display("B-sample selections %0d, decrements %0d, over-range %0d", n_selb, n_dec, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
