// Self-checking testbench for saff_meta_model (window -1.7 / +3.9 ps).
// A data bit makes one edge at a chosen offset from the clock edge; offsets
// run from -6 ps to +8 ps in 0.1 ps steps, 40 times each with alternating
// edge direction. Checked per offset: at or below +1.7 ps the new value is
// always captured; above +3.9 ps the old value is always kept; inside the
// window both values occur over the 40 repeats; and the bit never comes out
// as anything but the old or the new value. An edge at exactly +3.9 ps falls
// in the same time step as the decision and may go either way. A second bit that never
// changes must always be captured as it is, and q must not change before
// the window has closed.
`timescale 1ps / 1fs
module tb_saff_meta_model;
  logic       clk = 1'b0;
  logic [1:0] d = 2'b10;
  logic [1:0] q;
  int checks = 0, failures = 0;

  saff_meta_model #(.WIDTH(2)) dut (.clk (clk), .d (d), .q (q));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    void'($urandom(5));
    #1000;
    for (int o = -60; o <= 80; o++) begin
      int n_new, n_old;
      real ofs;
      ofs = real'(o) * 0.1;
      n_new = 0;
      n_old = 0;
      for (int r = 0; r < 40; r++) begin
        logic oldv, newv;
        realtime t0;
        oldv = d[0];
        newv = !oldv;
        t0 = $realtime + 100.0;  // clock edge time
        if (ofs < 0.0) begin
          #(t0 + ofs - $realtime) d[0] = newv;
          #(t0 - $realtime) clk = 1'b1;
        end else begin
          #(t0 - $realtime) clk = 1'b1;
          if (ofs > 0.0) #(ofs);
          d[0] = newv;
        end
        #1.0;
        #(t0 + 10.0 - $realtime);
        clk = 1'b0;
        chk(q[1] == 1'b1, "steady bit captured");
        if (q[0] == newv) n_new++;
        else if (q[0] == oldv) n_old++;
        else chk(1'b0, "neither value");
        #50.0;
      end
      if (ofs <= 1.7 + 1.0e-6) chk(n_new == 40, $sformatf("offset %.1f ps: new value expected, %0d of 40", ofs, n_new));
      else if (ofs > 3.9 + 1.0e-6) chk(n_old == 40, $sformatf("offset %.1f ps: old value expected, %0d of 40", ofs, n_old));
      else if (ofs < 3.9 - 1.0e-6) chk(n_new > 0 && n_old > 0, $sformatf("offset %.1f ps: both values expected, new %0d old %0d", ofs, n_new, n_old));
    end
    // q changes only when the window has closed
    begin
      logic q_prev;
      q_prev = q[0];
      d[0] = !d[0];
      #100.0 clk = 1'b1;
      #3.8 chk(q[0] == q_prev, "q held until the window closes");
      #0.2;
      #0.1 chk(q[0] == d[0], "q updated after the window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
