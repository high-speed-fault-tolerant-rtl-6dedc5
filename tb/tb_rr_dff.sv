// tb_rr_dff: self-checking test of the single-RR-gate D storage cell.
//
// The clock is driven by the test in steps of one time unit, each half
// period being HALF steps. The data input changes at random steps inside a
// phase, never in the same step as a clock edge. An independent reference
// keeps the expected stored bit: it follows D while CLK is high and keeps
// its value while CLK is low. After every step the test checks
//   Q == reference, R == Q (A is 0), P == CLK, S == feedback ^ D,
//   feedback == reference, and gate parity (0,CLK,fb,D) vs (P,Q,R,S).
// It counts the two behaviours of the cell, "transparent" (D changed while
// CLK high and Q followed) and "hold" (D changed while CLK low and Q did not
// move), and fails if either never occurred. A watchdog ends a hung run.
module tb_rr_dff;

  localparam int HALF   = 4;     // steps per clock phase
  localparam int CYCLES = 400;   // clock periods simulated

  logic clk, d;
  logic p, q, r, s, fb;
  logic ref_q;
  bit   ref_valid;
  int checks = 0;
  int failures = 0;
  int n_transparent = 0;
  int n_hold = 0;

  rr_dff dut (.clk(clk), .d(d), .p(p), .q(q), .r(r), .s(s), .fb(fb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t: clk=%b d=%b p=%b q=%b r=%b s=%b fb=%b ref=%b",
               what, $time, clk, d, p, q, r, s, fb, ref_q);
    end
  endtask

  // Apply one step: optionally toggle D, update the reference, then check.
  task automatic step(bit may_change);
    logic d_old;
    d_old = d;
    if (may_change && ($urandom_range(0, 2) == 0)) d = ~d;
    if (clk) begin
      ref_q = d;
      ref_valid = 1'b1;
    end
    #1;
    if (ref_valid) begin
      check(q == ref_q, "Q");
      check(r == q, "R == Q");
      check(fb == ref_q, "feedback");
      check(s == (ref_q ^ d), "S");
      if (d != d_old) begin
        if (clk && q == d) n_transparent++;
        if (!clk && q == ref_q && q != d) n_hold++;
      end
    end
    check(p == clk, "P == CLK");
    check((^{p, q, r, s}) == (^{1'b0, clk, fb, d}), "parity");
  endtask

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_valid = 1'b0;
    ref_q = 1'b0;
    clk = 1'b0;
    d = 1'b0;
    #1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      clk = 1'b1;                        // rising edge, D stable
      step(1'b0);
      for (int i = 1; i < HALF; i++) step(1'b1);
      clk = 1'b0;                        // falling edge, D stable
      step(1'b0);
      for (int i = 1; i < HALF; i++) step(1'b1);
    end
    $display("transparent events=%0d hold events=%0d", n_transparent, n_hold);
    check(n_transparent > 0, "transparent phase exercised");
    check(n_hold > 0, "hold phase exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
