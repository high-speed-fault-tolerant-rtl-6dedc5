// tb_rr_msff: end-to-end self-checking test of the master-slave flip-flop.
//
// The clock is driven in steps of one time unit, HALF steps per phase. The
// data input toggles at random steps inside either phase, never in the same
// step as a clock edge. The reference is an ideal negative-edge D flip-flop:
// at each falling edge it takes the value D had just before the edge. After
// every step the test checks
//   Q == reference (from the first falling edge that follows a high phase),
//   master: Q follows D while CLK is high and holds while CLK is low,
//   slave P == CLK', master P == CLK, R == Q in both gates,
//   S == feedback ^ D-input in both gates,
//   parity of each gate's inputs equals parity of its outputs.
// Timing: Q may change only in the step of a falling edge; the test checks
// that Q is unchanged in every other step and counts edges where Q moved.
// Counted behaviours (each must occur at least once): capture (Q changed at
// a falling edge), blocked (D changed while CLK high but Q stayed),
// held (D changed while CLK low but Q stayed). A watchdog ends a hung run.
module tb_rr_msff;
  import rr_pkg::*;

  localparam int HALF   = 4;     // steps per clock phase
  localparam int CYCLES = 2000;  // clock periods simulated

  logic    clk, d, q, clk_n, m_fb, s_fb;
  rr_out_t m_out, sl_out;
  logic    ref_q, ref_m, q_prev;
  bit      ref_valid, m_valid;
  int checks = 0;
  int failures = 0;
  int n_capture = 0;
  int n_blocked = 0;
  int n_held = 0;

  rr_msff dut (
    .clk(clk), .d(d), .q(q), .clk_n(clk_n),
    .m_out(m_out), .sl_out(sl_out), .m_fb(m_fb), .s_fb(s_fb)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t: clk=%b d=%b q=%b ref=%b m=%b/%b",
               what, $time, clk, d, q, ref_q, m_out, sl_out);
    end
  endtask

  // One step. edge_fall marks the step in which CLK has just gone low.
  task automatic step(bit may_change, bit edge_fall);
    logic d_old;
    d_old = d;
    if (may_change && ($urandom_range(0, 2) == 0)) d = ~d;
    if (clk) begin
      ref_m = d;
      m_valid = 1'b1;
    end
    if (edge_fall && m_valid) begin
      ref_q = ref_m;
      ref_valid = 1'b1;
    end
    q_prev = q;
    #1;
    check(m_out.p == clk, "master P == CLK");
    check(sl_out.p == !clk && clk_n == !clk, "slave P == CLK'");
    check(m_out.r == m_out.q && sl_out.r == sl_out.q, "R == Q");
    check(m_out.s == (m_fb ^ d), "master S");
    check(sl_out.s == (s_fb ^ m_out.q), "slave S");
    check((^m_out) == (^{1'b0, clk, m_fb, d}), "master parity");
    check((^sl_out) == (^{1'b0, clk_n, s_fb, m_out.q}), "slave parity");
    if (m_valid) check(m_out.q == ref_m, "master Q");
    if (ref_valid) begin
      check(q == ref_q, "Q");
      if (!edge_fall) check(q == q_prev, "Q stable between falling edges");
      if (edge_fall && q != q_prev) n_capture++;
      if (!edge_fall && d != d_old && q == q_prev) begin
        if (clk) n_blocked++;
        else     n_held++;
      end
    end
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
    m_valid = 1'b0;
    ref_q = 1'b0;
    ref_m = 1'b0;
    clk = 1'b0;
    d = 1'b0;
    #1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      clk = 1'b1;
      step(1'b0, 1'b0);
      for (int i = 1; i < HALF; i++) step(1'b1, 1'b0);
      clk = 1'b0;
      step(1'b0, 1'b1);
      for (int i = 1; i < HALF; i++) step(1'b1, 1'b0);
    end
    $display("captures=%0d blocked=%0d held=%0d", n_capture, n_blocked, n_held);
    check(n_capture > 0, "capture at falling edge exercised");
    check(n_blocked > 0, "D change during high phase exercised");
    check(n_held > 0, "D change during low phase exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
