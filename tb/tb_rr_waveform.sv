// tb_rr_waveform: directed test that drives the single-gate D cell and the
// master-slave flip-flop side by side from one clock and one data line.
//
// Stimulus: a free-running clock with 20-unit phases and a slow data
// pattern. D starts low, rises once during a low phase, stays high for
// several periods, falls during a high phase and rises again during the
// following low phase. The expected outputs are written out by hand for
// each phase:
//   D cell:  Q follows D whenever CLK is high and holds while CLK is low.
//   MS FF :  Q is the value D had at the most recent falling edge of CLK,
//            so it moves only at falling edges.
// The test samples both outputs in the middle and just before the end of
// every phase and at one unit after every falling edge. It also checks that
// the cells' P outputs carry CLK and CLK', and that each gate's output
// parity equals its input parity.
module tb_rr_waveform;
  import rr_pkg::*;

  localparam int PHASE = 20;

  logic clk, d;
  // single-gate D cell
  logic c_p, c_q, c_r, c_s, c_fb;
  // master-slave flip-flop
  logic    ms_q, clk_n, m_fb, s_fb;
  rr_out_t m_out, sl_out;

  int checks = 0;
  int failures = 0;

  rr_dff u_cell (.clk(clk), .d(d), .p(c_p), .q(c_q), .r(c_r), .s(c_s), .fb(c_fb));
  rr_msff u_ms (.clk(clk), .d(d), .q(ms_q), .clk_n(clk_n),
                .m_out(m_out), .sl_out(sl_out), .m_fb(m_fb), .s_fb(s_fb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t: clk=%b d=%b cell_q=%b ms_q=%b", what, $time,
               clk, d, c_q, ms_q);
    end
  endtask

  // Expected values for one phase, checked at three points in it.
  // Phase n spans [n*PHASE, (n+1)*PHASE); CLK is high in odd phases.
  task automatic phase(logic d_first, logic d_second, logic exp_cell_end,
                       logic exp_ms, bit ms_known = 1'b1);
    // first half of the phase
    d = d_first;
    #1;
    check(c_p == clk && sl_out.p == !clk && m_out.p == clk, "P outputs");
    if (ms_known) check(ms_q == exp_ms, "MS Q after edge");
    #(PHASE / 2 - 1);
    // second half of the phase
    d = d_second;
    #(PHASE / 2 - 1);
    check(c_q == exp_cell_end, "cell Q at end of phase");
    if (ms_known) check(ms_q == exp_ms, "MS Q at end of phase");
    check((^{c_p, c_q, c_r, c_s}) == (^{1'b0, clk, c_fb, d}), "cell parity");
    check((^m_out) == (^{1'b0, clk, m_fb, d}), "master parity");
    check((^sl_out) == (^{1'b0, clk_n, s_fb, m_out.q}), "slave parity");
    #1;
    clk = ~clk;
  endtask

  initial begin
    #(PHASE * 40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    d = 1'b0;
    #PHASE;
    clk = 1'b1;
    //     D 1st half  D 2nd half  cell Q end  MS Q
    phase(1'b0,       1'b0,       1'b0,       1'b0, 1'b0);  // high: load 0, MS Q not yet defined
    phase(1'b0,       1'b1,       1'b0,       1'b0);  // low : D rises, cell holds 0, MS Q = 0
    phase(1'b1,       1'b1,       1'b1,       1'b0);  // high: cell follows 1, MS Q still 0
    phase(1'b1,       1'b1,       1'b1,       1'b1);  // low : MS Q takes 1 at the fall
    phase(1'b1,       1'b1,       1'b1,       1'b1);  // high
    phase(1'b1,       1'b1,       1'b1,       1'b1);  // low
    phase(1'b1,       1'b0,       1'b0,       1'b1);  // high: D falls mid-phase, cell follows, MS Q still 1
    phase(1'b0,       1'b1,       1'b0,       1'b0);  // low : MS Q takes 0; D rises, cell holds 0
    phase(1'b1,       1'b1,       1'b1,       1'b0);  // high: cell follows 1
    phase(1'b1,       1'b1,       1'b1,       1'b1);  // low : MS Q takes 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
