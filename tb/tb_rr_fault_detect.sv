// tb_rr_fault_detect: shows that parity comparison detects a single stuck
// output wire in either RR gate of the master-slave flip-flop.
//
// Two copies of the flip-flop run from the same clock and data: a golden
// copy and a copy under test. A parity monitor on the copy under test
// compares, for each gate, the parity of its inputs (0, B, C, D) with the
// parity of its outputs (P, Q, R, S); a difference flags an error.
//
// The test first runs fault-free and requires that no error is flagged and
// that the two copies agree.
// It then, for each of the eight gate output wires (P, Q, R, S of master and
// slave) and each stuck value (0 and 1), forces that wire in the copy under
// test and runs random clock and data steps. In every step the fault is
// active when the golden value of that wire differs from the stuck value.
// The test checks that the gate holding the fault flags an error exactly
// when the fault is active, and that the other gate never does: the slave
// sees a stuck master Q as an ordinary data value, so its parity still
// holds. Each of the 16 faults must be activated at least once.
module tb_rr_fault_detect;
  import rr_pkg::*;

  localparam int HALF  = 3;    // steps per clock phase
  localparam int STEPS = 240;  // steps per fault

  logic clk, d;
  // copy under test
  logic    q, clk_n, m_fb, s_fb;
  rr_out_t m_out, sl_out;
  // golden copy
  logic    g_q, g_clk_n, g_m_fb, g_s_fb;
  rr_out_t g_m_out, g_sl_out;

  logic err_m, err_s;
  logic stuck;
  int checks = 0;
  int failures = 0;

  rr_msff dut (.clk(clk), .d(d), .q(q), .clk_n(clk_n), .m_out(m_out),
               .sl_out(sl_out), .m_fb(m_fb), .s_fb(s_fb));
  rr_msff gold (.clk(clk), .d(d), .q(g_q), .clk_n(g_clk_n), .m_out(g_m_out),
                .sl_out(g_sl_out), .m_fb(g_m_fb), .s_fb(g_s_fb));

  // Parity monitor of the copy under test.
  always_comb begin
    err_m = vec_parity(m_out)  != vec_parity({1'b0, clk,   m_fb, d});
    err_s = vec_parity(sl_out) != vec_parity({1'b0, clk_n, s_fb, m_out.q});
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t: clk=%b d=%b m=%b/%b sl=%b/%b err=%b%b", what,
               $time, clk, d, m_out, g_m_out, sl_out, g_sl_out, err_m, err_s);
    end
  endtask

  // Force output wire `site` (0..3 master P,Q,R,S; 4..7 slave P,Q,R,S).
  task automatic inject(int site);
    case (site)
      0: force dut.u_master.u_rr.p = stuck;
      1: force dut.u_master.u_rr.q = stuck;
      2: force dut.u_master.u_rr.r = stuck;
      3: force dut.u_master.u_rr.s = stuck;
      4: force dut.u_slave.u_rr.p  = stuck;
      5: force dut.u_slave.u_rr.q  = stuck;
      6: force dut.u_slave.u_rr.r  = stuck;
      default: force dut.u_slave.u_rr.s = stuck;
    endcase
  endtask

  task automatic clear(int site);
    case (site)
      0: release dut.u_master.u_rr.p;
      1: release dut.u_master.u_rr.q;
      2: release dut.u_master.u_rr.r;
      3: release dut.u_master.u_rr.s;
      4: release dut.u_slave.u_rr.p;
      5: release dut.u_slave.u_rr.q;
      6: release dut.u_slave.u_rr.r;
      default: release dut.u_slave.u_rr.s;
    endcase
  endtask

  // Golden value of output wire `site`.
  function automatic logic golden(int site);
    rr_out_t o;
    o = (site < 4) ? g_m_out : g_sl_out;
    case (site % 4)
      0: return o.p;
      1: return o.q;
      2: return o.r;
      default: return o.s;
    endcase
  endfunction

  // Run n steps; site < 0 means fault-free. Returns the activation count.
  task automatic run(int site, int n, output int activated);
    bit active;
    activated = 0;
    for (int i = 0; i < n; i++) begin
      if (i % HALF == 0) clk = ~clk;
      else if ($urandom_range(0, 1) == 1) d = ~d;
      #1;
      if (site < 0) begin
        check(!err_m && !err_s, "no error without a fault");
        // Once both copies have passed a full clock period they agree.
        if (i >= 4 * HALF)
          check({q, clk_n, m_fb, s_fb, m_out, sl_out} ==
                {g_q, g_clk_n, g_m_fb, g_s_fb, g_m_out, g_sl_out},
                "copies agree without a fault");
      end else begin
        active = golden(site) != stuck;
        if (active) activated++;
        if (site < 4) begin
          check(err_m == active, "master flags exactly the active fault");
          check(!err_s, "slave quiet for a master fault");
        end else begin
          check(err_s == active, "slave flags exactly the active fault");
          check(!err_m, "master quiet for a slave fault");
        end
      end
    end
  endtask

  initial begin
    #(STEPS * 20);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int act;
    int detected_faults;
    clk = 1'b0;
    d = 1'b0;
    stuck = 1'b0;
    detected_faults = 0;
    // Bring both copies to a defined state, then run fault-free.
    run(-1, STEPS, act);
    for (int site = 0; site < 8; site++) begin
      for (int sv = 0; sv < 2; sv++) begin
        stuck = sv[0];
        inject(site);
        run(site, STEPS, act);
        clear(site);
        #1;
        check(act > 0, "fault activated");
        if (act > 0) detected_faults++;
      end
    end
    $display("faults activated and detected: %0d of 16", detected_faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
