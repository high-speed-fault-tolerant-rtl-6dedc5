// tb_rr_gate: exhaustive self-checking test of the RR 4x4 gate.
//
// All 16 input vectors (A,B,C,D) are applied. Each output vector (P,Q,R,S)
// is compared with the gate's published truth table, held here as a
// 16-entry constant array indexed by {A,B,C,D}; the array is not derived
// from the gate equations. The test also checks, for every vector, that
// output parity equals input parity (the fault-tolerance property), and
// over all 16 vectors that no output vector repeats (the gate is
// reversible). A watchdog ends the run if it hangs.
module tb_rr_gate;
  import rr_pkg::*;

  // Truth table: {P,Q,R,S} for inputs {A,B,C,D} = 0 .. 15.
  localparam logic [3:0] TT [16] = '{
    4'h0, 4'h1, 4'h7, 4'h6, 4'h8, 4'hF, 4'h9, 4'hE,
    4'h2, 4'h3, 4'h5, 4'h4, 4'hA, 4'hD, 4'hB, 4'hC
  };

  logic a, b, c, d;
  logic p, q, r, s;
  int checks = 0;
  int failures = 0;
  logic [15:0] seen;

  rr_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b out=%b%b%b%b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check({p, q, r, s} == TT[v], "truth table");
      check((^{p, q, r, s}) == (^{a, b, c, d}), "parity preserved");
      check(!seen[{p, q, r, s}], "output vector unique");
      seen[{p, q, r, s}] = 1'b1;
      // The package's reference function must agree with the table too.
      check(rr_eval(rr_in_t'({a, b, c, d})) == rr_out_t'(TT[v]), "rr_eval");
    end
    check(&seen, "all 16 output vectors reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
