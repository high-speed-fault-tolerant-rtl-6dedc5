// rr_gate: the RR 4x4 parity-preserving reversible gate.
//
// Function (combinational, no state, no clock):
//   P = B
//   Q = B'C + BD        (B selects D when 1, C when 0)
//   R = Q ^ A
//   S = C ^ D
// B passes straight through, so the gate is "one-through". The mapping is a
// bijection: B is read from P, A from Q ^ R, and C and D from Q and S once B
// is known. Output parity equals input parity, P^Q^R^S = A^B^C^D, which is
// the property the fault-detection scheme relies on: a single wrong output
// wire makes the parity of (P,Q,R,S) differ from that of (A,B,C,D), so a
// monitor comparing the two parities sees the fault. The gate itself holds
// no checker; the comparison is made outside it (see the testbenches).
//
// The multiplexer result is kept in its own node, sel, which feeds both Q
// and the XOR that makes R, so each of the four output wires can be observed
// (or faulted in simulation) on its own.
//
// The equations and the full truth table come from the gate's definition.
// Its transistor-level realisation is not modelled: this is the logic
// function only, with zero delay. Keeping the multiplexer node separate is a
// modelling choice of this design.
module rr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic sel;   // B'C + BD

  assign sel = b ? d : c;
  assign p   = b;
  assign q   = sel;
  assign r   = sel ^ a;
  assign s   = c ^ d;

endmodule
