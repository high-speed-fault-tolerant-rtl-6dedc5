// rr_dff: one-bit D storage cell made of a single RR gate.
//
// Wiring of the gate: A = 0 (constant input), B = CLK, C = feedback, D = data.
// With A = 0 the gate gives R = Q = CLK.D + CLK'.feedback, and R is wired
// back to C. While CLK is high the cell is transparent (Q follows D); while
// CLK is low the gate selects C, so the value on the R -> C loop recirculates
// and is held. P (= CLK) and S (= C ^ D) are the gate's garbage outputs and
// are brought out so that the parity of the whole cell can be observed.
//
// The cell is level-sensitive: it behaves as a transparent-high D latch,
// which is what its output equation describes even though it is called a
// D flip-flop. An edge-triggered flip-flop is formed by two of these cells in
// master-slave fashion (rr_msff).
//
// Modelling the feedback: in the gate-level circuit the loop R -> C is the
// storage. A zero-delay model cannot close that loop without a circular
// combinational path, so the feedback net is written as a latch, fb, that is
// transparent while CLK is high and holds while CLK is low. While CLK is high
// the gate gives R = D whatever C is, so the latch loads D, which is the
// value R carries at that time. While CLK
// is low the gate recirculates fb to Q and R unchanged, exactly as the loop
// does. The latch is the storage of this cell by design, so a latch warning
// for fb is expected. There is no reset, as in the original circuit: the
// held value is unknown until CLK has been high once.
//
// Timing: zero-delay function; Q changes with D while CLK = 1 and is frozen
// from the falling edge of CLK until the next rising edge.
module rr_dff (
  input  logic clk,   // clock, RR input B
  input  logic d,     // data, RR input D
  output logic p,     // RR output P = CLK (garbage)
  output logic q,     // RR output Q = CLK.D + CLK'.feedback (stored data)
  output logic r,     // RR output R = Q ^ 0, fed back to input C
  output logic s,     // RR output S = feedback ^ D (garbage)
  output logic fb     // the feedback net driving RR input C
);

  rr_gate u_rr (
    .a(1'b0),
    .b(clk),
    .c(fb),
    .d(d),
    .p(p),
    .q(q),
    .r(r),
    .s(s)
  );

  // Storage of the R -> C feedback loop: loads what R carries while CLK = 1.
  always_latch begin
    if (clk) fb = d;
  end

endmodule
