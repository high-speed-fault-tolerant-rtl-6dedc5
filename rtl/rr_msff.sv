// rr_msff: master-slave D flip-flop made of two RR-gate storage cells.
//
// Structure: two rr_dff cells in series. The master cell has B = CLK and
// takes the external data on its D input. The slave cell has B = CLK', and
// its D input is the master's Q output. Each cell has A = 0 and its own
// R -> C feedback loop. CLK' is made by an inverter on the clock input.
//
// Operation: while CLK is high the master is transparent and follows D, and
// the slave holds. While CLK is low the master holds the value it had at the
// falling edge and the slave passes it to Q. The output therefore changes
// only at a falling edge of CLK, and then takes the value D had just before
// that edge: a negative-edge-triggered D flip-flop with a latency of one
// falling edge. There is no reset; Q is unknown until the first falling edge
// that follows a high phase of CLK.
//
// Interface: besides Q the module brings out every output of both gates and
// both feedback nets, so that the parity of each gate (inputs against
// outputs) can be checked from outside. Master gate inputs are
// (0, CLK, m_fb, d); slave gate inputs are (0, CLK', s_fb, m_out.q).
// The garbage outputs are m_out.p (= CLK), m_out.s, sl_out.p (= CLK') and
// sl_out.s.
//
// The two-cell structure, the CLK / CLK' assignment and the connection from
// master Q to slave D follow the published circuit. The inverter that makes
// CLK', the absence of a reset and the observability ports are choices of
// this model. The two latches inside the rr_dff cells are the storage of the
// design, so latch warnings for them are expected.
module rr_msff
  import rr_pkg::*;
(
  input  logic    clk,     // clock; Q updates at its falling edge
  input  logic    d,       // data input
  output logic    q,       // flip-flop output (slave RR output Q)
  output logic    clk_n,   // CLK' driving the slave gate's B input
  output rr_out_t m_out,   // master gate outputs P, Q, R, S
  output rr_out_t sl_out,  // slave gate outputs P, Q, R, S
  output logic    m_fb,    // master feedback net (master gate input C)
  output logic    s_fb     // slave feedback net (slave gate input C)
);

  assign clk_n = ~clk;

  rr_dff u_master (
    .clk(clk),
    .d  (d),
    .p  (m_out.p),
    .q  (m_out.q),
    .r  (m_out.r),
    .s  (m_out.s),
    .fb (m_fb)
  );

  rr_dff u_slave (
    .clk(clk_n),
    .d  (m_out.q),
    .p  (sl_out.p),
    .q  (sl_out.q),
    .r  (sl_out.r),
    .s  (sl_out.s),
    .fb (s_fb)
  );

  assign q = sl_out.q;

endmodule
