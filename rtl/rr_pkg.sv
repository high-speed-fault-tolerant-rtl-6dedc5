// rr_pkg: types and helpers shared by the RR-gate storage cells.
//
// The RR gate is a 4-input, 4-output reversible gate. Its inputs are the
// vector (A, B, C, D) and its outputs the vector (P, Q, R, S). Fault
// detection in this design family rests on one property: the gate preserves
// parity, so A^B^C^D == P^Q^R^S for every input. A single stuck or flipped
// wire anywhere in a network of such gates shows up as a parity mismatch
// between the network's primary inputs and its primary outputs.
//
// The structs name the wires as the gate's symbol does. vec_parity() is the
// reduction XOR used by the testbenches as a parity monitor.
package rr_pkg;

  // Input vector of one RR gate, MSB first in the order A, B, C, D.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } rr_in_t;

  // Output vector of one RR gate, MSB first in the order P, Q, R, S.
  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic s;
  } rr_out_t;

  // Reference model of the gate, written from its output equations:
  // P = B, Q = B'C + BD, R = Q ^ A, S = C ^ D.
  function automatic rr_out_t rr_eval(rr_in_t i);
    rr_out_t o;
    o.p = i.b;
    o.q = (!i.b && i.c) || (i.b && i.d);
    o.r = o.q ^ i.a;
    o.s = i.c ^ i.d;
    return o;
  endfunction

  // Parity (odd = 1) of a four-wire vector.
  function automatic logic vec_parity(logic [3:0] v);
    return ^v;
  endfunction

endpackage
