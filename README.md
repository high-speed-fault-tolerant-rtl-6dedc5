# Parity-preserving flip-flops from the RR reversible gate

A reversible gate maps every input vector to a distinct output vector, so no
information is lost. If the gate also *preserves parity*, meaning the XOR of
its outputs always equals the XOR of its inputs, then any single wrong output
wire shows up as a parity mismatch. A circuit built only from such gates can
therefore be checked for single faults by comparing the parity of what goes in
with the parity of what comes out, with no extra checking logic in the data
path.

This RTL models a small family of storage elements built that way:

* **`rr_gate`**: the RR gate, a 4-input, 4-output reversible gate that
  preserves parity.
* **`rr_dff`**: a one-bit storage cell made of one RR gate whose output is
  fed back to one of its own inputs.
* **`rr_msff`**: a master-slave D flip-flop made of two of those cells. This
  is the top level.

The model is a zero-delay logic model. It describes what each wire carries,
not how fast or at what power. The original circuits were transistor-level
designs.

## The RR gate

Inputs `(A, B, C, D)`, outputs `(P, Q, R, S)`:

| output | function          | role                                  |
|--------|-------------------|---------------------------------------|
| P      | B                 | B passes through ("one-through" gate) |
| Q      | B'C + BD          | 2:1 multiplexer, B selects D over C   |
| R      | (B'C + BD) ⊕ A    | multiplexer output XOR A              |
| S      | C ⊕ D             |                                       |

The gate is reversible because the inputs can be recovered from the outputs:
B = P, A = Q ⊕ R, and once B is known, Q gives C (B = 0) or D (B = 1), and
S gives the remaining one. It preserves parity because
P ⊕ Q ⊕ R ⊕ S = B ⊕ Q ⊕ (Q ⊕ A) ⊕ C ⊕ D = A ⊕ B ⊕ C ⊕ D.

Truth table, `{A,B,C,D}` → `{P,Q,R,S}` in hex:

```
in : 0 1 2 3 4 5 6 7 8 9 A B C D E F
out: 0 1 7 6 8 F 9 E 2 3 5 4 A D B C
```

Inside `rr_gate` the multiplexer result is a single node, `sel`, that feeds
both Q and the XOR producing R. This matters for fault detection (see below).

## The one-gate storage cell (`rr_dff`)

Connect the RR gate like this:

| gate input | driven by                       |
|------------|---------------------------------|
| A          | constant 0                      |
| B          | CLK                             |
| C          | the gate's own R output (loop)  |
| D          | data                            |

With A = 0, R equals Q, and Q = CLK·D + CLK'·feedback. While CLK is high the
multiplexer picks D, so the output follows the data. While CLK is low it picks
C, which is the output itself, so the value goes round the R → C loop and is
held. P (= CLK) and S (= feedback ⊕ D) are garbage outputs: a reversible gate
must have them, but nothing uses them.

Although this element is often called a "D flip-flop", it is
**level-sensitive**. It is a latch that is transparent while CLK is high. Edge
triggering comes only from pairing two of them (next section).

**How the loop is modelled.** A zero-delay simulator cannot hold a value in a
combinational loop, and lint tools rightly flag one. `rr_dff` therefore
writes the feedback net `fb` as a latch that is transparent while CLK is high,
and `fb` drives the gate's C input. The latch loads D rather than R. This is
the same thing: while CLK is high the gate's R output is D whatever C is.
While CLK is low, `fb` holds, and Q and R recirculate it exactly as the loop
would. Synthesis gives one latch bit per cell. That latch is the storage of
the design, not a coding slip.

There is no reset, in the cell or in the flip-flop. The stored value is
undefined until CLK has been high once.

## Master-slave pairing (`rr_msff`)

Two cells in series:

```
          +--------- master ---------+        +---------- slave ----------+
 d ------>| D                        |   +--->| D                         |
 clk ---->| B (CLK)          Q ------+---+    | B (CLK') <---- ~clk       |
     0 -->| A                R --+   |        | A <-- 0          R --+    |
          | C <------------------+   |        | C <------------------+    |
          +--------------------------+        |                  Q -------+--> q
                                              +---------------------------+
```

* While CLK is high, the master is transparent and follows `d`, and the slave
  holds.
* While CLK is low, the master holds the value `d` had at the falling edge,
  and the slave passes that value to `q`.

The result is a **negative-edge-triggered D flip-flop**. `q` changes only at a
falling edge of CLK, and takes the value `d` had just before that edge. There
is no other latency. CLK' comes from an inverter on the clock input. The
inverter is not a reversible gate and is not covered by the parity scheme.
The design counts two RR gates, and the inverter is extra.

Ports of `rr_msff`:

| port     | dir | width | meaning                                          |
|----------|-----|-------|--------------------------------------------------|
| `clk`    | in  | 1     | clock; `q` updates at its falling edge           |
| `d`      | in  | 1     | data                                             |
| `q`      | out | 1     | flip-flop output (the slave gate's Q)            |
| `clk_n`  | out | 1     | CLK', the slave gate's B input                   |
| `m_out`  | out | `rr_out_t` | master gate outputs `{p,q,r,s}`             |
| `sl_out` | out | `rr_out_t` | slave gate outputs `{p,q,r,s}`              |
| `m_fb`   | out | 1     | master feedback net (master gate input C)        |
| `s_fb`   | out | 1     | slave feedback net (slave gate input C)          |

All gate outputs and both feedback nets are brought out so that a parity
monitor can be attached outside the flip-flop. `rr_out_t` and `rr_in_t` are
packed structs in `rr_pkg`. That package also has `rr_eval()`, a reference
model of the gate, and `vec_parity()`.

## Detecting faults by parity

For each gate, a monitor compares

* master: `^{1'b0, clk, m_fb, d}` against `^m_out`
* slave: `^{1'b0, clk_n, s_fb, m_out.q}` against `^sl_out`

A difference means one of that gate's output wires is wrong. The RTL itself
contains no checker: where the comparison is made, and what is done about a
mismatch, is left to the design that uses the flip-flop.
`tb/tb_rr_fault_detect.sv` builds such a monitor. It checks these points:

* A stuck-at-0 or stuck-at-1 fault on any of the eight gate output wires is
  flagged, by the gate that holds it, in exactly the cycles where the stuck
  value differs from the correct one.
* The other gate stays quiet. A stuck master Q reaches the slave as ordinary
  (wrong) data, so the slave's parity still holds. The fault is therefore
  located, not only detected.

What parity cannot see:

* A fault on the internal multiplexer node `sel` flips Q and R together.
  Parity is unchanged, so this fault goes undetected.
* Parity cannot see a fault on the CLK' inverter or on the storage latch
  itself. The cell's parity is taken around its stored value, so a corrupted
  stored bit looks like valid data.

Parity detects single faults on gate outputs. It does not correct anything.

## Where this model departs from the circuit

* Zero delay and no power model. The circuit-level figures reported for these
  cells (about 0.82 ns and 1.2 mW for the one-gate cell, about 9.8 ns and
  2.4 mW for the master-slave pair) have no counterpart here.
* The R → C loop is replaced by an explicit latch, as explained above.
* The CLK' inverter, the absence of a reset, the port lists and the `sel`
  node are choices of this model.
* The gates are not shared across cells. Each cell instantiates its own
  `rr_gate`.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops
itself with a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rr_pkg.sv tb/tb_rr_msff.sv \
          --top-module tb_rr_msff -Mdir obj_msff -o sim
obj_msff/sim
```

Replace `tb_rr_msff` with any of the following:

| testbench             | what it checks                                                      |
|-----------------------|---------------------------------------------------------------------|
| `tb_rr_gate`          | all 16 input vectors against the truth table, parity, bijectivity, `rr_eval` |
| `tb_rr_dff`           | one cell against a reference latch: transparent and hold phases, P, R, S, parity |
| `tb_rr_msff`          | flip-flop against an ideal negative-edge D flip-flop over 2000 clock periods; `q` may move only at a falling edge; D changes in both phases are seen to be blocked |
| `tb_rr_waveform`      | one cell and one flip-flop side by side, with a hand-written slow data pattern and hand-written expected outputs |
| `tb_rr_fault_detect`  | stuck-at faults on all eight gate outputs, detected by a parity monitor |

The clock in each testbench is driven in unit time steps. Data never changes
in the same step as a clock edge, because a zero-delay model has no setup
time to decide such a race.

## Files

```
rtl/rr_pkg.sv     types (rr_in_t, rr_out_t), reference gate model, parity function
rtl/rr_gate.sv    the RR gate
rtl/rr_dff.sv     one-gate storage cell (transparent-high latch)
rtl/rr_msff.sv    master-slave flip-flop, top level
tb/tb_*.sv        self-checking testbenches listed above
```
