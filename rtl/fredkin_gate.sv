// fredkin_gate: 3x3 Fredkin (controlled swap) reversible gate.
//
// The control line A passes straight through as P. When A is 0, B and C
// pass to Q and R unchanged. When A is 1 they are swapped:
//   P = A,  Q = A'B + AC,  R = A'C + AB.
// The gate is reversible (a bijection on three bits) and parity preserving
// (A^B^C == P^Q^R). Its quantum cost is 5.
//
// The carry skip adder/subtractor uses it as the skip multiplexer. The
// group propagate goes to A, a copy of the group carry/borrow-in goes to B
// and the rippled carry/borrow goes to C. R then carries the group
// carry/borrow-out. The gate equations are the standard Fredkin definition.
// Interface: single-bit inputs a, b, c; outputs p, q, r. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
