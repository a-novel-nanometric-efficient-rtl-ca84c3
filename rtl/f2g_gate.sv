// f2g_gate: 3x3 Feynman double gate (F2G), a parity preserving reversible gate.
//   P = A,  Q = A ^ B,  R = A ^ C.
// With B = C = 0 it produces three copies of A. Reversible logic forbids
// fan-out, so this is how a signal gets copied. The carry skip
// adder/subtractor uses one F2G per skip group to copy the group
// carry/borrow-in: one copy feeds the first FTFA/S cell, one feeds the skip
// Fredkin gate, and the third is a garbage output. Quantum cost 2.
// The equations are the standard F2G definition.
// Interface: single-bit inputs a, b, c; outputs p, q, r. Purely combinational.
module f2g_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end
endmodule
