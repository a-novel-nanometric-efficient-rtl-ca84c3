// ftfas_cell: 1-bit parity preserving full adder/subtractor (FTFA/S).
//
// ctrl = 0: full adder.       {cbout, sd} = a + b + cbin
// ctrl = 1: full subtractor.  {cbout, sd} = a - b - cbin (cbout = borrow)
//
// How it works. The cell first forms the propagate signal
//   prop = (a ^ ctrl) ^ b.
// prop is 1 when the incoming carry/borrow reaches cbout unchanged.
// When prop is 0, a ^ ctrl equals b, and b itself is the carry/borrow that
// the cell generates or kills. A Fredkin gate controlled by prop therefore
// selects the carry/borrow-out:
//   cbout = prop ? cbin : b.
// This is the cell's second gate. Its pass-through line also gives the
// prop output that the carry skip unit uses. The difference bit does not
// depend on the mode: sd = a ^ b ^ cbin.
//
// What follows the source and what is this design's own choice: the cell
// combines the proposed 5x5 BBFS gate with one Fredkin gate. It has inputs
// A, B, C and Ctrl, outputs S/D, C/B and P, and Ctrl selects add or
// subtract. The BBFS gate's own equations are not available. Its part of the
// cell (forming prop and sd) is therefore written here as plain logic with
// the same result, and the cell's garbage outputs are not modelled.
// The source names the propagate output P = A xor B. That is right for
// addition but not for subtraction, where a borrow passes through when
// A == B. This cell outputs (A xor Ctrl) xor B, which equals A xor B when
// adding, so the carry skip unit gives correct borrows as well.
// ctrl_out passes Ctrl on to the next cell, because reversible logic allows
// no fan-out.
//
// Interface: single-bit a, b, cbin, ctrl in; sd, cbout, prop, ctrl_out out.
// Purely combinational, no clock.
module ftfas_cell (
  input  logic a,
  input  logic b,
  input  logic cbin,
  input  logic ctrl,
  output logic sd,
  output logic cbout,
  output logic prop,
  output logic ctrl_out
);
  logic prop_int;
  logic frg_q;  // garbage line of the Fredkin gate

  always_comb begin
    prop_int = (a ^ ctrl) ^ b;
    sd       = a ^ b ^ cbin;
    ctrl_out = ctrl;
  end

  // Carry/borrow select: R = A ? B : C with A = prop, B = cbin, C = b.
  fredkin_gate u_frg (
    .a(prop_int),
    .b(cbin),
    .c(b),
    .p(prop),
    .q(frg_q),
    .r(cbout)
  );
endmodule
