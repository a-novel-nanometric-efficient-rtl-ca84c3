// nft_gate: 3x3 "New Fault Tolerant" (NFT) reversible, parity preserving gate.
//   P = A ^ B,  Q = B'C ^ AC',  R = BC ^ AC'.
// With A tied to 0, R = B & C, P = B and Q = B'C. This is how the carry skip
// adder/subtractor ANDs the cell propagate signals of a skip group: a chain
// of GROUP-1 NFT gates, each taking one constant input and leaving two
// garbage outputs. Quantum cost 5.
// The equations are the NFT gate as defined in the reversible logic
// literature. Its use as an AND gate with one constant input follows the
// carry skip cost analysis.
// Interface: single-bit inputs a, b, c; outputs p, q, r. Purely combinational.
module nft_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a ^ b;
    q = (~b & c) ^ (a & ~c);
    r = (b & c) ^ (a & ~c);
  end
endmodule
