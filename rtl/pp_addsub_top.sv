// pp_addsub_top: the two N-bit parity preserving adder/subtractors side by
// side. Each is an arithmetic unit in its own right, and each has its own
// ports:
//   rca_* : pp_parallel_addsub, N FTFA/S cells with the carry/borrow rippling
//   csa_* : pp_carry_skip_addsub, the same cells in skip groups of GROUP bits
//           with an F2G / NFT / Fredkin skip path; csa_skip shows which
//           groups were skipped.
// For both units: ctrl = 0 adds ({cbout, sd} = a + b + cbin), ctrl = 1
// subtracts ({cbout, sd} = a - b - cbin, cbout = borrow).
// Defaults are the 4-bit units of the source: N = 4, and GROUP = 4, one skip
// group as in its cost formulas. Purely combinational, no clock.
module pp_addsub_top #(
  parameter int unsigned N     = 4,
  parameter int unsigned GROUP = 4
) (
  // ripple carry adder/subtractor
  input  logic [N-1:0]       rca_a,
  input  logic [N-1:0]       rca_b,
  input  logic               rca_cbin,
  input  logic               rca_ctrl,
  output logic [N-1:0]       rca_sd,
  output logic               rca_cbout,
  // carry skip adder/subtractor
  input  logic [N-1:0]       csa_a,
  input  logic [N-1:0]       csa_b,
  input  logic               csa_cbin,
  input  logic               csa_ctrl,
  output logic [N-1:0]       csa_sd,
  output logic               csa_cbout,
  output logic [N/GROUP-1:0] csa_skip
);
  pp_parallel_addsub #(.N(N)) u_rca (
    .a    (rca_a),
    .b    (rca_b),
    .cbin (rca_cbin),
    .ctrl (rca_ctrl),
    .sd   (rca_sd),
    .cbout(rca_cbout)
  );

  pp_carry_skip_addsub #(.N(N), .GROUP(GROUP)) u_csa (
    .a    (csa_a),
    .b    (csa_b),
    .cbin (csa_cbin),
    .ctrl (csa_ctrl),
    .sd   (csa_sd),
    .cbout(csa_cbout),
    .skip (csa_skip)
  );
endmodule
