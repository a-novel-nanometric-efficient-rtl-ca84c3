// pp_carry_skip_addsub: N-bit parity preserving carry skip adder/subtractor.
//
// Same function as the ripple carry unit:
//   ctrl = 0:  {cbout, sd} = a + b + cbin
//   ctrl = 1:  {cbout, sd} = a - b - cbin   (cbout = 1 when a borrow is needed)
// but the bits are split into N/GROUP skip groups of GROUP FTFA/S cells.
// Each group has:
//   * one F2G gate (inputs: group carry/borrow-in, 0, 0). Its first copy
//     feeds the group's first cell and its second copy feeds the skip gate.
//   * a chain of GROUP-1 NFT gates, each with a constant 0 on its A line,
//     that ANDs the propagate outputs of the group's cells into the group
//     propagate P.
//   * one Fredkin gate controlled by P. Its R output is the group
//     carry/borrow-out: the copied group carry/borrow-in when P = 1 (the
//     group is skipped), the carry/borrow rippled through the cells when
//     P = 0.
// When P = 1 every cell of the group passes its carry/borrow-in unchanged,
// so both paths agree. The skip only shortens the path the carry/borrow
// takes to the next group. skip[g] brings out group g's P.
//
// What follows the source and what is this design's own choice: the gate
// set per group (one F2G, GROUP-1 NFT gates, one Fredkin gate) follows the
// cost formulas for the n-bit unit (one F2G, one FRG, n-1 NFT gates). Those
// formulas describe one group that spans all n bits, so the default is
// GROUP = N = 4. The description of the 4-bit circuit also mentions two
// groups of two bits; GROUP = 2 builds that variant. The cells' propagate
// output is (a ^ ctrl) ^ b rather than a ^ b, so that borrows skip
// correctly in subtract mode (see ftfas_cell).
//
// Parameters: N (bits, default 4) and GROUP (bits per skip group, default 4).
// N must be a multiple of GROUP. Ports are plain unsigned bit vectors, LSB at
// index 0. Purely combinational, no clock.
module pp_carry_skip_addsub #(
  parameter int unsigned N     = 4,
  parameter int unsigned GROUP = 4
) (
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  input  logic               cbin,
  input  logic               ctrl,
  output logic [N-1:0]       sd,
  output logic               cbout,
  output logic [N/GROUP-1:0] skip
);
  localparam int unsigned NG = N / GROUP;

  if (GROUP == 0 || N % GROUP != 0) begin : g_bad_group
    $error("pp_carry_skip_addsub: N must be a nonzero multiple of GROUP");
  end

  logic [NG:0]  gcb;    // carry/borrow between groups
  logic [N:0]   ctl;    // Ctrl line handed from cell to cell
  logic [N-1:0] prop;   // cell propagate outputs

  assign gcb[0] = cbin;
  assign ctl[0] = ctrl;

  for (genvar g = 0; g < NG; g++) begin : g_group
    logic             cin_cell;   // F2G copy 1: into the first cell
    logic             cin_skip;   // F2G copy 2: into the skip gate
    logic             cin_garb;   // F2G copy 3: garbage
    logic [GROUP:0]   cb;         // ripple chain inside the group
    logic [GROUP-1:0] pand;       // running AND of the propagate signals
    logic             frg_p, frg_q;

    f2g_gate u_f2g (
      .a(gcb[g]), .b(1'b0), .c(1'b0),
      .p(cin_cell), .q(cin_skip), .r(cin_garb)
    );

    assign cb[0] = cin_cell;

    for (genvar k = 0; k < GROUP; k++) begin : g_cell
      ftfas_cell u_cell (
        .a       (a[g*GROUP+k]),
        .b       (b[g*GROUP+k]),
        .cbin    (cb[k]),
        .ctrl    (ctl[g*GROUP+k]),
        .sd      (sd[g*GROUP+k]),
        .cbout   (cb[k+1]),
        .prop    (prop[g*GROUP+k]),
        .ctrl_out(ctl[g*GROUP+k+1])
      );
    end

    assign pand[0] = prop[g*GROUP];
    for (genvar k = 1; k < GROUP; k++) begin : g_and
      logic nft_p, nft_q;  // garbage lines
      nft_gate u_nft (
        .a(1'b0), .b(pand[k-1]), .c(prop[g*GROUP+k]),
        .p(nft_p), .q(nft_q), .r(pand[k])
      );
    end

    // R = P ? copied carry/borrow-in : rippled carry/borrow.
    fredkin_gate u_frg (
      .a(pand[GROUP-1]), .b(cin_skip), .c(cb[GROUP]),
      .p(frg_p), .q(frg_q), .r(gcb[g+1])
    );

    assign skip[g] = frg_p;
  end

  assign cbout = gcb[NG];
endmodule
