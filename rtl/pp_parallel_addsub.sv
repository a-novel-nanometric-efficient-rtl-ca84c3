// pp_parallel_addsub: N-bit parity preserving parallel (ripple carry)
// adder/subtractor.
//
// N FTFA/S cells are cascaded. Cell i takes a[i], b[i] and the
// carry/borrow from cell i-1; cell 0 takes cbin. ctrl selects the operation
// for the whole word:
//   ctrl = 0:  {cbout, sd} = a + b + cbin
//   ctrl = 1:  {cbout, sd} = a - b - cbin   (cbout = 1 when a borrow is needed)
// The carry/borrow ripples from position 0 to N-1, so the delay grows
// linearly with N. The Ctrl line is handed from cell to cell through each
// cell's ctrl_out, as reversible logic allows no fan-out. The propagate
// outputs of the cells are not used here.
//
// The structure (N cascaded cells, one Ctrl for all) and N = 4 follow the
// source. Ports are plain unsigned bit vectors, LSB at index 0.
// Purely combinational, no clock.
module pp_parallel_addsub #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cbin,
  input  logic         ctrl,
  output logic [N-1:0] sd,
  output logic         cbout
);
  logic [N:0]   cb;     // carry/borrow chain
  logic [N:0]   ctl;    // Ctrl line handed from cell to cell
  logic [N-1:0] prop;   // unused propagate outputs

  assign cb[0]  = cbin;
  assign ctl[0] = ctrl;

  for (genvar i = 0; i < N; i++) begin : g_cell
    ftfas_cell u_cell (
      .a       (a[i]),
      .b       (b[i]),
      .cbin    (cb[i]),
      .ctrl    (ctl[i]),
      .sd      (sd[i]),
      .cbout   (cb[i+1]),
      .prop    (prop[i]),
      .ctrl_out(ctl[i+1])
    );
  end

  assign cbout = cb[N];
endmodule
