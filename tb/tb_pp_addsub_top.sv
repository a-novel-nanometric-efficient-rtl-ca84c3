// tb_pp_addsub_top: end-to-end test of the top at its default parameters
// (4-bit ripple carry and 4-bit carry skip adder/subtractors).
// Both units get every combination of a, b, cbin and ctrl (1024 vectors).
// The ripple unit walks the combinations in one order and the carry skip
// unit in the reverse order, so the two input sets are really independent.
// Both are checked against integer arithmetic and the skip flag against its
// meaning. The test counts the mechanisms of the design and fails any that
// never occurred: add mode, subtract mode, a switch between modes from one
// operation to the next, carry-out, borrow-out, a skipped group, a group
// that rippled, and a carry/borrow-out delivered by the skip path.
// A watchdog ends the run with a failure if it hangs.
module tb_pp_addsub_top;
  localparam int N = 4;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] rca_a, rca_b, rca_sd, csa_a, csa_b, csa_sd;
  logic         rca_cbin, rca_ctrl, rca_cbout, csa_cbin, csa_ctrl, csa_cbout;
  logic [0:0]   csa_skip;

  pp_addsub_top dut (
    .rca_a(rca_a), .rca_b(rca_b), .rca_cbin(rca_cbin), .rca_ctrl(rca_ctrl),
    .rca_sd(rca_sd), .rca_cbout(rca_cbout),
    .csa_a(csa_a), .csa_b(csa_b), .csa_cbin(csa_cbin), .csa_ctrl(csa_ctrl),
    .csa_sd(csa_sd), .csa_cbout(csa_cbout), .csa_skip(csa_skip)
  );

  typedef enum int {
    EV_ADD, EV_SUB, EV_MODE_SWITCH, EV_CARRY_OUT, EV_BORROW_OUT,
    EV_SKIP, EV_RIPPLE, EV_SKIP_CB, EV_COUNT
  } event_e;
  int    seen [EV_COUNT];
  string ev_name [EV_COUNT] = '{"add", "subtract", "mode switch", "carry-out",
                                "borrow-out", "group skipped", "group rippled",
                                "carry/borrow via skip path"};

  // {carry/borrow, result} of a N-bit add or subtract
  function automatic logic [N:0] ref_addsub(input int ia, ib, ic, input logic sub);
    int res;
    if (!sub) begin
      res = ia + ib + ic;
      return {res >= (1 << N), N'(res)};
    end
    res = ia - ib - ic;
    return {res < 0, N'(res)};
  endfunction

  task automatic check(input string what, input logic [N:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got 0x%0h expected 0x%0h", what, got, exp);
    end
  endtask

  initial begin
    logic prev_rca_ctrl, prev_csa_ctrl;
    logic skip_exp;
    foreach (seen[i]) seen[i] = 0;
    prev_rca_ctrl = 1'b0;
    prev_csa_ctrl = 1'b1;
    for (int v = 0; v < 1024; v++) begin
      {rca_ctrl, rca_cbin, rca_a, rca_b} = 10'(v);
      {csa_cbin, csa_ctrl, csa_b, csa_a} = 10'(1023 - v);
      #1;
      check($sformatf("ripple  %0d %s %0d (cbin %b)", rca_a, rca_ctrl ? "-" : "+", rca_b, rca_cbin),
            {rca_cbout, rca_sd}, ref_addsub(int'(rca_a), int'(rca_b), int'(rca_cbin), rca_ctrl));
      check($sformatf("skip    %0d %s %0d (cbin %b)", csa_a, csa_ctrl ? "-" : "+", csa_b, csa_cbin),
            {csa_cbout, csa_sd}, ref_addsub(int'(csa_a), int'(csa_b), int'(csa_cbin), csa_ctrl));
      skip_exp = csa_ctrl ? (csa_a == csa_b) : ((csa_a ^ csa_b) == '1);
      check("skip flag", (N+1)'(csa_skip), (N+1)'(skip_exp));

      seen[rca_ctrl ? EV_SUB : EV_ADD]++;
      seen[csa_ctrl ? EV_SUB : EV_ADD]++;
      if (rca_ctrl != prev_rca_ctrl || csa_ctrl != prev_csa_ctrl) seen[EV_MODE_SWITCH]++;
      if (rca_cbout && !rca_ctrl) seen[EV_CARRY_OUT]++;
      if (csa_cbout && !csa_ctrl) seen[EV_CARRY_OUT]++;
      if (rca_cbout && rca_ctrl) seen[EV_BORROW_OUT]++;
      if (csa_cbout && csa_ctrl) seen[EV_BORROW_OUT]++;
      if (csa_skip[0]) seen[EV_SKIP]++; else seen[EV_RIPPLE]++;
      if (csa_skip[0] && csa_cbout) seen[EV_SKIP_CB]++;
      prev_rca_ctrl = rca_ctrl;
      prev_csa_ctrl = csa_ctrl;
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %-28s seen %0d times", ev_name[e], seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
