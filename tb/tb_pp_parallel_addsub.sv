// tb_pp_parallel_addsub: self-checking test of the ripple carry
// adder/subtractor.
// The default 4-bit unit gets every combination of a, b, cbin and ctrl
// (1024 vectors). An 8-bit instance gets 2000 random vectors. References
// come from integer arithmetic: a+b+cbin, or a-b-cbin with the borrow set
// when the result is negative. Modes and carry/borrow-out values seen are
// counted, and a mode or an outcome that never happened counts as a failure.
// A watchdog ends the run with a failure if it hangs.
module tb_pp_parallel_addsub;
  int checks = 0;
  int failures = 0;
  int n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0;

  logic [3:0] a4, b4, sd4;
  logic       cbin4, ctrl4, cbout4;
  logic [7:0] a8, b8, sd8;
  logic       cbin8, ctrl8, cbout8;

  pp_parallel_addsub dut4 (
    .a(a4), .b(b4), .cbin(cbin4), .ctrl(ctrl4), .sd(sd4), .cbout(cbout4)
  );
  pp_parallel_addsub #(.N(8)) dut8 (
    .a(a8), .b(b8), .cbin(cbin8), .ctrl(ctrl8), .sd(sd8), .cbout(cbout8)
  );

  // Reference {carry/borrow, result} for W-bit operands.
  function automatic longint unsigned ref_addsub(input int w, input longint ia, ib, ic,
                                                 input logic sub);
    longint res;
    longint unsigned m = (64'd1 << w) - 1;
    if (!sub) begin
      res = ia + ib + ic;
      return (longint'(res > m) << w) | (res & m);
    end
    res = ia - ib - ic;
    return (longint'(res < 0) << w) | (res & m);
  endfunction

  task automatic check(input string what, input longint unsigned got, exp,
                       input longint ia, ib, input logic ic, sub);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cbin=%b ctrl=%b got 0x%0h expected 0x%0h",
               what, ia, ib, ic, sub, got, exp);
    end
  endtask

  initial begin
    longint unsigned e;
    // exhaustive, N = 4
    for (int v = 0; v < 1024; v++) begin
      {ctrl4, cbin4, a4, b4} = 10'(v);
      #1;
      e = ref_addsub(4, 64'(a4), 64'(b4), 64'(cbin4), ctrl4);
      check("N=4", 64'({cbout4, sd4}), e, 64'(a4), 64'(b4), cbin4, ctrl4);
      if (ctrl4) n_sub++; else n_add++;
      if (cbout4 && !ctrl4) n_carry++;
      if (cbout4 && ctrl4) n_borrow++;
    end
    // random, N = 8
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      cbin8 = 1'($urandom); ctrl8 = 1'($urandom);
      #1;
      e = ref_addsub(8, 64'(a8), 64'(b8), 64'(cbin8), ctrl8);
      check("N=8", 64'({cbout8, sd8}), e, 64'(a8), 64'(b8), cbin8, ctrl8);
    end
    if (n_add == 0 || n_sub == 0 || n_carry == 0 || n_borrow == 0) begin
      failures++;
      $display("FAIL coverage: add=%0d sub=%0d carry=%0d borrow=%0d",
               n_add, n_sub, n_carry, n_borrow);
    end
    $display("coverage: add=%0d sub=%0d carry-out=%0d borrow-out=%0d",
             n_add, n_sub, n_carry, n_borrow);
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
