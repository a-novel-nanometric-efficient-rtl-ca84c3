// tb_pp_carry_skip_addsub: self-checking test of the carry skip
// adder/subtractor.
// Three instances are tested:
//   N=4, GROUP=4 (default, one skip group):   all 1024 input combinations
//   N=4, GROUP=2 (two groups of two bits):    all 1024 input combinations
//   N=8, GROUP=4:                             2000 random vectors
// The sum/difference and carry/borrow-out are compared with integer
// arithmetic (a+b+cbin, or a-b-cbin with borrow = negative result). Each
// skip output is compared with its meaning: group g is skipped exactly when
// every bit of the group passes its carry/borrow through, i.e. a[i] != b[i]
// when adding and a[i] == b[i] when subtracting. The test counts skipped
// groups and carry/borrow-outs produced through the skip path in each mode,
// and counts a failure for a case that never happened. A watchdog ends the
// run with a failure if it hangs.
module tb_pp_carry_skip_addsub;
  int checks = 0;
  int failures = 0;
  int n_skip_add = 0, n_skip_sub = 0, n_ripple = 0, n_skip_cb = 0;

  logic [3:0] a4, b4, sd4a, sd4b;
  logic       cbin4, ctrl4, cbout4a, cbout4b;
  logic [0:0] skip4a;
  logic [1:0] skip4b;
  logic [7:0] a8, b8, sd8;
  logic       cbin8, ctrl8, cbout8;
  logic [1:0] skip8;

  pp_carry_skip_addsub dut_a (
    .a(a4), .b(b4), .cbin(cbin4), .ctrl(ctrl4), .sd(sd4a), .cbout(cbout4a), .skip(skip4a)
  );
  pp_carry_skip_addsub #(.N(4), .GROUP(2)) dut_b (
    .a(a4), .b(b4), .cbin(cbin4), .ctrl(ctrl4), .sd(sd4b), .cbout(cbout4b), .skip(skip4b)
  );
  pp_carry_skip_addsub #(.N(8), .GROUP(4)) dut_c (
    .a(a8), .b(b8), .cbin(cbin8), .ctrl(ctrl8), .sd(sd8), .cbout(cbout8), .skip(skip8)
  );

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

  // Expected skip flag of the group of width gw starting at bit lo.
  function automatic logic ref_skip(input longint unsigned ia, ib, input int lo, gw,
                                    input logic sub);
    for (int i = lo; i < lo + gw; i++)
      if ((ia[i] != ib[i]) == sub) return 1'b0;
    return 1'b1;
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
    for (int v = 0; v < 1024; v++) begin
      {ctrl4, cbin4, a4, b4} = 10'(v);
      #1;
      e = ref_addsub(4, 64'(a4), 64'(b4), 64'(cbin4), ctrl4);
      check("N=4 G=4 result", 64'({cbout4a, sd4a}), e, 64'(a4), 64'(b4), cbin4, ctrl4);
      check("N=4 G=2 result", 64'({cbout4b, sd4b}), e, 64'(a4), 64'(b4), cbin4, ctrl4);
      check("N=4 G=4 skip", 64'(skip4a), 64'(ref_skip(64'(a4), 64'(b4), 0, 4, ctrl4)), 64'(a4), 64'(b4), cbin4, ctrl4);
      check("N=4 G=2 skip", 64'(skip4b),
            64'({ref_skip(64'(a4), 64'(b4), 2, 2, ctrl4), ref_skip(64'(a4), 64'(b4), 0, 2, ctrl4)}),
            64'(a4), 64'(b4), cbin4, ctrl4);
      if (skip4a[0]) begin
        if (ctrl4) n_skip_sub++; else n_skip_add++;
        if (cbout4a) n_skip_cb++;
      end else begin
        n_ripple++;
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      cbin8 = 1'($urandom); ctrl8 = 1'($urandom);
      // every fourth vector makes the low group skip
      if (i % 4 == 0) b8[3:0] = ctrl8 ? a8[3:0] : ~a8[3:0];
      #1;
      e = ref_addsub(8, 64'(a8), 64'(b8), 64'(cbin8), ctrl8);
      check("N=8 G=4 result", 64'({cbout8, sd8}), e, 64'(a8), 64'(b8), cbin8, ctrl8);
      check("N=8 G=4 skip", 64'(skip8),
            64'({ref_skip(64'(a8), 64'(b8), 4, 4, ctrl8), ref_skip(64'(a8), 64'(b8), 0, 4, ctrl8)}),
            64'(a8), 64'(b8), cbin8, ctrl8);
    end
    if (n_skip_add == 0 || n_skip_sub == 0 || n_ripple == 0 || n_skip_cb == 0) begin
      failures++;
      $display("FAIL coverage: skip(add)=%0d skip(sub)=%0d ripple=%0d skip with cbout=1: %0d",
               n_skip_add, n_skip_sub, n_ripple, n_skip_cb);
    end
    $display("coverage: skip(add)=%0d skip(sub)=%0d ripple=%0d skip with cbout=1: %0d",
             n_skip_add, n_skip_sub, n_ripple, n_skip_cb);
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
