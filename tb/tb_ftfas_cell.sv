// tb_ftfas_cell: exhaustive self-checking test of the 1-bit full
// adder/subtractor cell. All 16 combinations of a, b, cbin and ctrl are
// applied. Reference values come from integer arithmetic: a+b+cbin when
// adding, a-b-cbin when subtracting (borrow = result below zero). The
// propagate output is checked against its meaning: prop is 1 exactly when
// flipping cbin flips the reference carry/borrow-out. ctrl_out must
// follow ctrl. A watchdog ends the run with a failure if it hangs.
module tb_ftfas_cell;
  logic a, b, cbin, ctrl;
  logic sd, cbout, prop, ctrl_out;
  int   checks = 0;
  int   failures = 0;

  ftfas_cell dut (
    .a(a), .b(b), .cbin(cbin), .ctrl(ctrl),
    .sd(sd), .cbout(cbout), .prop(prop), .ctrl_out(ctrl_out)
  );

  // Reference: {carry/borrow, sum/difference bit}
  function automatic logic [1:0] ref_fas(input int ia, ib, ic, input logic sub);
    int res;
    if (!sub) begin
      res = ia + ib + ic;
      return {res >= 2, (res % 2) == 1};
    end
    res = ia - ib - ic;
    return {res < 0, ((res + 4) % 2) == 1};
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b cbin=%b ctrl=%b got %b expected %b",
               what, a, b, cbin, ctrl, got, exp);
    end
  endtask

  initial begin
    logic [1:0] e, e0, e1;
    for (int v = 0; v < 16; v++) begin
      {ctrl, a, b, cbin} = 4'(v);
      #1;
      e  = ref_fas(int'(a), int'(b), int'(cbin), ctrl);
      e0 = ref_fas(int'(a), int'(b), 0, ctrl);
      e1 = ref_fas(int'(a), int'(b), 1, ctrl);
      check("sd", sd, e[0]);
      check("cbout", cbout, e[1]);
      check("prop", prop, e0[1] != e1[1]);
      check("ctrl_out", ctrl_out, ctrl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
