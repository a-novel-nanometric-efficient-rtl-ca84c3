// tb_f2g_gate: exhaustive self-checking test of f2g_gate (Feynman double gate).
// Applies all eight input patterns, compares P, Q, R with the gate equations
// evaluated here from the truth table, and checks the two properties every
// gate of the adder/subtractors must have: it is reversible (the eight
// output patterns are all different) and parity preserving
// (a^b^c == p^q^r). A watchdog ends the run with a failure if it hangs.
module tb_f2g_gate;
  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen = '0;

  f2g_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b got %b expected %b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    logic ep, eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (a != b);
      er = (a != c);
      check("P", p, ep);
      check("Q", q, eq);
      check("R", r, er);
      check("parity", p ^ q ^ r, a ^ b ^ c);
      check("reversible", seen[{p, q, r}], 1'b0);
      seen[{p, q, r}] = 1'b1;
    end
    check("all outputs reached", &seen, 1'b1);
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
