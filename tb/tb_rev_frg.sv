// tb_rev_frg: exhaustive self-checking test of the Fredkin gate.
//
// Applies all eight input patterns and compares the outputs with a
// controlled swap worked out here (A = 0: B and C pass, A = 1: they swap).
// Also checks that the eight output patterns are distinct, that the number
// of ones is conserved (a Fredkin gate only moves bits) and that the gate is
// its own inverse.
module tb_rev_frg;

  logic a, b, c, p, q, r, p2, q2, r2;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  rev_frg dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  rev_frg dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b -> %0b%0b%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic eq, er;
      {a, b, c} = 3'(i);
      #1;
      eq = a ? c : b;
      er = a ? b : c;
      check(p == a, "P = A");
      check(q == eq, "Q");
      check(r == er, "R");
      check(32'(p) + 32'(q) + 32'(r) == 32'(a) + 32'(b) + 32'(c), "ones conserved");
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
      check(!seen[{p, q, r}], "outputs distinct");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
