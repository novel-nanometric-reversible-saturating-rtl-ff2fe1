// tb_rev_fg: exhaustive self-checking test of the Feynman gate.
//
// Applies all four input patterns, compares P and Q with P = A and
// Q = A xor B computed here, checks the copy (B = 0) and invert (B = 1) uses,
// and checks that the four output patterns are all different (the gate is
// reversible) and that applying the gate twice restores the inputs.
module tb_rev_fg;

  logic a, b, p, q, p2, q2;
  int   checks = 0;
  int   failures = 0;
  bit   seen [4];

  rev_fg dut  (.a(a), .b(b), .p(p), .q(q));
  rev_fg dut2 (.a(p), .b(q), .p(p2), .q(q2));  // second pass undoes the first

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
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
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      if (b == 1'b0) check(q == a, "copy with B = 0");
      else           check(q == !a, "invert with B = 1");
      check({p2, q2} == {a, b}, "self-inverse");
      check(!seen[{p, q}], "outputs distinct");
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
