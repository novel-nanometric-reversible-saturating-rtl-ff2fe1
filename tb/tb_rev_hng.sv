// tb_rev_hng: exhaustive self-checking test of the HNG gate.
//
// Applies all sixteen input patterns. Checks P = A, Q = B, and that with
// D = 0 the pair {S, R} equals the arithmetic sum A + B + C (full adder),
// while D = 1 inverts S. Also checks that the sixteen output patterns are
// distinct, i.e. the gate is reversible.
module tb_rev_hng;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  bit   seen [16];

  rev_hng dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
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
    for (int i = 0; i < 16; i++) begin
      int unsigned total;
      {a, b, c, d} = 4'(i);
      #1;
      total = 32'(a) + 32'(b) + 32'(c);
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(r == total[0], "sum bit");
      check(s == (total[1] ^ d), "carry bit xor D");
      check(!seen[{p, q, r, s}], "outputs distinct");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
