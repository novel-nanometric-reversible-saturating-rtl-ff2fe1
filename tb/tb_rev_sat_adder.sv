// tb_rev_sat_adder: end-to-end test of the 4-bit reversible saturating adder
// at its default parameters.
//
// Drives all 256 operand pairs and compares the output with a reference
// computed here with signed integers and clamped to [-8, 7]. It also checks
// the garbage lines that carry meaning: g[N+1] is the overflow flag (true
// exactly when the exact sum is out of range) and g[N] the carry out of the
// MSB. Each mechanism of the design is counted and must occur at least once:
// a plain sum of operands with different signs, a plain sum of operands with
// the same sign, positive saturation to 0111 and negative saturation to 1000.
// The circuit is combinational, so each result is sampled 1 time unit after
// the operands change.
module tb_rev_sat_adder;

  import rev_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned GO = garbage_outputs(N);

  logic [N-1:0]  a, b, a_o, b_o, o;
  logic [GO-1:0] g;
  int            checks = 0;
  int            failures = 0;
  int            n_mixed_sign = 0;
  int            n_same_sign_ok = 0;
  int            n_pos_sat = 0;
  int            n_neg_sat = 0;

  rev_sat_adder dut (.a(a), .b(b), .a_o(a_o), .b_o(b_o), .o(o), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d -> o=%0d g=%b", what, $signed(a), $signed(b), $signed(o), g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      int s, e;
      bit ovf;
      {a, b} = (2 * N)'(i);
      #1;
      s = int'($signed(a)) + int'($signed(b));
      ovf = (s > 7) || (s < -8);
      e = (s > 7) ? 7 : (s < -8) ? -8 : s;
      check(int'($signed(o)) == e, "saturated sum");
      check(g[N+1] == ovf, "overflow flag");
      check(g[N] == ((32'(a) + 32'(b)) >> N != 0), "MSB carry out");
      check(a_o == a && b_o == b, "operands pass");
      if (a[N-1] != b[N-1]) begin
        check(!ovf, "no overflow with different signs");
        n_mixed_sign++;
      end else if (!ovf) n_same_sign_ok++;
      else if (s > 7) begin
        check(o == 4'b0111, "positive saturation value 0111");
        n_pos_sat++;
      end else begin
        check(o == 4'b1000, "negative saturation value 1000");
        n_neg_sat++;
      end
    end
    $display("mechanisms: different signs %0d, same sign in range %0d, positive saturation %0d, negative saturation %0d",
             n_mixed_sign, n_same_sign_ok, n_pos_sat, n_neg_sat);
    check(n_mixed_sign > 0, "different-sign addition occurred");
    check(n_same_sign_ok > 0, "same-sign addition without overflow occurred");
    check(n_pos_sat > 0, "positive saturation occurred");
    check(n_neg_sat > 0, "negative saturation occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
