// tb_rev_sat_value_gen: exhaustive self-checking test of the saturation
// value generator at N = 4.
//
// With the constant lines at their working values (0 0 0 and 1 for the MSB)
// it applies all v and z and checks o = z when v = 0, and o = 0111 when
// z[3] = 1 (positive overflow) or 1000 when z[3] = 0 (negative overflow)
// when v = 1. It then applies every value of all 2N+1 inputs and checks that
// the 2N+1 outputs never repeat, i.e. the block is reversible.
module tb_rev_sat_value_gen;

  localparam int unsigned N = 4;
  localparam int unsigned W = 2 * N + 1;

  logic         v, v_o;
  logic [N-1:0] z, k, o, g;
  int           checks = 0;
  int           failures = 0;
  bit           seen [1 << W];
  int           n_pos = 0;
  int           n_neg = 0;

  rev_sat_value_gen #(.N(N)) dut (.v(v), .z(z), .k(k), .v_o(v_o), .o(o), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s v=%0b z=%b k=%b -> o=%b g=%b v_o=%0b", what, v, z, k, o, g, v_o);
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
    k = 4'b1000;
    for (int i = 0; i < 32; i++) begin
      {v, z} = 5'(i);
      #1;
      if (!v) begin
        check(o == z, "pass sum");
      end else if (z[N-1]) begin
        check(o == 4'b0111, "positive saturation 0111");
        n_pos++;
      end else begin
        check(o == 4'b1000, "negative saturation 1000");
        n_neg++;
      end
      check(v_o == v, "v passes");
    end
    check(n_pos > 0 && n_neg > 0, "both saturation values exercised");
    for (int i = 0; i < (1 << W); i++) begin
      {v, z, k} = W'(i);
      #1;
      check(!seen[{v_o, o, g}], "outputs distinct");
      seen[{v_o, o, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
