// tb_rev_overflow_detect: exhaustive test of the overflow detection gate.
//
// Applies all four combinations of MSB carry-out and MSB carry-in copy and
// checks v = 1 exactly when they differ, and that the carry out passes.
module tb_rev_overflow_detect;

  logic cout, cmsb, cout_o, v;
  int   checks = 0;
  int   failures = 0;

  rev_overflow_detect dut (.cout(cout), .cmsb(cmsb), .cout_o(cout_o), .v(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cout=%0b cmsb=%0b -> cout_o=%0b v=%0b", what, cout, cmsb, cout_o, v);
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
      {cout, cmsb} = 2'(i);
      #1;
      check(v == (cout != cmsb), "v = carries differ");
      check(cout_o == cout, "carry out passes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
