// tb_rev_sat_adder_core: reversibility and function of the full line-level
// circuit at N = 4.
//
// The circuit has 4N+2 = 18 lines. The test drives every one of the 2^18
// input patterns (operands and constant lines alike) and records each output
// pattern in a bitmap: a repeated pattern would mean the circuit is not a
// bijection. For the patterns whose constant lines hold their working values
// it also checks the saturated sum against a reference computed here with
// signed integers, and counts the garbage lines against 2N+2 and N+2. With
// the carry-in line set to 1 instead, the result must be the clamped a+b+1.
module tb_rev_sat_adder_core;

  import rev_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned CI = const_inputs(N);
  localparam int unsigned GO = garbage_outputs(N);
  localparam int unsigned L  = 2 * N + CI;  // lines in = lines out
  localparam logic [CI-1:0] ANC_OK = CI'(1) << (CI - 1);

  logic [N-1:0]  a, b, a_o, b_o, o;
  logic [CI-1:0] anc;
  logic [GO-1:0] g;
  int            checks = 0;
  int            failures = 0;
  int            repeats = 0;
  bit            seen [1 << L];

  rev_sat_adder_core #(.N(N)) dut (
    .a(a), .b(b), .anc(anc), .a_o(a_o), .b_o(b_o), .o(o), .g(g)
  );

  function automatic logic [N-1:0] sat_ref(logic [N-1:0] x, logic [N-1:0] y, bit ci);
    int s;
    s = int'($signed(x)) + int'($signed(y)) + int'(ci);
    if (s > (1 << (N - 1)) - 1) s = (1 << (N - 1)) - 1;
    if (s < -(1 << (N - 1)))    s = -(1 << (N - 1));
    return N'(s);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h anc=%b -> o=%h g=%b", what, a, b, anc, o, g);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(CI + 2 * N == N + N + N + GO, "line count in equals line count out");
    for (int i = 0; i < (1 << L); i++) begin
      logic [L-1:0] outv;
      {anc, a, b} = L'(i);
      #1;
      outv = {g, o, a_o, b_o};
      if (seen[outv]) repeats++;
      seen[outv] = 1'b1;
      if (anc == ANC_OK) begin
        check(o == sat_ref(a, b, 1'b0), "saturated sum");
        check(a_o == a && b_o == b, "operands pass");
      end
      if (anc == (ANC_OK | CI'(1))) check(o == sat_ref(a, b, 1'b1), "saturated sum with carry in 1");
    end
    check(repeats == 0, "bijection over all 2^18 line patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
