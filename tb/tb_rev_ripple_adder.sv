// tb_rev_ripple_adder: exhaustive self-checking test of the reversible
// ripple-carry adder at N = 4.
//
// For every a, b and carry-in (512 cases), with the constant lines at 0,
// checks {cout, z} = a + b + cin, that a and b pass through, and that cmsb is
// the carry into the MSB stage, worked out here from the sum of the lower
// N-1 bits. It then sets the constant lines to random values and checks the
// effect of each: D flips its stage's carry out, k flips cmsb.
module tb_rev_ripple_adder;

  localparam int unsigned N = 4;

  logic [N-1:0] a, b, d, a_o, b_o, z;
  logic         cin, k, cout, cmsb;
  int           checks = 0;
  int           failures = 0;

  rev_ripple_adder #(.N(N)) dut (
    .a(a), .b(b), .cin(cin), .d(d), .k(k),
    .a_o(a_o), .b_o(b_o), .z(z), .cout(cout), .cmsb(cmsb)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%0b d=%h k=%0b -> z=%h cout=%0b cmsb=%0b",
               what, a, b, cin, d, k, z, cout, cmsb);
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
    d = '0;
    k = 1'b0;
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      int unsigned sum, low;
      {cin, a, b} = (2 * N + 1)'(i);
      #1;
      sum = 32'(a) + 32'(b) + 32'(cin);
      low = 32'(a[N-2:0]) + 32'(b[N-2:0]) + 32'(cin);
      check(z == sum[N-1:0], "sum");
      check(cout == sum[N], "carry out");
      check(cmsb == low[N-1], "MSB carry-in copy");
      check(a_o == a && b_o == b, "operands pass");
    end
    // A 1 on the last stage's D line only inverts the carry out; a 1 on k
    // only inverts the copy of the MSB carry-in.
    for (int i = 0; i < 200; i++) begin
      int unsigned sum;
      {cin, a, b} = (2 * N + 1)'($urandom);
      d = '0;
      k = 1'($urandom);
      d[N-1] = 1'($urandom);
      #1;
      sum = 32'(a) + 32'(b) + 32'(cin);
      check(z == sum[N-1:0], "sum with constants set");
      check(cout == (sum[N] ^ d[N-1]), "carry out xor D");
      check(cmsb == ((((32'(a[N-2:0]) + 32'(b[N-2:0]) + 32'(cin)) >> (N - 1)) & 1) != 0) ^ k,
            "MSB carry-in copy xor k");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
