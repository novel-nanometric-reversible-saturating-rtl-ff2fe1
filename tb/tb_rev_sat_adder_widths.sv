// tb_rev_sat_adder_widths: the saturating adder at the operand widths of the
// published cost table, n = 4, 8, 16, 24 and 32.
//
// For each width it checks the cost figures (constant inputs 2n+2, garbage
// outputs n+2, quantum cost 12n+2) against the tabulated numbers, and runs
// the adder on corner cases (largest and smallest values, zero, -1) plus
// random operands, comparing with a signed, clamped reference computed here
// in 64-bit integers. Each width must see both positive and negative
// saturation.
module tb_rev_sat_adder_widths;

  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Table values: n, constant inputs, garbage outputs, quantum cost.
  localparam int TABLE [5][4] = '{
    '{4, 10, 6, 50}, '{8, 18, 10, 98}, '{16, 34, 18, 194},
    '{24, 50, 26, 290}, '{32, 66, 34, 386}
  };

  logic [3:0]  a4,  b4,  o4;
  logic [7:0]  a8,  b8,  o8;
  logic [15:0] a16, b16, o16;
  logic [23:0] a24, b24, o24;
  logic [31:0] a32, b32, o32;

  rev_sat_adder #(.N(4))  u4  (.a(a4),  .b(b4),  .a_o(), .b_o(), .o(o4),  .g());
  rev_sat_adder #(.N(8))  u8  (.a(a8),  .b(b8),  .a_o(), .b_o(), .o(o8),  .g());
  rev_sat_adder #(.N(16)) u16 (.a(a16), .b(b16), .a_o(), .b_o(), .o(o16), .g());
  rev_sat_adder #(.N(24)) u24 (.a(a24), .b(b24), .a_o(), .b_o(), .o(o24), .g());
  rev_sat_adder #(.N(32)) u32 (.a(a32), .b(b32), .a_o(), .b_o(), .o(o32), .g());

  // Clamped signed sum of two n-bit values given sign-extended.
  function automatic longint sat_ref(longint x, longint y, int n);
    longint s, hi, lo;
    s  = x + y;
    hi = (longint'(1) << (n - 1)) - 1;
    lo = -(longint'(1) << (n - 1));
    return (s > hi) ? hi : (s < lo) ? lo : s;
  endfunction

  function automatic longint sext(logic [31:0] x, int n);
    longint v;
    v = longint'(x) & ((longint'(1) << n) - 1);
    if (v >= (longint'(1) << (n - 1))) v -= (longint'(1) << n);
    return v;
  endfunction

  function automatic logic [31:0] pick(int idx, int n);
    logic [31:0] m;
    m = 32'((longint'(1) << n) - 1);
    case (idx)
      0: return m >> 1;                    // largest positive
      1: return (m >> 1) + 1;              // most negative
      2: return '0;
      3: return m;                         // -1
      4: return 32'd1;
      default: return $urandom & m;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[t]) begin
      check(const_inputs(TABLE[t][0]) == TABLE[t][1], $sformatf("constant inputs n=%0d", TABLE[t][0]));
      check(garbage_outputs(TABLE[t][0]) == TABLE[t][2], $sformatf("garbage outputs n=%0d", TABLE[t][0]));
      check(quantum_cost(TABLE[t][0]) == TABLE[t][3], $sformatf("quantum cost n=%0d", TABLE[t][0]));
    end
    foreach (TABLE[t]) begin
      int n, pos, neg;
      n = TABLE[t][0];
      pos = 0;
      neg = 0;
      for (int i = 0; i < 2000; i++) begin
        logic [31:0] x, y, got;
        longint      e;
        x = pick((i < 36) ? i % 6 : 5, n);
        y = pick((i < 36) ? i / 6 : 5, n);
        a4 = 4'(x);  b4 = 4'(y);  a8 = 8'(x);  b8 = 8'(y);
        a16 = 16'(x); b16 = 16'(y); a24 = 24'(x); b24 = 24'(y);
        a32 = x; b32 = y;
        #1;
        case (n)
          4:  got = 32'(o4);
          8:  got = 32'(o8);
          16: got = 32'(o16);
          24: got = 32'(o24);
          default: got = o32;
        endcase
        e = sat_ref(sext(x, n), sext(y, n), n);
        if (sext(x, n) + sext(y, n) != e) begin
          if (e > 0) pos++;
          else neg++;
        end
        checks++;
        if (sext(got, n) != e) begin
          failures++;
          $display("FAIL n=%0d a=%0d b=%0d o=%0d expected %0d", n, sext(x, n), sext(y, n), sext(got, n), e);
        end
      end
      $display("n=%0d: positive saturations %0d, negative saturations %0d", n, pos, neg);
      check(pos > 0 && neg > 0, $sformatf("both saturations seen at n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
