// rev_ripple_adder: n-bit reversible ripple-carry adder built from HNG gates.
//
// Stage i is an HNG gate with A = a[i], B = b[i], C = carry into stage i and
// D = d[i] (a constant-0 line). Its R output is the sum bit z[i] and its S
// output the carry into stage i+1, which feeds the C input of the next HNG.
// Stage 0 takes its carry from the cin line, which the saturating adder ties
// to 0.
//
// Overflow detection needs the carry into the most significant stage as well
// as the carry out of it, but reversible lines cannot fan out. So, before the
// MSB stage consumes that carry, a Feynman gate copies it onto the line k
// (a constant 0 in use): cmsb = k xor c[N-1]. The cmsb and cout outputs feed
// the overflow detection gate.
//
// All lines pass through: 2N + N + 2 lines in, the same number out, and the
// mapping is a bijection. Purely combinational, no clock; the ripple path is
// N gates long. The structure (HNG chain plus carry copy ahead of the last
// stage) follows the published circuit; the width is a parameter, 4 by default.
module rev_ripple_adder #(
  parameter int unsigned N = 4  // operand width in bits
) (
  input  logic [N-1:0] a,     // operand a
  input  logic [N-1:0] b,     // operand b
  input  logic         cin,   // carry-in line (0 in the saturating adder)
  input  logic [N-1:0] d,     // HNG D lines (0 for full-adder use)
  input  logic         k,     // line receiving the MSB carry-in copy (0)
  output logic [N-1:0] a_o,   // a passed through (HNG P outputs)
  output logic [N-1:0] b_o,   // b passed through (HNG Q outputs)
  output logic [N-1:0] z,     // sum (HNG R outputs)
  output logic         cout,  // carry out of the MSB stage
  output logic         cmsb   // k xor carry into the MSB stage
);

  // c[i] is the carry into stage i, c[N] the carry out.
  logic [N:0] c;
  // Carry into the MSB stage after it has passed the copying Feynman gate.
  logic       c_msb_pass;

  assign c[0] = cin;

  for (genvar i = 0; i < N - 1; i++) begin : g_stage
    rev_hng u_hng (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(d[i]),
      .p(a_o[i]), .q(b_o[i]), .r(z[i]), .s(c[i+1])
    );
  end

  // Copy the MSB carry-in before the last stage uses it.
  rev_fg u_copy (
    .a(c[N-1]), .b(k),
    .p(c_msb_pass), .q(cmsb)
  );

  rev_hng u_msb (
    .a(a[N-1]), .b(b[N-1]), .c(c_msb_pass), .d(d[N-1]),
    .p(a_o[N-1]), .q(b_o[N-1]), .r(z[N-1]), .s(c[N])
  );

  assign cout = c[N];

endmodule
