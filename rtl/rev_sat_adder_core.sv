// rev_sat_adder_core: the complete reversible saturating adder, every line
// exposed.
//
// This is the full reversible circuit with its constant lines left as inputs,
// so that it can be checked as what it is: a bijection from 4N+2 input lines
// to 4N+2 output lines. Gate order along the lines:
//   1. N HNG gates add a and b (ripple carry, carry-in on anc[0]); a Feynman
//      gate copies the carry into the MSB stage before that stage uses it
//      (rev_ripple_adder).
//   2. One Feynman gate forms the overflow flag v = carry-in xor carry-out of
//      the MSB stage (rev_overflow_detect).
//   3. N Feynman gates copy / invert the sum MSB and N Fredkin gates select
//      the sum or the saturation value under control of v
//      (rev_sat_value_gen).
// Total: N HNG, N Fredkin, N+2 Feynman gates.
//
// Constant input lines, anc (2N+2 of them; rev_sat_adder ties them):
//   anc[0]            carry-in line                         (0)
//   anc[N:1]          D lines of HNG 0..N-1                 (0)
//   anc[N+1]          receives the copy of the MSB carry-in (0)
//   anc[2N+1:N+2]     saturation lines for bits 0..N-1      (0...0, 1 for MSB)
// Garbage output lines, g (N+2 of them):
//   g[N-1:0]          unselected Fredkin outputs of bits 0..N-1
//   g[N]              carry out of the MSB stage
//   g[N+1]            overflow flag v
// With the constants at their values, o is the saturated sum of a and b as
// N-bit two's-complement numbers. Purely combinational, no clock. The gate
// network follows the published 4-bit circuit, generalised to N bits.
module rev_sat_adder_core
  import rev_pkg::*;
#(
  parameter int unsigned N = 4  // operand width in bits
) (
  input  logic [N-1:0]                    a,    // operand a
  input  logic [N-1:0]                    b,    // operand b
  input  logic [const_inputs(N)-1:0]      anc,  // constant input lines
  output logic [N-1:0]                    a_o,  // a passed through
  output logic [N-1:0]                    b_o,  // b passed through
  output logic [N-1:0]                    o,    // saturated sum
  output logic [garbage_outputs(N)-1:0]   g     // garbage output lines
);

  logic [N-1:0] z;     // unsaturated sum
  logic         cout;  // carry out of the MSB stage
  logic         cmsb;  // copy of the carry into the MSB stage
  logic         v;     // overflow flag

  rev_ripple_adder #(.N(N)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (anc[0]),
    .d    (anc[N:1]),
    .k    (anc[N+1]),
    .a_o  (a_o),
    .b_o  (b_o),
    .z    (z),
    .cout (cout),
    .cmsb (cmsb)
  );

  rev_overflow_detect u_odl (
    .cout   (cout),
    .cmsb   (cmsb),
    .cout_o (g[N]),
    .v      (v)
  );

  rev_sat_value_gen #(.N(N)) u_svg (
    .v   (v),
    .z   (z),
    .k   (anc[2*N+1:N+2]),
    .v_o (g[N+1]),
    .o   (o),
    .g   (g[N-1:0])
  );

endmodule
