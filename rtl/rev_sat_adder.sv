// rev_sat_adder: N-bit reversible saturating adder (top level).
//
// Adds two N-bit two's-complement numbers and, instead of wrapping around on
// overflow, clamps the result: 0111..1 (the largest positive value) when two
// positive operands overflow, 1000..0 (the most negative value) when two
// negative operands do. Such saturating addition is what digital filters and
// other DSP kernels need. The adder is built entirely from reversible gates
// (HNG full adders, Fredkin and Feynman gates, see rev_sat_adder_core), so
// its full input-to-output line mapping is a bijection.
//
// This level ties the 2N+2 constant input lines to their values (the carry in
// is 0) and brings out the operands, which pass through the circuit, the
// saturated sum and the N+2 garbage lines; the garbage carries the overflow
// flag as g[N+1] and the MSB carry out as g[N]. Purely combinational, no
// clock: o settles one gate chain (N HNG gates, two Feynman gates and the
// MSB Fredkin gate) after a or b changes. Default width 4, as in the published
// design; the published circuit scales to any N, which the parameter allows.
module rev_sat_adder
  import rev_pkg::*;
#(
  parameter int unsigned N = 4  // operand width in bits
) (
  input  logic [N-1:0]                  a,    // operand a
  input  logic [N-1:0]                  b,    // operand b
  output logic [N-1:0]                  a_o,  // a passed through
  output logic [N-1:0]                  b_o,  // b passed through
  output logic [N-1:0]                  o,    // saturated sum
  output logic [garbage_outputs(N)-1:0] g     // garbage lines (see core)
);

  localparam int unsigned CI = const_inputs(N);

  // Constant lines: all 0 except the saturation line of the MSB, which is 1
  // so that its Feynman gate inverts the sum MSB.
  localparam logic [CI-1:0] ANC = CI'(1) << (CI - 1);

  rev_sat_adder_core #(.N(N)) u_core (
    .a   (a),
    .b   (b),
    .anc (ANC),
    .a_o (a_o),
    .b_o (b_o),
    .o   (o),
    .g   (g)
  );

endmodule
