// rev_sat_value_gen: reversible saturation value generator.
//
// Chooses the final result O of the saturating adder. With no overflow
// (v = 0) O equals the sum Z. On overflow (v = 1) O is the saturation value:
// the largest positive number 0111..1 when two positive operands overflowed,
// the most negative number 1000..0 when two negative operands did. After such
// an overflow the sum's MSB Z[N-1] has the wrong sign (1 for a positive
// overflow, 0 for a negative one), so the saturation value is simply
//   O[N-1] = not Z[N-1],  O[i] = Z[N-1] for i < N-1.
//
// Reversible construction: N Feynman gates controlled by the Z[N-1] line write
// Z[N-1] onto the constant lines k[i] (k[i] = 0 for i < N-1, giving copies)
// and onto k[N-1] (= 1, giving not Z[N-1]). Then, for each bit, a Fredkin gate
// controlled by v selects between Z[i] (v = 0) and its saturation bit (v = 1);
// its other data output is a garbage line g[i]. v runs through all Fredkin
// gates and leaves as v_o. All N Feynman gates are driven from the Z[N-1]
// line itself, as in the published complete circuit (an equivalent chained
// variant copies the copies; the result is the same). Purely combinational,
// no clock. The width is a parameter, 4 by default.
module rev_sat_value_gen #(
  parameter int unsigned N = 4  // operand width in bits
) (
  input  logic         v,    // overflow flag (Fredkin control)
  input  logic [N-1:0] z,    // sum from the adder
  input  logic [N-1:0] k,    // constant lines: 0 for bits 0..N-2, 1 for bit N-1
  output logic         v_o,  // v passed through (garbage)
  output logic [N-1:0] o,    // saturated result
  output logic [N-1:0] g     // unselected Fredkin outputs (garbage)
);

  // zm[j] is the Z[N-1] line after the j-th copying Feynman gate.
  logic [N:0]   zm;
  // Saturation value bits produced on the constant lines.
  logic [N-1:0] sat;
  // v line between consecutive Fredkin gates, from the MSB gate down.
  logic [N:0]   vm;

  assign zm[0] = z[N-1];

  for (genvar j = 0; j < N; j++) begin : g_copy
    rev_fg u_fg (
      .a(zm[j]), .b(k[j]),
      .p(zm[j+1]), .q(sat[j])
    );
  end

  // Fredkin gates, controlled by v, taken from the MSB down as drawn.
  assign vm[0] = v;

  for (genvar j = 0; j < N; j++) begin : g_sel
    localparam int unsigned BIT = N - 1 - j;
    // The MSB gate selects on the Z[N-1] line after the copies.
    logic zin;
    if (BIT == N - 1) begin : g_msb
      assign zin = zm[N];
    end else begin : g_low
      assign zin = z[BIT];
    end
    rev_frg u_frg (
      .a(vm[j]), .b(zin), .c(sat[BIT]),
      .p(vm[j+1]), .q(o[BIT]), .r(g[BIT])
    );
  end

  assign v_o = vm[N];

endmodule
