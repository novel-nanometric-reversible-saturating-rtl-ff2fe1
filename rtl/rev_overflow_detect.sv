// rev_overflow_detect: overflow detection logic of the saturating adder.
//
// A two's-complement addition overflows exactly when the carry into the most
// significant full adder differs from the carry out of it, so the overflow
// flag is a single XOR. In reversible form that XOR is one Feynman gate: the
// carry out controls it, and its target is the line that holds the copy of
// the MSB carry-in, giving
//   cout_o = cout              (a garbage output)
//   v      = cout xor cmsb     (the overflow flag)
// Overflow can only occur when both operands have the same sign; v then also
// tells that the sum's MSB has the wrong sign. Purely combinational, no clock.
// The single-gate structure follows the published design.
module rev_overflow_detect (
  input  logic cout,    // carry out of the MSB full adder (control)
  input  logic cmsb,    // copy of the carry into the MSB full adder (target)
  output logic cout_o,  // carry out passed through (garbage)
  output logic v        // overflow flag
);

  rev_fg u_fg (
    .a(cout), .b(cmsb),
    .p(cout_o), .q(v)
  );

endmodule
