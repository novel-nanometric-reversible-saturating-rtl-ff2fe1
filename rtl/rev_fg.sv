// rev_fg: Feynman gate (controlled NOT), a 2x2 reversible gate.
//
//   P = A
//   Q = A xor B
//
// With B tied to 0 the gate copies A onto Q (the reversible way to fan a
// signal out, with no garbage); with B tied to 1 it gives Q = not A, which is
// how the saturating adder makes an inverter. The gate is its own inverse.
// Purely combinational, no clock. The equations are those of the standard
// Feynman gate used by the design.
module rev_fg (
  input  logic a,  // control line A
  input  logic b,  // target line B
  output logic p,  // P = A
  output logic q   // Q = A xor B
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
