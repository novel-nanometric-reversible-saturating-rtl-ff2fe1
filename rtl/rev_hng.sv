// rev_hng: HNG gate, a 4x4 reversible gate that works as a full adder.
//
//   P = A
//   Q = B
//   R = A xor B xor C
//   S = (A xor B)C xor AB xor D
//
// With D = 0 the gate is a full adder: A and B are the operand bits, C is the
// carry in, R is the sum and S the carry out, while A and B are passed on
// unchanged. The mapping is a bijection on its 16 input patterns. Only the
// Boolean function is modelled (the gate's quantum realisation, four
// controlled-V and two CNOT operations for a quantum cost of 6, is not).
// Purely combinational, no clock. The equations are those of the published
// HNG gate.
module rev_hng (
  input  logic a,  // A: operand bit
  input  logic b,  // B: operand bit
  input  logic c,  // C: carry in
  input  logic d,  // D: 0 for full-adder use
  output logic p,  // P = A
  output logic q,  // Q = B
  output logic r,  // R = A xor B xor C (sum)
  output logic s   // S = (A xor B)C xor AB xor D (carry out)
);

  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end

endmodule
