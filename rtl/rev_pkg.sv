// rev_pkg: constants and cost figures shared by the reversible saturating adder.
//
// The saturating adder is built only from reversible gates (Feynman, Fredkin
// and HNG). Such circuits are judged by three figures, all functions of the
// operand width n:
//   constant inputs  CI = 2n + 2   (n HNG D lines, the carry-in line, the line
//                                   that copies the MSB carry-in, n lines that
//                                   receive copies of the sum MSB)
//   garbage outputs  GO = n + 2    (n Fredkin side outputs, the MSB carry-out
//                                   and the overflow flag)
//   quantum cost     QC = n*(QC_HNG + QC_FG + QC_FRG) + 2*QC_FG = 12n + 2
// with QC_HNG = 6, QC_FRG = 5 and QC_FG = 1. The gate costs and the formulas
// follow the published design; the functions only let the RTL size its
// constant-line and garbage ports from them.
package rev_pkg;

  localparam int unsigned QC_FG  = 1;  // Feynman (CNOT)
  localparam int unsigned QC_FRG = 5;  // Fredkin (controlled swap)
  localparam int unsigned QC_HNG = 6;  // HNG (reversible full adder)

  // Number of constant input lines of an n-bit saturating adder.
  function automatic int unsigned const_inputs(int unsigned n);
    return 2 * n + 2;
  endfunction

  // Number of garbage output lines of an n-bit saturating adder.
  function automatic int unsigned garbage_outputs(int unsigned n);
    return n + 2;
  endfunction

  // Quantum cost of an n-bit saturating adder: n HNG, n Fredkin and n + 2
  // Feynman gates.
  function automatic int unsigned quantum_cost(int unsigned n);
    return n * (QC_HNG + QC_FG + QC_FRG) + 2 * QC_FG;
  endfunction

endpackage
