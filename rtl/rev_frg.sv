// rev_frg: Fredkin gate (controlled swap), a 3x3 reversible gate.
//
//   P = A
//   Q = A'B xor AC
//   R = A'C xor AB
//
// A passes straight through. When A = 0 the lines B and C pass unchanged; when
// A = 1 they are swapped. Q is therefore a 2:1 multiplexer (Q = A ? C : B) and
// R carries the unselected input, so no information is lost. The gate is its
// own inverse. Purely combinational, no clock. The equations are those of the
// standard Fredkin gate used by the design.
module rev_frg (
  input  logic a,  // control line A
  input  logic b,  // data line B (selected on Q when A = 0)
  input  logic c,  // data line C (selected on Q when A = 1)
  output logic p,  // P = A
  output logic q,  // Q = A'B xor AC
  output logic r   // R = A'C xor AB
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
