// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Maps (a, b) to (p = a, q = a ^ b). It is its own inverse. With b tied to a
// constant-0 ancilla it produces a second copy of a (q = a); this is the only
// way the shifter uses it, because a reversible circuit may not fan a wire
// out. With b = 1 it would give the complement of a. Quantum cost 1.
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,  // control input, passed through
  input  logic b,  // target input
  output logic p,  // = a
  output logic q   // = a xor b
);
  assign p = a;
  assign q = a ^ b;
endmodule
