// fredkin_gate: 3x3 reversible Fredkin (controlled swap) gate.
//
// Maps (a, b, c) to (p = a, q = !a&b | a&c, r = a&b | !a&c): when the
// control a is 1 the two data lines are swapped, otherwise they pass
// straight through. Both data outputs are 2:1 multiplexers with opposite
// select polarity, which is why the shifter uses it as its mux element. The
// gate is its own inverse. Quantum cost 5. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,  // control (select) input, passed through
  input  logic b,  // data input
  input  logic c,  // data input
  output logic p,  // = a
  output logic q,  // a ? c : b
  output logic r   // a ? b : c
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
