// data_reversal_unit: conditional bit-order reversal of an N-bit word,
// built from a chain of N/2 Fredkin gates.
//
// Fredkin gate j (j = 0 .. N/2-1) takes the mirrored pair d[N-1-j], d[j] on
// its data inputs and the direction line on its control input. With ctrl = 0
// the pair passes straight through; with ctrl = 1 it is swapped, so the whole
// word comes out bit-reversed. The control line runs from gate to gate
// through each gate's pass-through output (no fan-out), and leaves the last
// gate on ctrl_out. The design uses this unit twice: unit I in front of the
// shifter (its ctrl_out carries the direction on to unit II) and unit II
// behind it (its ctrl_out is a garbage output). This turns the right-only
// shifter core into a bidirectional one: reverse, shift right, reverse.
//
// Gate-by-gate structure and pairing follow the source design; N must be
// even. Ports: d/q data, ctrl/ctrl_out direction line. Combinational.
module data_reversal_unit #(
  parameter int unsigned N = 8
) (
  input  logic         ctrl,      // 1: reverse bit order
  input  logic [N-1:0] d,
  output logic [N-1:0] q,         // ctrl ? reversed(d) : d
  output logic         ctrl_out   // the control line after the last gate
);
  localparam int unsigned HALF = N / 2;

  // chain[j] is the control line entering gate j.
  logic [HALF:0] chain;
  assign chain[0] = ctrl;

  for (genvar j = 0; j < HALF; j++) begin : g_pair
    fredkin_gate u_fr (
      .a (chain[j]),
      .b (d[N-1-j]),
      .c (d[j]),
      .p (chain[j+1]),
      .q (q[N-1-j]),
      .r (q[j])
    );
  end

  assign ctrl_out = chain[HALF];

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $error("data_reversal_unit: N must be even and at least 2");
  end
endmodule
