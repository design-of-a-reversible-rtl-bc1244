// als_control_unit: arithmetic left shift control unit.
//
// A left shift is done as reverse / shift right / reverse, so in the
// reversed word the sign bit of the original data sits at bit 0 and the
// result's MSB comes out of the shifter's LSB. For an arithmetic left shift
// (sla = 1) the sign must be kept in place, so this unit replaces the
// shifter's LSB by the sign. A Feynman gate copies bit 0 of the shifter's
// input word (d0_in) before the shift: one copy continues into the shifter
// on d0_out, the other enters a Fredkin gate controlled by sla whose other
// data input is the shifter's output LSB. One Fredkin output is therefore
// sla ? sign : lsb; the control line and the other output are garbage.
//
// One Fredkin, one Feynman gate, one ancilla and two garbage outputs, as in
// the source design; which Fredkin output is used is this design's choice.
// Combinational.
module als_control_unit (
  input  logic       sla,          // 1: arithmetic left shift
  input  logic       d0_in,        // bit 0 of the shifter's input (sign when reversed)
  input  logic       anc,          // constant-0 ancilla
  output logic       d0_out,       // d0_in, on to the shifter
  input  logic       shifter_lsb,  // bit 0 of the shifter's output
  output logic       lsb_out,      // sla ? sign : shifter_lsb
  output logic [1:0] garbage
);
  logic sign_copy;
  feynman_gate u_fe (
    .a (d0_in),
    .b (anc),
    .p (d0_out),
    .q (sign_copy)
  );

  fredkin_gate u_fr (
    .a (sla),
    .b (shifter_lsb),
    .c (sign_copy),
    .p (garbage[0]),
    .q (lsb_out),
    .r (garbage[1])
  );
endmodule
