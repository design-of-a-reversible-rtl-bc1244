// rev_barrel_shifter: (N,K) reversible bidirectional arithmetic and logical
// barrel shifter, built only from reversible Fredkin and Feynman gates.
//
// The core is a right-only logarithmic shifter. Left shifts reuse it by
// mirroring the word before and after it (reverse, shift right by s,
// reverse), so the data path is:
//
//   i -> data reversal unit I (left) -> arithmetic right shift control (sra)
//     -> shifter unit, K stages shifting by 2^(K-1) .. 1 (s)
//     -> arithmetic left shift control (sla) -> data reversal unit II (left) -> o
//
// The arithmetic right shift control feeds the shifter's fill bits: copies of
// sra & sign, so vacated top bits become sign copies for an arithmetic right
// shift and zeros otherwise. The arithmetic left shift control keeps the sign
// bit: with sla = 1 the shifter's output LSB (the result's MSB, once mirrored
// back) is replaced by the original sign bit. Because a reversible circuit may
// not fan a wire out, every signal needed twice is duplicated by a Feynman
// gate with a constant-0 ancilla input, and every select line is threaded
// through its gates and leaves the circuit as a garbage output.
//
// Supported operations (control {sra, sla, left}):
//   000 logical right shift     o = i >> s
//   100 arithmetic right shift  o = i >>> s (signed)
//   001 logical left shift      o = i << s
//   011 arithmetic left shift   o = {i[N-1], (i << s)[N-2:0]}
// Other control combinations are not operations of the design; the circuit
// still produces a defined (reversible) result for them.
//
// Interface: anc are the circuit's ancilla inputs and must be held at 0 for
// the shifter to work; garbage are its garbage outputs. Their widths are the
// circuit's ancilla and garbage counts, for (8,3) 26 and 32. Inputs plus
// ancillas and outputs plus garbage have the same width, and the mapping
// between them is a bijection. Ancilla order (LSB first): arithmetic right
// shift control, shifter stages (first stage lowest), arithmetic left shift
// control. Garbage order: shifter stages, arithmetic right shift control,
// arithmetic left shift control, direction line leaving reversal unit II.
// Several garbage bits are the control lines themselves (s, sra, sla, left
// after passing through their gate rows); that is inherent in the circuit.
//
// Timing: purely combinational, no clock, no state; a result is valid one
// propagation delay after the inputs, so one shift completes per cycle of
// any enclosing clocked design.
//
// The unit partition, gate types, gate counts and the (8,3) default follow
// the source design; the port names, the ancilla/garbage port ordering and
// the linear (rather than tree-shaped) fill-bit copier chain are this
// design's choices. Requires N even, N >= 4 and 2^(K-1) < N.
module rev_barrel_shifter
  import rbs_pkg::*;
#(
  parameter int unsigned N = 8,  // data width n
  parameter int unsigned K = 3   // select lines k
) (
  input  logic [N-1:0] i,        // data in
  input  logic [K-1:0] s,        // shift amount S[K-1:0]
  input  logic         left,     // 1: shift left
  input  logic         sra,      // 1: arithmetic right shift
  input  logic         sla,      // 1: arithmetic left shift
  input  logic [ancilla_count(N, K)-1:0] anc,       // ancillas, all 0
  output logic [N-1:0] o,        // shifted data
  output logic [garbage_count(N, K)-1:0] garbage    // garbage outputs
);
  localparam int unsigned ARS_ANC = ars_ancilla_count(K);
  localparam int unsigned SH_ANC  = shifter_ancilla_count(N, K);
  localparam int unsigned SH_GO   = K * (N + 1);

  // Data reversal control unit I.
  logic [N-1:0] rev_in;
  logic         left_mid;
  data_reversal_unit #(.N(N)) u_rev1 (
    .ctrl     (left),
    .d        (i),
    .q        (rev_in),
    .ctrl_out (left_mid)
  );

  // Arithmetic right shift control unit: copies the MSB, makes the fill bits.
  logic                msb_to_shifter;
  logic [(1<<K)-2:0]   fill;
  ars_control_unit #(.K(K)) u_ars (
    .sra     (sra),
    .msb_in  (rev_in[N-1]),
    .anc     (anc[0 +: ARS_ANC]),
    .msb_out (msb_to_shifter),
    .fill    (fill),
    .garbage (garbage[SH_GO +: 2])
  );

  // Arithmetic left shift control unit: copies bit 0 before the shift and
  // replaces the shifter's output LSB after it.
  logic         d0_to_shifter;
  logic [N-1:0] sh_out;
  logic         lsb_fixed;
  als_control_unit u_als (
    .sla         (sla),
    .d0_in       (rev_in[0]),
    .anc         (anc[ARS_ANC + SH_ANC]),
    .d0_out      (d0_to_shifter),
    .shifter_lsb (sh_out[0]),
    .lsb_out     (lsb_fixed),
    .garbage     (garbage[SH_GO + 2 +: 2])
  );

  // Shifter unit.
  shifter_unit #(.N(N), .K(K)) u_shift (
    .s       (s),
    .d       ({msb_to_shifter, rev_in[N-2:1], d0_to_shifter}),
    .fill    (fill),
    .anc     (anc[ARS_ANC +: SH_ANC]),
    .q       (sh_out),
    .garbage (garbage[0 +: SH_GO])
  );

  // Data reversal control unit II.
  data_reversal_unit #(.N(N)) u_rev2 (
    .ctrl     (left_mid),
    .d        ({sh_out[N-1:1], lsb_fixed}),
    .q        (o),
    .ctrl_out (garbage[SH_GO + 4])
  );

  initial begin
    assert (N >= 4 && N % 2 == 0 && K >= 1 && (1 << (K - 1)) < N)
      else $error("rev_barrel_shifter: need N even, N >= 4 and 2^(K-1) < N");
  end
endmodule
