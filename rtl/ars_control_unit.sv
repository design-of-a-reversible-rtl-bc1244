// ars_control_unit: arithmetic right shift control unit.
//
// Produces the 2^K - 1 bits that the shifter stages shift in at the top of
// the word: copies of the sign bit for an arithmetic right shift (sra = 1),
// zeros otherwise. A Feynman gate first copies the incoming MSB (the sign
// bit): one copy continues to the shifter on msb_out, the other enters a
// single Fredkin gate whose control is sra and whose other data input is a
// constant-0 ancilla, so one Fredkin output is sra & sign. That fill bit is
// then copied by a chain of 2^K - 2 Feynman gates into 2^K - 1 copies, since
// no wire may fan out: stage shifting by s consumes s of them, and the K
// stages together shift by 1 + 2 + ... + 2^(K-1) = 2^K - 1 at most.
//
// Gate counts (one Fredkin, 2^K - 1 Feynman gates, 2^K ancillas, two
// garbage outputs) follow the source design. The copier gates are chained
// one after another here rather than arranged as a fan-out tree; the count is
// the same. fill[s-1 +: s] is the slice meant for the stage that shifts by s.
// Combinational.
module ars_control_unit #(
  parameter int unsigned K = 3
) (
  input  logic                           sra,      // 1: arithmetic right shift
  input  logic                           msb_in,   // sign bit of the shifter input
  input  logic [rbs_pkg::ars_ancilla_count(K)-1:0] anc,  // constant-0 ancillas
  output logic                           msb_out,  // sign bit, on to the shifter
  output logic [(1<<K)-2:0]              fill,     // 2^K - 1 copies of sra & sign
  output logic [1:0]                     garbage   // Fredkin control and unused output
);
  localparam int unsigned NFILL = (1 << K) - 1;

  logic sign_copy;
  feynman_gate u_fe_sign (
    .a (msb_in),
    .b (anc[0]),
    .p (msb_out),
    .q (sign_copy)
  );

  // Fredkin: a = sra, b = ancilla 0, c = sign  ->  q = sra & sign.
  logic fill_src;
  fredkin_gate u_fr (
    .a (sra),
    .b (anc[1]),
    .c (sign_copy),
    .p (garbage[0]),
    .q (fill_src),
    .r (garbage[1])
  );

  // Copier chain: gate t takes the running copy and an ancilla, keeps one
  // copy as fill[t] and hands the other to gate t + 1.
  logic [NFILL-1:0] run;
  assign run[0] = fill_src;
  for (genvar t = 0; t < NFILL - 1; t++) begin : g_copy
    feynman_gate u_fe (
      .a (run[t]),
      .b (anc[2+t]),
      .p (fill[t]),
      .q (run[t+1])
    );
  end
  assign fill[NFILL-1] = run[NFILL-1];

  initial begin
    assert (K >= 1) else $error("ars_control_unit: K must be at least 1");
  end
endmodule
