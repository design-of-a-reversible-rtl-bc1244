// shifter_stage: one stage of the logarithmic shifter core: a conditional
// right shift by SHIFT bit positions, built from N Fredkin gates and
// N - SHIFT Feynman copiers.
//
// Output bit j must be d[j] (sel = 0) or d[j+SHIFT] (sel = 1). Every input
// bit at position j >= SHIFT is therefore needed twice, so a Feynman gate
// with a constant-0 ancilla copies it: one copy goes to Fredkin gate j as its
// "stay" input, the other to gate j - SHIFT as its "move" input. The top
// SHIFT gates get their "move" input from the fill bits instead (zeros, or
// the sign for an arithmetic shift). Fredkin gate j has the select line on
// its control input, the stay bit on b and the move bit on c, so q[j] is
// sel ? move : stay and the other data output is garbage. The select line
// runs through all N gates and leaves the last one as one more garbage bit,
// giving N + 1 garbage outputs per stage.
//
// Structure follows the source design; port names are this design's.
// Combinational.
module shifter_stage #(
  parameter int unsigned N     = 8,
  parameter int unsigned SHIFT = 4
) (
  input  logic             sel,      // 1: shift right by SHIFT
  input  logic [N-1:0]     d,
  input  logic [SHIFT-1:0] fill,     // bits shifted in at the top
  input  logic [N-SHIFT-1:0] anc,    // constant-0 ancillas of the copiers
  output logic [N-1:0]     q,        // sel ? {fill, d[N-1:SHIFT]} : d
  output logic [N:0]       garbage   // [N-1:0] unused mux outputs, [N] select line
);
  logic [N-1:0] stay;   // input of gate j when sel = 0
  logic [N-1:0] move;   // input of gate j when sel = 1
  logic [N:0]   chain;  // select line entering gate j

  // Bits below SHIFT are used only once: no copier.
  for (genvar j = 0; j < SHIFT; j++) begin : g_low
    assign stay[j] = d[j];
  end

  // Bits at and above SHIFT: copy, one copy stays, one moves down by SHIFT.
  for (genvar j = SHIFT; j < N; j++) begin : g_copy
    feynman_gate u_fe (
      .a (d[j]),
      .b (anc[j-SHIFT]),
      .p (stay[j]),
      .q (move[j-SHIFT])
    );
  end

  // The top SHIFT positions take the fill bits when shifting.
  for (genvar j = N - SHIFT; j < N; j++) begin : g_fill
    assign move[j] = fill[j-(N-SHIFT)];
  end

  assign chain[0] = sel;
  for (genvar j = 0; j < N; j++) begin : g_mux
    fredkin_gate u_fr (
      .a (chain[j]),
      .b (stay[j]),
      .c (move[j]),
      .p (chain[j+1]),
      .q (q[j]),
      .r (garbage[j])
    );
  end
  assign garbage[N] = chain[N];

  initial begin
    assert (SHIFT >= 1 && SHIFT < N)
      else $error("shifter_stage: SHIFT must be between 1 and N-1");
  end
endmodule
