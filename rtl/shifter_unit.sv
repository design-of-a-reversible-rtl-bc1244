// shifter_unit: the K-stage logarithmic right shifter at the core of the
// barrel shifter.
//
// Stage t (t = 0 .. K-1) is controlled by select bit s[K-1-t] and shifts
// right by 2^(K-1-t), so the first stage makes the largest shift (Stage I
// shifts by 4, Stage II by 2, Stage III by 1 for K = 3) and the stages
// together shift right by the unsigned value of s, 0 .. 2^K - 1. Each stage
// takes its fill bits from the arithmetic right shift control unit: the
// stage shifting by w uses fill[w-1 +: w]. Ancillas and garbage outputs of the
// stages are concatenated, first stage at the bottom.
//
// Stage order and shift amounts follow the source design. Requires
// 2^(K-1) < N. Combinational.
module shifter_unit #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic [K-1:0]      s,        // shift amount
  input  logic [N-1:0]      d,
  input  logic [(1<<K)-2:0] fill,     // from the arithmetic right shift control
  input  logic [rbs_pkg::shifter_ancilla_count(N, K)-1:0] anc,  // constant 0
  output logic [N-1:0]      q,        // d shifted right by s, fill bits entering at the top
  output logic [K*(N+1)-1:0] garbage
);
  // Ancilla offset of stage t: the stages before it used N - 2^(K-1-u) each.
  function automatic int unsigned anc_base(int unsigned t);
    int unsigned acc;
    acc = 0;
    for (int unsigned u = 0; u < t; u++) acc += N - (1 << (K - 1 - u));
    return acc;
  endfunction

  logic [N-1:0] data [K+1];
  assign data[0] = d;

  for (genvar t = 0; t < K; t++) begin : g_stage
    localparam int unsigned W    = 1 << (K - 1 - t);
    localparam int unsigned BASE = anc_base(t);
    shifter_stage #(.N(N), .SHIFT(W)) u_stage (
      .sel     (s[K-1-t]),
      .d       (data[t]),
      .fill    (fill[W-1 +: W]),
      .anc     (anc[BASE +: N-W]),
      .q       (data[t+1]),
      .garbage (garbage[t*(N+1) +: N+1])
    );
  end

  assign q = data[K];

  initial begin
    assert (K >= 1 && (1 << (K - 1)) < N)
      else $error("shifter_unit: need 2^(K-1) < N");
  end
endmodule
