// tb_rev_barrel_shifter: end-to-end test of the (8,3) reversible barrel
// shifter at its default parameters.
//
// Exhaustive: every data word, every shift amount and all eight settings of
// {sra, sla, left}. The four listed operations are checked against plain
// shift operators (>>, >>> on a signed word, <<, and << with the sign bit
// kept). The four unlisted control settings are checked against a
// step-by-step model of the data path (mirror, fill with sra & sign, shift,
// patch the LSB with the sign when sla, mirror back). With the ancillas at 0
// no two input patterns may give the same {o, garbage} pattern, which is
// what reversibility requires. The ancilla and garbage port widths and the
// gate-count formulas are checked against the (8,3) figures: 26 ancillas,
// 32 garbage outputs, 25 Feynman and 34 Fredkin gates, quantum cost 195.
// Each mechanism (mirroring, sign fill, sign-preserving left shift, each
// shifter stage) is counted and must have been exercised.
module tb_rev_barrel_shifter;
  import rbs_pkg::*;

  localparam int N = 8;
  localparam int K = 3;

  logic [N-1:0] i, o;
  logic [K-1:0] s;
  logic         left, sra, sla;
  logic [25:0]  anc;
  logic [31:0]  garbage;
  int checks = 0, failures = 0;

  rev_barrel_shifter dut (
    .i(i), .s(s), .left(left), .sra(sra), .sla(sla),
    .anc(anc), .o(o), .garbage(garbage)
  );

  bit seen [logic [N+31:0]];

  int n_mirror = 0, n_sign_fill = 0, n_sign_keep = 0;
  int n_stage [K];

  function automatic logic [N-1:0] rev(logic [N-1:0] x);
    logic [N-1:0] y;
    for (int b = 0; b < N; b++) y[N-1-b] = x[b];
    return y;
  endfunction

  // Step-by-step model of the data path, used for the unlisted settings.
  function automatic logic [N-1:0] path_model(logic [N-1:0] x, logic [K-1:0] sh,
                                               logic l, logic ar, logic al);
    logic [N-1:0]   r, t;
    logic [2*N-1:0] wide;
    logic           f;
    r    = l ? rev(x) : x;
    f    = ar & r[N-1];
    wide = {{N{f}}, r} >> sh;
    t    = wide[N-1:0];
    if (al) t[0] = r[0];
    return l ? rev(t) : t;
  endfunction

  // Reference for the operations of the design.
  function automatic logic [N-1:0] op_model(logic [N-1:0] x, logic [K-1:0] sh,
                                             logic l, logic ar, logic al);
    logic [N-1:0] y;
    unique case ({ar, al, l})
      3'b000: y = x >> sh;
      3'b100: y = N'($signed(x) >>> sh);
      3'b001: y = x << sh;
      3'b011: begin
        y = x << sh;
        y[N-1] = x[N-1];
      end
      default: y = path_model(x, sh, l, ar, al);
    endcase
    return y;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    anc = '0;

    checks++;
    if ($bits(anc) != ancilla_count(N, K) || ancilla_count(N, K) != 26) begin
      failures++;
      $display("FAIL ancilla count %0d, expected 26", ancilla_count(N, K));
    end
    checks++;
    if ($bits(garbage) != garbage_count(N, K) || garbage_count(N, K) != 32) begin
      failures++;
      $display("FAIL garbage count %0d, expected 32", garbage_count(N, K));
    end
    checks++;
    if (fe_count(N, K) != 25 || fr_count(N, K) != 34 || quantum_cost(N, K) != 195) begin
      failures++;
      $display("FAIL gate counts FE=%0d FR=%0d QC=%0d, expected 25 34 195",
               fe_count(N, K), fr_count(N, K), quantum_cost(N, K));
    end
    checks++;
    if (N + K + 3 + $bits(anc) != N + $bits(garbage)) begin
      failures++;
      $display("FAIL input and output widths of the reversible circuit differ");
    end

    for (int v = 0; v < (1 << (N + K + 3)); v++) begin
      i    = v[N-1:0];
      s    = v[N +: K];
      left = v[N+K];
      sla  = v[N+K+1];
      sra  = v[N+K+2];
      #1;
      exp = op_model(i, s, left, sra, sla);
      checks++;
      if (o !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL i=%h s=%0d sra=%b sla=%b left=%b: o=%h expected %h",
                   i, s, sra, sla, left, o, exp);
      end
      checks++;
      if (seen.exists({o, garbage})) begin
        failures++;
        if (failures < 20)
          $display("FAIL two inputs map to output %h/%h", o, garbage);
      end
      seen[{o, garbage}] = 1'b1;

      if (left && i != rev(i)) n_mirror++;
      if (!left && sra && i[N-1] && s != 0) n_sign_fill++;
      if (left && sla && (i[N-1] != i[N-1-s]) && s != 0) n_sign_keep++;
      for (int t = 0; t < K; t++) if (s[K-1-t]) n_stage[t]++;
    end

    checks++;
    if (n_mirror == 0) begin failures++; $display("FAIL no mirrored (left) shift"); end
    checks++;
    if (n_sign_fill == 0) begin failures++; $display("FAIL no sign fill seen"); end
    checks++;
    if (n_sign_keep == 0) begin failures++; $display("FAIL no sign-preserving left shift seen"); end
    for (int t = 0; t < K; t++) begin
      checks++;
      if (n_stage[t] == 0) begin failures++; $display("FAIL stage %0d never shifted", t); end
    end
    $display("mechanisms: mirror=%0d sign_fill=%0d sign_keep=%0d stage0=%0d stage1=%0d stage2=%0d",
             n_mirror, n_sign_fill, n_sign_keep, n_stage[0], n_stage[1], n_stage[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
