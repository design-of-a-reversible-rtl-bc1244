// tb_rbs_tables: runs the reversible barrel shifter at every (n,k) size of
// the garbage / ancilla / quantum-cost tables (n = 4 .. 64, k = 2 .. 6,
// 2^k <= n), checking the four operations on random data and the circuit's
// ancilla and garbage counts and quantum cost against the tabulated values.
// For the smallest size, (4,2), it also proves reversibility outright: all
// 2^19 patterns of the 19 circuit inputs (4 data, 2 select, 3 control,
// 10 ancilla) must give 2^19 different patterns on the 19 outputs
// (4 data, 15 garbage).
module tb_rbs_tables;
  localparam int NCFG = 15;
  // Row c of the tables: {n, k, garbage, ancilla, quantum cost}.
  function automatic int cfg(int c, int f);
    int row [5];
    unique case (c)
      0:  row = '{ 4, 2,  15,  10,   79};
      1:  row = '{ 8, 2,  23,  18,  147};
      2:  row = '{ 8, 3,  32,  26,  195};
      3:  row = '{16, 2,  39,  34,  283};
      4:  row = '{16, 3,  56,  50,  379};
      5:  row = '{16, 4,  73,  66,  475};
      6:  row = '{32, 2,  71,  66,  555};
      7:  row = '{32, 3, 104,  98,  747};
      8:  row = '{32, 4, 137, 130,  939};
      9:  row = '{32, 5, 170, 162, 1131};
      10: row = '{64, 2, 135, 130, 1099};
      11: row = '{64, 3, 200, 194, 1483};
      12: row = '{64, 4, 265, 258, 1867};
      13: row = '{64, 5, 330, 322, 2251};
      default: row = '{64, 6, 395, 386, 2635};
    endcase
    return row[f];
  endfunction

  int   c_checks [NCFG];
  int   c_fail   [NCFG];
  logic c_done   [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    tb_rbs_config #(.N(cfg(c, 0)), .K(cfg(c, 1)), .GO(cfg(c, 2)),
                    .AN(cfg(c, 3)), .QC(cfg(c, 4))) u_chk (
      .checks(c_checks[c]), .failures(c_fail[c]), .done(c_done[c])
    );
  end

  // Exhaustive bijection check of the (4,2) circuit.
  logic [3:0]  bi, bo;
  logic [1:0]  bs;
  logic        bleft, bsra, bsla;
  logic [9:0]  banc;
  logic [14:0] bgarb;
  rev_barrel_shifter #(.N(4), .K(2)) u_bij (
    .i(bi), .s(bs), .left(bleft), .sra(bsra), .sla(bsla),
    .anc(banc), .o(bo), .garbage(bgarb)
  );
  bit seen [1 << 19];

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dup;
    dup = 0;
    for (int v = 0; v < (1 << 19); v++) begin
      {banc, bsla, bsra, bleft, bs, bi} = 19'(v);
      #1;
      if (seen[{bgarb, bo}]) dup++;
      seen[{bgarb, bo}] = 1'b1;
    end
    checks++;
    if (dup != 0) begin
      failures++;
      $display("FAIL (4,2) is not a bijection: %0d repeated output patterns", dup);
    end else begin
      $display("(4,2): all 524288 input patterns map to distinct outputs");
    end

    for (int c = 0; c < NCFG; c++) wait (c_done[c]);
    for (int c = 0; c < NCFG; c++) begin
      checks   += c_checks[c];
      failures += c_fail[c];
      $display("(%0d,%0d): checks=%0d failures=%0d", cfg(c, 0), cfg(c, 1), c_checks[c], c_fail[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
