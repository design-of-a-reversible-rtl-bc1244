// tb_shifter_stage: exhaustive check of one conditional right-shift stage at
// N = 8 for the three shift widths of an (8,3) shifter (4, 2 and 1): all
// data words, both select values, random fill bits. The expected word is
// assembled bit by bit; the last garbage bit must carry the select line.
// Combinational.
module tb_shifter_stage;
  logic       sel;
  logic [7:0] d, q4, q2, q1;
  logic [3:0] fill4;
  logic [1:0] fill2;
  logic       fill1;
  logic [8:0] g4, g2, g1;
  int checks = 0, failures = 0;

  shifter_stage #(.N(8), .SHIFT(4)) dut4 (.sel(sel), .d(d), .fill(fill4), .anc('0), .q(q4), .garbage(g4));
  shifter_stage #(.N(8), .SHIFT(2)) dut2 (.sel(sel), .d(d), .fill(fill2), .anc('0), .q(q2), .garbage(g2));
  shifter_stage #(.N(8), .SHIFT(1)) dut1 (.sel(sel), .d(d), .fill(fill1), .anc('0), .q(q1), .garbage(g1));

  function automatic logic [7:0] ref_shift(logic [7:0] x, logic s, int w, logic [3:0] f);
    logic [7:0] y;
    if (!s) return x;
    for (int j = 0; j < 8; j++) y[j] = (j + w < 8) ? x[j+w] : f[j+w-8];
    return y;
  endfunction

  task automatic check(string tag, logic [7:0] got, logic [7:0] exp, logic gsel);
    checks++;
    if (got !== exp || gsel !== sel) begin
      failures++;
      $display("FAIL %s sel=%b d=%h: q=%h expected %h", tag, sel, d, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      sel   = v[8];
      d     = v[7:0];
      fill4 = 4'($urandom);
      fill2 = 2'($urandom);
      fill1 = 1'($urandom);
      #1;
      check("shift4", q4, ref_shift(d, sel, 4, fill4), g4[8]);
      check("shift2", q2, ref_shift(d, sel, 2, {2'b00, fill2}), g2[8]);
      check("shift1", q1, ref_shift(d, sel, 1, {3'b000, fill1}), g1[8]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
