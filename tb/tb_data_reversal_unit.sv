// tb_data_reversal_unit: exhaustive check of the conditional bit reversal at
// N = 8 (all 256 words, both directions) and a random check at N = 16. The
// expected word is built bit by bit, and the control line must leave the
// chain unchanged. Combinational.
module tb_data_reversal_unit;
  logic        c8, co8, c16, co16;
  logic [7:0]  d8, q8;
  logic [15:0] d16, q16;
  int checks = 0, failures = 0;

  data_reversal_unit #(.N(8))  dut8  (.ctrl(c8),  .d(d8),  .q(q8),  .ctrl_out(co8));
  data_reversal_unit #(.N(16)) dut16 (.ctrl(c16), .d(d16), .q(q16), .ctrl_out(co16));

  function automatic logic [15:0] rev(logic [15:0] x, int n);
    logic [15:0] y = '0;
    for (int b = 0; b < n; b++) y[n-1-b] = x[b];
    return y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    c16 = 0; d16 = '0;
    for (int v = 0; v < 512; v++) begin
      c8 = v[8];
      d8 = v[7:0];
      #1;
      exp = c8 ? rev({8'h00, d8}, 8) : {8'h00, d8};
      checks++;
      if (q8 !== exp[7:0] || co8 !== c8) begin
        failures++;
        $display("FAIL N=8 ctrl=%b d=%h q=%h expected %h", c8, d8, q8, exp[7:0]);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      c16 = 1'($urandom);
      d16 = 16'($urandom);
      #1;
      exp = c16 ? rev(d16, 16) : d16;
      checks++;
      if (q16 !== exp || co16 !== c16) begin
        failures++;
        $display("FAIL N=16 ctrl=%b d=%h q=%h expected %h", c16, d16, q16, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
