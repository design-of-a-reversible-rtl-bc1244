// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate against its
// truth table, plus its self-inverse property (two gates in series restore
// the inputs). Combinational; a watchdog ends the run if it hangs.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));
  feynman_gate inv (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected {p,q} for inputs ab = 00, 01, 10, 11
    automatic logic [1:0] tt [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== tt[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: p=%b q=%b expected %b", a, b, p, q, tt[v]);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
