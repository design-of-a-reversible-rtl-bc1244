// tb_ars_control_unit: exhaustive check of the arithmetic right shift
// control unit for K = 3 and K = 2: the sign bit passes through, every fill
// bit equals sra & sign, and the two garbage bits are sra and !sra & sign.
// Combinational.
module tb_ars_control_unit;
  logic       sra3, msb3, mo3, sra2, msb2, mo2;
  logic [7:0] anc3;
  logic [3:0] anc2;
  logic [6:0] fill3;
  logic [2:0] fill2;
  logic [1:0] g3, g2;
  int checks = 0, failures = 0;

  ars_control_unit #(.K(3)) dut3 (.sra(sra3), .msb_in(msb3), .anc(anc3),
                                  .msb_out(mo3), .fill(fill3), .garbage(g3));
  ars_control_unit #(.K(2)) dut2 (.sra(sra2), .msb_in(msb2), .anc(anc2),
                                  .msb_out(mo2), .fill(fill2), .garbage(g2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic f;
    anc3 = '0;
    anc2 = '0;
    for (int v = 0; v < 4; v++) begin
      {sra3, msb3} = 2'(v);
      {sra2, msb2} = 2'(v);
      #1;
      f = sra3 & msb3;
      checks++;
      if (mo3 !== msb3 || fill3 !== {7{f}} || g3 !== {~sra3 & msb3, sra3}) begin
        failures++;
        $display("FAIL K=3 sra=%b msb=%b: msb_out=%b fill=%b g=%b", sra3, msb3, mo3, fill3, g3);
      end
      checks++;
      if (mo2 !== msb2 || fill2 !== {3{f}} || g2 !== {~sra2 & msb2, sra2}) begin
        failures++;
        $display("FAIL K=2 sra=%b msb=%b: msb_out=%b fill=%b g=%b", sra2, msb2, mo2, fill2, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
