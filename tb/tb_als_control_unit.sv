// tb_als_control_unit: exhaustive check of the arithmetic left shift
// control unit: bit 0 passes on to the shifter, and the corrected LSB is the
// sign when sla = 1 and the shifter's LSB otherwise. Combinational.
module tb_als_control_unit;
  logic sla, d0_in, d0_out, lsb, lsb_out;
  logic [1:0] g;
  int checks = 0, failures = 0;

  als_control_unit dut (.sla(sla), .d0_in(d0_in), .anc(1'b0), .d0_out(d0_out),
                        .shifter_lsb(lsb), .lsb_out(lsb_out), .garbage(g));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sla, d0_in, lsb} = 3'(v);
      #1;
      checks++;
      if (d0_out !== d0_in) begin
        failures++;
        $display("FAIL d0_out=%b expected %b", d0_out, d0_in);
      end
      checks++;
      if (lsb_out !== (sla ? d0_in : lsb)) begin
        failures++;
        $display("FAIL sla=%b sign=%b lsb=%b: lsb_out=%b", sla, d0_in, lsb, lsb_out);
      end
      checks++;
      if (g[0] !== sla) begin
        failures++;
        $display("FAIL control garbage %b expected %b", g[0], sla);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
