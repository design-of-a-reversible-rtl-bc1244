// tb_shifter_unit: exhaustive check of the three-stage (8,3) shifter core:
// every data word and shift amount with an all-zero fill (logical right
// shift) and an all-one fill (what an arithmetic shift of a negative word
// supplies), against the >> operator. Also a random check of a (16,4) core.
// Combinational.
module tb_shifter_unit;
  logic [2:0]  s;
  logic [7:0]  d, q;
  logic [6:0]  fill;
  logic [26:0] g;
  logic [3:0]  s16;
  logic [15:0] d16, q16;
  logic [14:0] fill16;
  logic [67:0] g16;
  int checks = 0, failures = 0;

  shifter_unit #(.N(8), .K(3)) dut (.s(s), .d(d), .fill(fill), .anc('0), .q(q), .garbage(g));
  shifter_unit #(.N(16), .K(4)) dut16 (.s(s16), .d(d16), .fill(fill16), .anc('0), .q(q16), .garbage(g16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp8;
    logic [31:0] exp16;
    s16 = '0; d16 = '0; fill16 = '0;
    for (int v = 0; v < 4096; v++) begin
      d    = v[7:0];
      s    = v[10:8];
      fill = {7{v[11]}};
      #1;
      exp8 = {{8{v[11]}}, d} >> s;
      checks++;
      if (q !== exp8[7:0]) begin
        failures++;
        $display("FAIL (8,3) s=%0d fill=%b d=%h: q=%h expected %h", s, v[11], d, q, exp8[7:0]);
      end
    end
    for (int v = 0; v < 3000; v++) begin
      d16    = 16'($urandom);
      s16    = 4'($urandom);
      fill16 = {15{v[0]}};
      #1;
      exp16 = {{16{v[0]}}, d16} >> s16;
      checks++;
      if (q16 !== exp16[15:0]) begin
        failures++;
        $display("FAIL (16,4) s=%0d d=%h: q=%h expected %h", s16, d16, q16, exp16[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
