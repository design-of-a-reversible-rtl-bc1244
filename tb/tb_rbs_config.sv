// tb_rbs_config: checker for one (N,K) size of the reversible barrel shifter,
// used by tb_rbs_tables. It compares the shifter's ancilla and garbage port
// widths and its quantum cost with the expected numbers given as parameters,
// then applies random words, shift amounts and the four operations and
// compares the result with plain shift operators. It reports its counts on
// its ports and raises done when finished.
module tb_rbs_config #(
  parameter int N  = 8,
  parameter int K  = 3,
  parameter int GO = 32,   // expected garbage outputs
  parameter int AN = 26,   // expected ancilla inputs
  parameter int QC = 195,  // expected quantum cost
  parameter int ITER = 400
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import rbs_pkg::*;

  logic [N-1:0] i, o;
  logic [K-1:0] s;
  logic         left, sra, sla;
  logic [ancilla_count(N, K)-1:0] anc;
  logic [garbage_count(N, K)-1:0] garbage;

  rev_barrel_shifter #(.N(N), .K(K)) dut (
    .i(i), .s(s), .left(left), .sra(sra), .sla(sla),
    .anc(anc), .o(o), .garbage(garbage)
  );

  initial begin
    logic [N-1:0] exp;
    shift_op_e op;
    int unsigned pick;
    checks = 0;
    failures = 0;
    done = 1'b0;
    anc = '0;

    checks++;
    if ($bits(garbage) != GO || $bits(anc) != AN || quantum_cost(N, K) != QC) begin
      failures++;
      $display("FAIL (%0d,%0d): garbage %0d ancilla %0d cost %0d, expected %0d %0d %0d",
               N, K, $bits(garbage), $bits(anc), quantum_cost(N, K), GO, AN, QC);
    end

    for (int it = 0; it < ITER; it++) begin
      i = N'({$urandom, $urandom});
      s  = K'($urandom);
      pick = $urandom_range(0, 3);
      unique case (pick)
        0: op = OP_LSR;
        1: op = OP_ASR;
        2: op = OP_LSL;
        default: op = OP_ASL;
      endcase
      {sra, sla, left} = op;
      #1;
      unique case (op)
        OP_LSR: exp = i >> s;
        OP_ASR: exp = N'($signed(i) >>> s);
        OP_LSL: exp = i << s;
        default: begin
          exp = i << s;
          exp[N-1] = i[N-1];
        end
      endcase
      checks++;
      if (o !== exp) begin
        failures++;
        $display("FAIL (%0d,%0d) op=%s s=%0d i=%h: o=%h expected %h", N, K, op.name(), s, i, o, exp);
      end
    end
    done = 1'b1;
  end
endmodule
