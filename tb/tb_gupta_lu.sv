// Self-checking testbench for gupta_lu.
//
// Sweeps all 32 patterns of (S1, S2, S3, A, B). The output line (line 2) is
// compared with the function picked by (S1, S2) from rev_pkg::glu_op_e
// (constant 0, AND, XOR, OR), inverted when S3 is 1. All 32 output patterns
// must be distinct. Prints one TB_RESULT line.
module tb_gupta_lu;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic [0:4] in_l, out_l;
  bit seen[32];

  gupta_lu dut (.in_lines(in_l), .out_lines(out_l));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    seen = '{default: 0};
    for (int v = 0; v < 32; v++) begin
      glu_op_e op;
      int inv, a, b, r;
      in_l = 5'(v);
      op  = glu_op_e'(v >> 3);
      inv = (v >> 2) & 1; a = (v >> 1) & 1; b = v & 1;
      #1;
      case (op)
        GLU_CONST: r = 0;
        GLU_AND:   r = a & b;
        GLU_XOR:   r = a ^ b;
        default:   r = a | b;
      endcase
      chk($sformatf("%s inv=%0d %0d%0d", op.name(), inv, a, b), int'(out_l[2]), r ^ inv);
      checks++;
      if (seen[out_l]) begin
        failures++;
        $display("FAIL output %0d repeated", out_l);
      end
      seen[out_l] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
