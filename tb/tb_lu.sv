// Self-checking testbench for lu.
//
// Sweeps all 16 patterns of (S1, S2, A, B). For XOR, OR and AND the result
// line O1 (line 2) is compared with the logic result computed here; the
// unused code is only checked for reversibility. All 16 output patterns must
// be distinct. Prints one TB_RESULT line.
module tb_lu;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic [0:3] in_l, out_l;
  bit seen[16];

  lu dut (.in_lines(in_l), .out_lines(out_l));

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
    for (int v = 0; v < 16; v++) begin
      lu_op_e op;
      int a, b;
      in_l = 4'(v);
      op = lu_op_e'(v >> 2);
      a = (v >> 1) & 1; b = v & 1;
      #1;
      case (op)
        LU_XOR: chk($sformatf("XOR %0d%0d", a, b), int'(out_l[2]), a ^ b);
        LU_OR:  chk($sformatf("OR %0d%0d", a, b),  int'(out_l[2]), a | b);
        LU_AND: chk($sformatf("AND %0d%0d", a, b), int'(out_l[2]), a & b);
        default: ;
      endcase
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
