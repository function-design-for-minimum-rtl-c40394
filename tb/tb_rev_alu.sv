// Self-checking testbench for rev_alu.
//
// Sweeps all 16 patterns of (S1, S2, A, B). For each operation code of
// rev_pkg::alu_op_e the result line O2 (line 3) and, for ADD and SUB, the
// carry/borrow line O1 (line 1) are compared with the arithmetic or logic
// result computed here. All 16 output patterns must be distinct. Prints one
// TB_RESULT line.
module tb_rev_alu;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic [0:3] in_l, out_l;
  bit seen[16];

  rev_alu dut (.in_lines(in_l), .out_lines(out_l));

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
      alu_op_e op;
      int a, b;
      in_l = 4'(v);
      op = alu_op_e'(v >> 2);
      a = (v >> 1) & 1; b = v & 1;
      #1;
      case (op)
        ALU_ADD: begin
          chk($sformatf("ADD %0d%0d sum", a, b), int'(out_l[3]), (a + b) & 1);
          chk($sformatf("ADD %0d%0d carry", a, b), int'(out_l[1]), (a + b) >> 1);
        end
        ALU_SUB: begin
          chk($sformatf("SUB %0d%0d diff", a, b), int'(out_l[3]), (a - b) & 1);
          chk($sformatf("SUB %0d%0d borrow", a, b), int'(out_l[1]), int'(a < b));
        end
        ALU_OR:  chk($sformatf("OR %0d%0d", a, b), int'(out_l[3]), a | b);
        ALU_AND: chk($sformatf("AND %0d%0d", a, b), int'(out_l[3]), a & b);
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
