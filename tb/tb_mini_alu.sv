// Self-checking testbench for mini_alu.
//
// Sweeps all 16 patterns of (S1, S2, A, B). For each operation code of
// rev_pkg::mini_op_e the result line O2 (line 3) and, for ADD and ID, line O1
// (line 2) are compared with the result computed here: OR, AND, a+b as
// (carry, sum) and ID as (a, b). All 16 output patterns must be distinct.
// Prints one TB_RESULT line.
module tb_mini_alu;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic [0:3] in_l, out_l;
  bit seen[16];

  mini_alu dut (.in_lines(in_l), .out_lines(out_l));

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
      mini_op_e op;
      int a, b;
      in_l = 4'(v);
      op = mini_op_e'(v >> 2);
      a = (v >> 1) & 1; b = v & 1;
      #1;
      case (op)
        MINI_ADD: begin
          chk($sformatf("ADD %0d%0d sum", a, b), int'(out_l[3]), (a + b) & 1);
          chk($sformatf("ADD %0d%0d carry", a, b), int'(out_l[2]), (a + b) >> 1);
        end
        MINI_ID: begin
          chk($sformatf("ID %0d%0d a", a, b), int'(out_l[2]), a);
          chk($sformatf("ID %0d%0d b", a, b), int'(out_l[3]), b);
        end
        MINI_OR:  chk($sformatf("OR %0d%0d", a, b), int'(out_l[3]), a | b);
        MINI_AND: chk($sformatf("AND %0d%0d", a, b), int'(out_l[3]), a & b);
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
