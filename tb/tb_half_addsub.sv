// Self-checking testbench for half_addsub.
//
// Sweeps all 16 line patterns. For every pattern the circuit output must
// equal the published reversible function (0 3 6 13 4 15 2 1 8 11 14 5 12 7
// 10 9), which also covers the don't-care rows c=1. For c=0 the named outputs
// are also checked against the arithmetic: a+b or a-b, carry/borrow on line 0
// and sum/difference on line 2. Finally the 16 outputs must be distinct
// (the circuit is reversible). Prints one TB_RESULT line.
module tb_half_addsub;

  int checks = 0, failures = 0;
  logic [0:3] in_l, out_l;
  int tab[16] = '{0, 3, 6, 13, 4, 15, 2, 1, 8, 11, 14, 5, 12, 7, 10, 9};
  bit seen[16];

  half_addsub dut (.in_lines(in_l), .out_lines(out_l));

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
      int c, s, a, b, r;
      in_l = 4'(v);
      #1;
      c = (v >> 3) & 1; s = (v >> 2) & 1; a = (v >> 1) & 1; b = v & 1;
      chk($sformatf("table x=%0d", v), int'(out_l), tab[v]);
      if (c == 0) begin
        r = s ? (a - b) : (a + b);             // -1, 0, 1 or 2
        chk($sformatf("sum/diff x=%0d", v), int'(out_l[2]), r & 1);
        chk($sformatf("carry/borrow x=%0d", v), int'(out_l[0]), (r >> 1) & 1);
      end
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
