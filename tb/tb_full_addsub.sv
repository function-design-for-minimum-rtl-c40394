// Self-checking testbench for full_addsub.
//
// Sweeps all 16 line patterns (S, A, B, C). Each output must equal the
// published reversible function (0 14 6 9 12 3 11 5 8 7 15 1 4 10 2 13); the
// sum/difference (line 1) and carry/borrow (line 3) must equal the
// arithmetic a+b+c or a-b-c; and all outputs must be distinct. Prints one
// TB_RESULT line.
module tb_full_addsub;

  int checks = 0, failures = 0;
  logic [0:3] in_l, out_l;
  int tab[16] = '{0, 14, 6, 9, 12, 3, 11, 5, 8, 7, 15, 1, 4, 10, 2, 13};
  bit seen[16];

  full_addsub dut (.in_lines(in_l), .out_lines(out_l));

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
      int s, a, b, c, r;
      in_l = 4'(v);
      #1;
      s = (v >> 3) & 1; a = (v >> 2) & 1; b = (v >> 1) & 1; c = v & 1;
      r = s ? (a - b - c) : (a + b + c);      // -2 .. 3
      chk($sformatf("table x=%0d", v), int'(out_l), tab[v]);
      chk($sformatf("sum/diff x=%0d", v), int'(out_l[1]), r & 1);
      chk($sformatf("carry/borrow x=%0d", v), int'(out_l[3]), (r >> 1) & 1);
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
