// Testbench over every minimum circuit listed for the adder/subtractors.
//
// The published minimum-circuit tables list, for the half adder/subtractor
// with the adder on S=0 (6 circuits) and with the subtractor on S=0
// (3 circuits), and for the full adder/subtractor with the adder on S=0
// (30 circuits), every reversible function of minimum gate count together
// with one MCT gate list for it. This testbench builds each of the 39 gate
// lists from mct_gate instances and checks, over all 16 input patterns:
//   - that the cascade computes the listed reversible function;
//   - that some pair of output lines carries carry/borrow and
//     sum/difference, i.e. that the function is a valid embedding of the
//     adder/subtractor with its outputs in some order;
//   - that half_addsub and full_addsub equal the first circuit of their
//     tables, which is the one they implement.
// Each circuit has five gate slots of 7 bits, {used, control mask in line
// order, target line}; slot k of circuit c is GATES[(c*5+k)*7 +: 7]. Unused
// slots of the three-gate circuits are left out of the cascade.
// Prints one TB_RESULT line.
module tb_min_circuits;

  // KIND: 0 = half, adder on S=0; 1 = half, subtractor on S=0;
  //       2 = full, adder on S=0
  localparam int NC = 39;
  localparam int KIND [NC] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2};
  localparam logic [NC*5*7-1:0] GATES = {
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0110_11, 7'b1_0011_00, 7'b1_0001_10,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0101_10, 7'b1_0011_00, 7'b1_0010_11,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0101_00, 7'b1_0011_00, 7'b1_0010_11,
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0110_00, 7'b1_0011_00, 7'b1_0001_10,
    7'b1_1010_11, 7'b1_0010_01, 7'b1_0110_11, 7'b1_0011_00, 7'b1_0001_10,
    7'b1_1001_10, 7'b1_0001_01, 7'b1_0101_10, 7'b1_0011_00, 7'b1_0010_11,
    7'b1_1001_10, 7'b1_0111_00, 7'b1_0001_01, 7'b1_0010_11, 7'b1_0101_00,
    7'b1_1010_11, 7'b1_0111_00, 7'b1_0010_01, 7'b1_0001_10, 7'b1_0110_00,
    7'b1_1010_11, 7'b1_0101_00, 7'b1_0010_01, 7'b1_0001_10, 7'b1_0110_00,
    7'b1_1001_10, 7'b1_0110_00, 7'b1_0001_01, 7'b1_0010_11, 7'b1_0101_00,
    7'b1_1010_11, 7'b1_1001_10, 7'b1_0010_01, 7'b1_0100_00, 7'b1_0001_01,
    7'b1_1001_10, 7'b1_1010_11, 7'b1_0001_01, 7'b1_0100_00, 7'b1_0010_01,
    7'b1_1001_10, 7'b1_0101_10, 7'b1_0001_01, 7'b1_0010_11, 7'b1_0001_00,
    7'b1_1010_11, 7'b1_0110_11, 7'b1_0010_01, 7'b1_0001_10, 7'b1_0010_00,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0101_00, 7'b1_0010_00, 7'b1_0010_11,
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0110_00, 7'b1_0001_00, 7'b1_0001_10,
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0110_11, 7'b1_0001_10, 7'b1_0001_00,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0101_10, 7'b1_0010_11, 7'b1_0010_00,
    7'b1_1001_10, 7'b1_0001_01, 7'b1_0101_10, 7'b1_0010_11, 7'b1_0010_00,
    7'b1_1010_11, 7'b1_0010_01, 7'b1_0110_11, 7'b1_0001_10, 7'b1_0001_00,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0011_00, 7'b1_0100_00, 7'b1_0010_11,
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0011_00, 7'b1_0100_00, 7'b1_0001_10,
    7'b1_1001_10, 7'b1_0010_00, 7'b1_0001_01, 7'b1_0101_00, 7'b1_0010_11,
    7'b1_1010_11, 7'b1_0001_00, 7'b1_0010_01, 7'b1_0110_00, 7'b1_0001_10,
    7'b1_0100_11, 7'b1_1001_10, 7'b1_0010_11, 7'b1_0100_00, 7'b1_0010_00,
    7'b1_0100_10, 7'b1_1010_11, 7'b1_0001_10, 7'b1_0100_00, 7'b1_0001_00,
    7'b1_1001_10, 7'b1_0011_00, 7'b1_0001_01, 7'b1_0100_00, 7'b1_0010_11,
    7'b1_1010_11, 7'b1_0011_00, 7'b1_0010_01, 7'b1_0100_00, 7'b1_0001_10,
    7'b1_1001_10, 7'b1_0010_00, 7'b1_0001_01, 7'b1_0010_11, 7'b1_0100_00,
    7'b1_1010_11, 7'b1_0001_00, 7'b1_0010_01, 7'b1_0001_10, 7'b1_0100_00,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0101_00, 7'b1_0011_01, 7'b1_0001_10,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0011_00, 7'b1_0001_10, 7'b1_0101_00,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0101_00, 7'b1_0010_01, 7'b1_0001_10,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0010_11, 7'b1_0101_00, 7'b1_0011_00,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0010_11, 7'b1_0101_00, 7'b1_0011_01,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0010_11, 7'b1_0101_00, 7'b1_0010_01,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0101_00, 7'b1_0001_10, 7'b1_0011_00,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0101_00, 7'b1_0001_10, 7'b1_0011_01,
    7'b0_0000_00, 7'b0_0000_00, 7'b1_0101_00, 7'b1_0001_10, 7'b1_0010_01
  };
  localparam int FUNC [NC][16] = '{
    '{0, 3, 6, 13, 4, 15, 2, 1, 8, 11, 14, 5, 12, 7, 10, 9},
    '{0, 3, 2, 13, 4, 15, 6, 1, 8, 11, 10, 5, 12, 7, 14, 9},
    '{0, 3, 2, 9, 4, 15, 6, 5, 8, 11, 10, 1, 12, 7, 14, 13},
    '{0, 1, 7, 14, 4, 13, 3, 2, 8, 9, 15, 6, 12, 5, 11, 10},
    '{0, 1, 3, 14, 4, 13, 7, 2, 8, 9, 11, 6, 12, 5, 15, 10},
    '{0, 1, 3, 10, 4, 13, 7, 6, 8, 9, 11, 2, 12, 5, 15, 14},
    '{0, 15, 6, 1, 4, 3, 2, 13, 8, 7, 14, 9, 12, 11, 10, 5},
    '{0, 11, 2, 1, 4, 7, 6, 13, 8, 3, 10, 9, 12, 15, 14, 5},
    '{0, 15, 2, 1, 4, 3, 6, 13, 8, 7, 10, 9, 12, 11, 14, 5},
    '{0, 14, 6, 9, 12, 3, 11, 5, 8, 7, 15, 1, 4, 10, 2, 13},
    '{0, 5, 13, 10, 12, 11, 3, 6, 8, 15, 7, 2, 4, 1, 9, 14},
    '{0, 14, 6, 1, 12, 3, 11, 13, 8, 7, 15, 9, 4, 10, 2, 5},
    '{0, 5, 13, 2, 12, 11, 3, 14, 8, 15, 7, 10, 4, 1, 9, 6},
    '{0, 10, 2, 9, 14, 5, 13, 7, 8, 3, 11, 1, 6, 12, 4, 15},
    '{0, 1, 9, 10, 13, 14, 6, 7, 8, 11, 3, 2, 5, 4, 12, 15},
    '{0, 14, 6, 9, 4, 3, 11, 13, 8, 7, 15, 1, 12, 10, 2, 5},
    '{0, 5, 13, 10, 4, 11, 3, 14, 8, 15, 7, 2, 12, 1, 9, 6},
    '{0, 10, 2, 1, 14, 5, 13, 15, 8, 3, 11, 9, 6, 12, 4, 7},
    '{0, 1, 9, 2, 13, 14, 6, 15, 8, 11, 3, 10, 5, 4, 12, 7},
    '{0, 14, 6, 9, 4, 11, 3, 13, 8, 7, 15, 1, 12, 2, 10, 5},
    '{0, 5, 13, 10, 4, 3, 11, 14, 8, 15, 7, 2, 12, 9, 1, 6},
    '{0, 1, 9, 10, 5, 6, 14, 15, 8, 11, 3, 2, 13, 12, 4, 7},
    '{0, 10, 2, 9, 6, 13, 5, 15, 8, 3, 11, 1, 14, 4, 12, 7},
    '{0, 10, 2, 9, 6, 5, 13, 15, 8, 3, 11, 1, 14, 12, 4, 7},
    '{0, 1, 9, 10, 5, 14, 6, 15, 8, 11, 3, 2, 13, 4, 12, 7},
    '{0, 6, 14, 9, 4, 3, 11, 13, 8, 15, 7, 1, 12, 10, 2, 5},
    '{0, 13, 5, 10, 4, 11, 3, 14, 8, 7, 15, 2, 12, 1, 9, 6},
    '{0, 5, 13, 10, 12, 11, 2, 7, 8, 15, 6, 3, 4, 1, 9, 14},
    '{0, 14, 6, 9, 12, 1, 11, 7, 8, 5, 15, 3, 4, 10, 2, 13},
    '{0, 5, 13, 2, 4, 11, 3, 6, 8, 15, 7, 10, 12, 1, 9, 14},
    '{0, 14, 6, 1, 4, 3, 11, 5, 8, 7, 15, 9, 12, 10, 2, 13},
    '{0, 14, 6, 1, 4, 3, 11, 13, 8, 7, 15, 9, 12, 10, 2, 5},
    '{0, 5, 13, 2, 4, 11, 3, 14, 8, 15, 7, 10, 12, 1, 9, 6},
    '{0, 5, 13, 2, 4, 3, 11, 6, 8, 15, 7, 10, 12, 9, 1, 14},
    '{0, 14, 6, 1, 4, 11, 3, 5, 8, 7, 15, 9, 12, 2, 10, 13},
    '{0, 10, 2, 1, 6, 5, 13, 7, 8, 3, 11, 9, 14, 12, 4, 15},
    '{0, 1, 9, 2, 5, 14, 6, 7, 8, 11, 3, 10, 13, 4, 12, 15},
    '{0, 1, 9, 2, 5, 6, 14, 7, 8, 11, 3, 10, 13, 12, 4, 15},
    '{0, 10, 2, 1, 6, 13, 5, 7, 8, 3, 11, 9, 14, 4, 12, 15}
  };

  int checks = 0, failures = 0;
  logic [0:3] x;
  logic [0:3] y [NC];
  logic [0:3] y_has, y_fas;

  for (genvar c = 0; c < NC; c++) begin : g_c
    logic [0:3] w [0:5];
    assign w[0] = x;
    for (genvar k = 0; k < 5; k++) begin : g_k
      localparam logic [6:0] GK = GATES[(c*5+k)*7 +: 7];
      if (GK[6]) begin : g_gate
        mct_gate #(.N(4), .CTRL(GK[5:2]), .TGT(int'(GK[1:0])))
          u_gate (.x(w[k]), .y(w[k+1]));
      end else begin : g_pass
        assign w[k+1] = w[k];
      end
    end
    assign y[c] = w[5];
  end

  half_addsub u_has (.in_lines(x), .out_lines(y_has));
  full_addsub u_fas (.in_lines(x), .out_lines(y_fas));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expected (carry/borrow, sum/difference) of input pattern v for a kind;
  // returns 0 in 'care' for the half adder rows with the constant line at 1
  function automatic void expect_out(int kind, int v, output bit care, output int cb, output int sd);
    int s, a, b, cin, r;
    if (kind == 2) begin
      s = (v >> 3) & 1; a = (v >> 2) & 1; b = (v >> 1) & 1; cin = v & 1;
      r = s ? (a - b - cin) : (a + b + cin);
      care = 1;
    end else begin
      care = ((v >> 3) & 1) == 0;
      s = (v >> 2) & 1; a = (v >> 1) & 1; b = v & 1;
      if (kind == 1) s = 1 - s;
      r = s ? (a - b) : (a + b);
    end
    cb = (r >> 1) & 1;
    sd = r & 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [0:3] outs [NC][16];
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int c = 0; c < NC; c++) begin
        chk($sformatf("circuit %0d input %0d", c, v), int'(y[c]), FUNC[c][v]);
        outs[c][v] = y[c];
      end
      chk($sformatf("half_addsub input %0d", v), int'(y_has), int'(y[0]));
      chk($sformatf("full_addsub input %0d", v), int'(y_fas), int'(y[9]));
    end
    // embedding check: find a carry/borrow line p and a sum/difference line q
    for (int c = 0; c < NC; c++) begin
      bit found;
      found = 0;
      for (int p = 0; p < 4; p++)
        for (int q = 0; q < 4; q++)
          if (p != q && !found) begin
            bit ok;
            ok = 1;
            for (int v = 0; v < 16; v++) begin
              bit care;
              int cb, sd;
              expect_out(KIND[c], v, care, cb, sd);
              if (care && (int'(outs[c][v][p]) != cb || int'(outs[c][v][q]) != sd)) ok = 0;
            end
            found = ok;
          end
      checks++;
      if (!found) begin
        failures++;
        $display("FAIL circuit %0d is not an adder/subtractor embedding", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
