// End-to-end testbench for rev_arith_top.
//
// Drives every input combination of each of the six blocks through the
// top's named ports and checks the named results against arithmetic and
// logic computed here: half and full addition and subtraction with carry or
// borrow, every operation code of the three ALUs and Gupta's logic unit.
// For every block the full output state (results plus garbage lines) must
// differ for every input, which is what makes the block reversible. Each
// operation and each carry/borrow event is counted, and a count of zero is a
// failure. Runs with the top's default configuration. Prints one TB_RESULT
// line.
module tb_rev_arith_top;
  import rev_pkg::*;

  int checks = 0, failures = 0;

  logic       has_s, has_a, has_b, has_cb, has_sd;
  logic [1:0] has_g;
  logic       fas_s, fas_a, fas_b, fas_cin, fas_cb, fas_sd;
  logic [1:0] fas_g;
  logic [1:0] alu_op;
  logic       alu_a, alu_b, alu_o1, alu_o2;
  logic [1:0] alu_g;
  logic [1:0] mini_op;
  logic       mini_a, mini_b, mini_o1, mini_o2;
  logic [1:0] mini_g;
  logic [1:0] glu_op;
  logic       glu_inv, glu_a, glu_b, glu_out;
  logic [3:0] glu_g;
  logic [1:0] lu_op;
  logic       lu_a, lu_b, lu_o1;
  logic [2:0] lu_g;

  rev_arith_top dut (.*);

  // event counters, one per mechanism
  int n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0;
  int n_alu[4] = '{default: 0};
  int n_mini[4] = '{default: 0};
  int n_glu[8] = '{default: 0};
  int n_lu[4] = '{default: 0};

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end else $display("%-22s %0d", what, n);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen4[16];
    bit seen5[32];
    {has_s, has_a, has_b} = '0;
    seen4 = '{default: 0};
    {fas_s, fas_a, fas_b, fas_cin} = '0;
    {alu_op, alu_a, alu_b, mini_op, mini_a, mini_b} = '0;
    {glu_op, glu_inv, glu_a, glu_b, lu_op, lu_a, lu_b} = '0;

    // half adder/subtractor: the constant line is tied inside, so 8 inputs
    // map to 8 distinct (cb, sd, g) patterns
    seen4 = '{default: 0};
    for (int v = 0; v < 8; v++) begin
      int r;
      {has_s, has_a, has_b} = 3'(v);
      #1;
      r = has_s ? (int'(has_a) - int'(has_b)) : (int'(has_a) + int'(has_b));
      chk($sformatf("half s=%0d a=%0d b=%0d sd", has_s, has_a, has_b), int'(has_sd), r & 1);
      chk($sformatf("half s=%0d a=%0d b=%0d cb", has_s, has_a, has_b), int'(has_cb), (r >> 1) & 1);
      if (has_s) n_sub++; else n_add++;
      if (has_cb && !has_s) n_carry++;
      if (has_cb && has_s) n_borrow++;
      checks++;
      if (seen4[{has_cb, has_sd, has_g}]) begin failures++; $display("FAIL half not reversible"); end
      seen4[{has_cb, has_sd, has_g}] = 1;
    end

    seen4 = '{default: 0};
    for (int v = 0; v < 16; v++) begin
      int r;
      {fas_s, fas_a, fas_b, fas_cin} = 4'(v);
      #1;
      r = fas_s ? (int'(fas_a) - int'(fas_b) - int'(fas_cin))
                : (int'(fas_a) + int'(fas_b) + int'(fas_cin));
      chk($sformatf("full x=%0d sd", v), int'(fas_sd), r & 1);
      chk($sformatf("full x=%0d cb", v), int'(fas_cb), (r >> 1) & 1);
      if (fas_s) n_sub++; else n_add++;
      if (fas_cb && !fas_s) n_carry++;
      if (fas_cb && fas_s) n_borrow++;
      checks++;
      if (seen4[{fas_cb, fas_sd, fas_g}]) begin failures++; $display("FAIL full not reversible"); end
      seen4[{fas_cb, fas_sd, fas_g}] = 1;
    end

    seen4 = '{default: 0};
    for (int v = 0; v < 16; v++) begin
      int a, b;
      {alu_op, alu_a, alu_b} = 4'(v);
      a = int'(alu_a); b = int'(alu_b);
      #1;
      n_alu[alu_op]++;
      case (alu_op_e'(alu_op))
        ALU_ADD: begin
          chk("alu add", int'(alu_o2), (a + b) & 1);
          chk("alu carry", int'(alu_o1), (a + b) >> 1);
          if (alu_o1) n_carry++;
        end
        ALU_SUB: begin
          chk("alu sub", int'(alu_o2), (a - b) & 1);
          chk("alu borrow", int'(alu_o1), int'(a < b));
          if (alu_o1) n_borrow++;
        end
        ALU_OR:  chk("alu or", int'(alu_o2), a | b);
        default: chk("alu and", int'(alu_o2), a & b);
      endcase
      checks++;
      if (seen4[{alu_o1, alu_o2, alu_g}]) begin failures++; $display("FAIL alu not reversible"); end
      seen4[{alu_o1, alu_o2, alu_g}] = 1;
    end

    seen4 = '{default: 0};
    for (int v = 0; v < 16; v++) begin
      int a, b;
      {mini_op, mini_a, mini_b} = 4'(v);
      a = int'(mini_a); b = int'(mini_b);
      #1;
      n_mini[mini_op]++;
      case (mini_op_e'(mini_op))
        MINI_ADD: begin
          chk("mini add", int'(mini_o2), (a + b) & 1);
          chk("mini carry", int'(mini_o1), (a + b) >> 1);
        end
        MINI_ID: begin
          chk("mini id a", int'(mini_o1), a);
          chk("mini id b", int'(mini_o2), b);
        end
        MINI_OR: chk("mini or", int'(mini_o2), a | b);
        default: chk("mini and", int'(mini_o2), a & b);
      endcase
      checks++;
      if (seen4[{mini_o1, mini_o2, mini_g}]) begin failures++; $display("FAIL mini not reversible"); end
      seen4[{mini_o1, mini_o2, mini_g}] = 1;
    end

    seen5 = '{default: 0};
    for (int v = 0; v < 32; v++) begin
      int a, b, r;
      {glu_op, glu_inv, glu_a, glu_b} = 5'(v);
      a = int'(glu_a); b = int'(glu_b);
      #1;
      n_glu[{glu_op, glu_inv}]++;
      case (glu_op_e'(glu_op))
        GLU_CONST: r = 0;
        GLU_AND:   r = a & b;
        GLU_XOR:   r = a ^ b;
        default:   r = a | b;
      endcase
      chk($sformatf("gupta x=%0d", v), int'(glu_out), r ^ int'(glu_inv));
      checks++;
      if (seen5[{glu_out, glu_g}]) begin failures++; $display("FAIL gupta not reversible"); end
      seen5[{glu_out, glu_g}] = 1;
    end

    seen4 = '{default: 0};
    for (int v = 0; v < 16; v++) begin
      int a, b;
      {lu_op, lu_a, lu_b} = 4'(v);
      a = int'(lu_a); b = int'(lu_b);
      #1;
      n_lu[lu_op]++;
      case (lu_op_e'(lu_op))
        LU_XOR:  chk("lu xor", int'(lu_o1), a ^ b);
        LU_OR:   chk("lu or", int'(lu_o1), a | b);
        LU_AND:  chk("lu and", int'(lu_o1), a & b);
        default: ;
      endcase
      checks++;
      if (seen4[{lu_o1, lu_g}]) begin failures++; $display("FAIL lu not reversible"); end
      seen4[{lu_o1, lu_g}] = 1;
    end

    need("addition", n_add);
    need("subtraction", n_sub);
    need("carry out", n_carry);
    need("borrow out", n_borrow);
    for (int i = 0; i < 4; i++) begin
      need($sformatf("alu %s", alu_op_e'(i)), n_alu[i]);
      need($sformatf("mini %s", mini_op_e'(i)), n_mini[i]);
      if (i != int'(LU_NA)) need($sformatf("lu %s", lu_op_e'(i)), n_lu[i]);
    end
    for (int i = 0; i < 8; i++) need($sformatf("gupta op %0d inv %0d", i >> 1, i & 1), n_glu[i]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
