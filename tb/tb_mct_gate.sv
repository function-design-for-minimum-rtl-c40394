// Self-checking testbench for mct_gate.
//
// Builds five gates (NOT, CNOT, Toffoli-3 and Toffoli-4 on four lines, and a
// Toffoli-3 on five lines), drives every input pattern and compares each
// output with a reference computed here: the target bit is flipped exactly
// when all control bits are 1. Also checks that each gate is its own inverse
// by chaining two copies. Prints one TB_RESULT line.
module tb_mct_gate;

  int checks = 0, failures = 0;

  logic [0:3] x4;
  logic [0:4] x5;
  logic [0:3] y_not, y_cnot, y_t3, y_t4, y_t3b;
  logic [0:4] y5;

  mct_gate #(.N(4), .CTRL(4'b0000), .TGT(2)) u_not  (.x(x4), .y(y_not));
  mct_gate #(.N(4), .CTRL(4'b0010), .TGT(1)) u_cnot (.x(x4), .y(y_cnot));
  mct_gate #(.N(4), .CTRL(4'b1001), .TGT(2)) u_t3   (.x(x4), .y(y_t3));
  mct_gate #(.N(4), .CTRL(4'b1110), .TGT(3)) u_t4   (.x(x4), .y(y_t4));
  mct_gate #(.N(4), .CTRL(4'b1001), .TGT(2)) u_t3b  (.x(y_t3), .y(y_t3b));
  mct_gate #(.N(5), .CTRL(5'b10010), .TGT(2)) u_t5  (.x(x5), .y(y5));

  // reference: line i is bit (n-1-i) of an n-bit integer; cmask uses the
  // same packing, so the gate fires when all bits of cmask are set in v
  function automatic int ref_gate(int v, int n, int cmask, int tgt);
    return ((v & cmask) == cmask) ? (v ^ (1 << (n - 1 - tgt))) : v;
  endfunction

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
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      chk($sformatf("NOT x=%0d", v),  int'(y_not),  ref_gate(v, 4, 0, 2));
      chk($sformatf("CNOT x=%0d", v), int'(y_cnot), ref_gate(v, 4, 'b0010, 1));
      chk($sformatf("T3 x=%0d", v),   int'(y_t3),   ref_gate(v, 4, 'b1001, 2));
      chk($sformatf("T4 x=%0d", v),   int'(y_t4),   ref_gate(v, 4, 'b1110, 3));
      chk($sformatf("T3 twice x=%0d", v), int'(y_t3b), v);
    end
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      #1;
      chk($sformatf("T3/5 x=%0d", v), int'(y5), ref_gate(v, 5, 'b10010, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
