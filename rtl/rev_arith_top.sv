// Reversible 1-bit arithmetic and logic blocks, side by side.
//
// Six independent reversible circuits, each a short cascade of
// multiple-control Toffoli gates whose every output line is a bijective
// function of its input lines:
//   has_*  half adder/subtractor (3 gates, one constant line tied to 0 here)
//   fas_*  full adder/subtractor (5 gates, no constant line)
//   alu_*  revised ALU: ADD, OR, SUB, AND (5 gates)
//   mini_* Mini-ALU: OR, ADD, AND, ID (5 gates)
//   glu_*  Gupta's logic unit: constant, AND, XOR, OR and their inverses
//          (3 gates on 5 lines)
//   lu_*   compact logic unit: XOR, OR, AND (3 gates)
// Each block gets named operand, selector and result ports; the garbage
// lines that keep a circuit reversible are brought out too, so the full
// line state of every circuit can be observed. Selector codes are those of
// rev_pkg. Everything is combinational: results follow the inputs with gate
// delay only. The blocks are not connected to each other, as they are
// alternative building blocks rather than parts of one datapath.
module rev_arith_top
  import rev_pkg::*;
(
  // half adder/subtractor: s=0 add, s=1 subtract a-b
  input  logic       has_s,
  input  logic       has_a,
  input  logic       has_b,
  output logic       has_cb,     // carry (add) or borrow (subtract)
  output logic       has_sd,     // sum or difference
  output logic [1:0] has_g,      // garbage lines: {s^a, b}
  // full adder/subtractor: s=0 add, s=1 subtract a-b-cin
  input  logic       fas_s,
  input  logic       fas_a,
  input  logic       fas_b,
  input  logic       fas_cin,    // carry or borrow in
  output logic       fas_cb,     // carry or borrow out
  output logic       fas_sd,     // sum or difference
  output logic [1:0] fas_g,      // garbage lines: {s^a^cin, b^cin}
  // revised ALU, op codes alu_op_e
  input  logic [1:0] alu_op,
  input  logic       alu_a,
  input  logic       alu_b,
  output logic       alu_o1,     // carry (ADD) or borrow (SUB)
  output logic       alu_o2,     // result
  output logic [1:0] alu_g,
  // Mini-ALU, op codes mini_op_e
  input  logic [1:0] mini_op,
  input  logic       mini_a,
  input  logic       mini_b,
  output logic       mini_o1,    // carry (ADD) or a (ID)
  output logic       mini_o2,    // result, b for ID
  output logic [1:0] mini_g,
  // Gupta's logic unit, op codes glu_op_e, glu_inv inverts the result
  input  logic [1:0] glu_op,
  input  logic       glu_inv,
  input  logic       glu_a,
  input  logic       glu_b,
  output logic       glu_out,
  output logic [3:0] glu_g,
  // compact logic unit, op codes lu_op_e
  input  logic [1:0] lu_op,
  input  logic       lu_a,
  input  logic       lu_b,
  output logic       lu_o1,
  output logic [2:0] lu_g
);

  logic [0:3] has_out, fas_out, alu_out, mini_out, lu_out;
  logic [0:4] glu_out_l;

  half_addsub u_has (.in_lines({1'b0, has_s, has_a, has_b}), .out_lines(has_out));
  assign has_cb = has_out[0];
  assign has_sd = has_out[2];
  assign has_g  = {has_out[1], has_out[3]};

  full_addsub u_fas (.in_lines({fas_s, fas_a, fas_b, fas_cin}), .out_lines(fas_out));
  assign fas_sd = fas_out[1];
  assign fas_cb = fas_out[3];
  assign fas_g  = {fas_out[0], fas_out[2]};

  rev_alu u_alu (.in_lines({alu_op, alu_a, alu_b}), .out_lines(alu_out));
  assign alu_o1 = alu_out[1];
  assign alu_o2 = alu_out[3];
  assign alu_g  = {alu_out[0], alu_out[2]};

  mini_alu u_mini (.in_lines({mini_op, mini_a, mini_b}), .out_lines(mini_out));
  assign mini_o1 = mini_out[2];
  assign mini_o2 = mini_out[3];
  assign mini_g  = {mini_out[0], mini_out[1]};

  gupta_lu u_glu (.in_lines({glu_op, glu_inv, glu_a, glu_b}), .out_lines(glu_out_l));
  assign glu_out = glu_out_l[2];
  assign glu_g   = {glu_out_l[0], glu_out_l[1], glu_out_l[3], glu_out_l[4]};

  lu u_lu (.in_lines({lu_op, lu_a, lu_b}), .out_lines(lu_out));
  assign lu_o1 = lu_out[2];
  assign lu_g  = {lu_out[0], lu_out[1], lu_out[3]};

endmodule
