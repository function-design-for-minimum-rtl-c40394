// Revised 1-bit reversible ALU: ADD, OR, AND and SUB in five MCT gates on
// four lines, with no constant input and two garbage outputs.
//
// Lines are (S1, S2, A, B) = (0, 1, 2, 3). Operation assignment (S1 S2):
//   00 ADD  O1 = carry A.B,   O2 = A xor B
//   01 OR   O2 = A or B       (O1 unspecified)
//   10 SUB  O1 = borrow ~A.B, O2 = A xor B
//   11 AND  O2 = A and B      (O1 unspecified)
// O1 leaves on line 1 and O2 on line 3; lines 0 and 2 are garbage. Gate list
// (last number is the target): (2 0) (2 3) (0 3 2) (1 2 3) (0 2 1), that is
// two CNOT and three Toffoli gates.
// Which code runs which operation, and on which line each result leaves, are
// free choices of the reversible embedding; they were searched together with
// the gate list, and five gates is the least any such choice allows (a fixed
// assignment and fixed output order need seven).
//
// Interface: in_lines[0:3] = (S1, S2, A, B), out_lines[0:3] =
// (g1, O1, g2, O2). Combinational.
// The operation set, the minimum size of five gates and the freedom of
// assignment and output order follow the published design; the specific
// five-gate circuit and its assignment are this design's pick among the
// minimum ones.
module rev_alu (
  input  logic [0:3] in_lines,
  output logic [0:3] out_lines
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 5;

  // w[k] holds the line values after gate k; w[0] is the input.
  logic [0:N-1] w [0:G];

  assign w[0] = in_lines;

  // gate 1: (2 0)
  mct_gate #(.N(N), .CTRL(4'b0010), .TGT(0)) u_g1 (.x(w[0]), .y(w[1]));
  // gate 2: (2 3)
  mct_gate #(.N(N), .CTRL(4'b0010), .TGT(3)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (0 3 2)
  mct_gate #(.N(N), .CTRL(4'b1001), .TGT(2)) u_g3 (.x(w[2]), .y(w[3]));
  // gate 4: (1 2 3)
  mct_gate #(.N(N), .CTRL(4'b0110), .TGT(3)) u_g4 (.x(w[3]), .y(w[4]));
  // gate 5: (0 2 1)
  mct_gate #(.N(N), .CTRL(4'b1010), .TGT(1)) u_g5 (.x(w[4]), .y(w[5]));

  assign out_lines = w[G];

endmodule
