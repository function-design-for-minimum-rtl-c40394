// Mini-ALU: the four-operation 1-bit benchmark (AND, OR, ADD, ID) as a
// minimum reversible circuit of five MCT gates on four lines.
//
// Lines are (S1, S2, A, B) = (0, 1, 2, 3). Operation assignment (S1 S2):
//   00 OR   O2 = A or B       (O1 unspecified)
//   01 ADD  O1 = carry A.B,   O2 = A xor B
//   10 AND  O2 = A and B      (O1 unspecified)
//   11 ID   O1 = A,           O2 = B
// O1 leaves on line 2 and O2 on line 3; lines 0 and 1 are garbage. Gate list
// (last number is the target): (2 0) (3 1) (1 3 2) (0 2 3) (1 3 2), two CNOT
// and three Toffoli gates. The benchmark's own circuit has six gates.
//
// Interface: in_lines[0:3] = (S1, S2, A, B), out_lines[0:3] =
// (g1, g2, O1, O2). Combinational.
// The operation set and the five-gate minimum follow the published design.
// Reading ID as passing both operands is this design's reading; it is the one
// under which the minimum size and the number of minimum functions agree with
// the published figures. The specific circuit and assignment are this
// design's pick among the minimum ones.
module mini_alu (
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
  // gate 2: (3 1)
  mct_gate #(.N(N), .CTRL(4'b0001), .TGT(1)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (1 3 2)
  mct_gate #(.N(N), .CTRL(4'b0101), .TGT(2)) u_g3 (.x(w[2]), .y(w[3]));
  // gate 4: (0 2 3)
  mct_gate #(.N(N), .CTRL(4'b1010), .TGT(3)) u_g4 (.x(w[3]), .y(w[4]));
  // gate 5: (1 3 2)
  mct_gate #(.N(N), .CTRL(4'b0101), .TGT(2)) u_g5 (.x(w[4]), .y(w[5]));

  assign out_lines = w[G];

endmodule
