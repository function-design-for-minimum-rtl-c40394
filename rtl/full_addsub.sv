// Reversible full adder/subtractor: five MCT gates on four lines, no
// constant input and two garbage outputs.
//
// Lines are (S, A, B, C) = (0, 1, 2, 3); C is the carry or borrow input.
// S=0: carry out = maj(A, B, C); S=1: borrow out of A-B-C = maj(~A, B, C).
// The sum/difference is A xor B xor C in both cases. Gate list (last number
// is the target): (1 0) (3 2) (2 1) (3 0) (0 2 3):
//   line0 ^= A      -> S xor A
//   line2 ^= C      -> B xor C                 (garbage g2)
//   line1 ^= line2  -> A xor B xor C           (sum / difference)
//   line0 ^= C      -> S xor A xor C           (garbage g1)
//   line3 ^= line0.line2 -> C xor (S^A^C).(B^C) = carry / borrow
// Four CNOT gates and one Toffoli gate; five gates is the minimum.
//
// Interface: in_lines[0:3] = (S, A, B, C), out_lines[0:3] =
// (S^A^C, sum/difference, B^C, carry/borrow). Combinational.
// Gate list, line order and operation assignment follow the published
// minimum circuit.
module full_addsub (
  input  logic [0:3] in_lines,
  output logic [0:3] out_lines
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 5;

  // w[k] holds the line values after gate k; w[0] is the input.
  logic [0:N-1] w [0:G];

  assign w[0] = in_lines;

  // gate 1: (1 0)
  mct_gate #(.N(N), .CTRL(4'b0100), .TGT(0)) u_g1 (.x(w[0]), .y(w[1]));
  // gate 2: (3 2)
  mct_gate #(.N(N), .CTRL(4'b0001), .TGT(2)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (2 1)
  mct_gate #(.N(N), .CTRL(4'b0010), .TGT(1)) u_g3 (.x(w[2]), .y(w[3]));
  // gate 4: (3 0)
  mct_gate #(.N(N), .CTRL(4'b0001), .TGT(0)) u_g4 (.x(w[3]), .y(w[4]));
  // gate 5: (0 2 3)
  mct_gate #(.N(N), .CTRL(4'b1010), .TGT(3)) u_g5 (.x(w[4]), .y(w[5]));

  assign out_lines = w[G];

endmodule
