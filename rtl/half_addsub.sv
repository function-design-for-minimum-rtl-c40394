// Reversible half adder/subtractor: three MCT gates on four lines.
//
// Lines are (c, S, A, B) = (0, 1, 2, 3); c is a constant input that must be 0.
// The selector S picks the operation: S=0 adds (carry = A.B), S=1 subtracts
// A-B (borrow = ~A.B); both give A xor B on the sum/difference line.
// The circuit is the gate list (2 1) (3 2) (1 3 0), where the last number of
// each gate is the target and the others are controls:
//   line1 ^= A            -> S xor A       (garbage g1)
//   line2 ^= B            -> A xor B       (sum / difference)
//   line0 ^= line1.B      -> (S xor A).B   (carry / borrow)
// so the carry and borrow share one Toffoli gate whose control S xor A
// is A for addition and ~A for subtraction. Three gates is the minimum for
// any MCT circuit of this function with any order of its output lines.
//
// Interface: in_lines[0:3] = (c, S, A, B), out_lines[0:3] =
// (carry/borrow, S xor A, sum/difference, B). Combinational.
// Gate list, line order and operation assignment are those of the published
// minimum circuit; tying c to 0 is left to the instantiating level.
module half_addsub (
  input  logic [0:3] in_lines,
  output logic [0:3] out_lines
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 3;

  // w[k] holds the line values after gate k; w[0] is the input.
  logic [0:N-1] w [0:G];

  assign w[0] = in_lines;

  // gate 1: (2 1)
  mct_gate #(.N(N), .CTRL(4'b0010), .TGT(1)) u_g1 (.x(w[0]), .y(w[1]));
  // gate 2: (3 2)
  mct_gate #(.N(N), .CTRL(4'b0001), .TGT(2)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (1 3 0)
  mct_gate #(.N(N), .CTRL(4'b0101), .TGT(0)) u_g3 (.x(w[2]), .y(w[3]));

  assign out_lines = w[G];

endmodule
