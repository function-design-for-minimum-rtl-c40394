// Compact 1-bit logic unit: XOR, OR and AND in three MCT gates on four lines.
//
// Lines are (S1, S2, A, B) = (0, 1, 2, 3). Operation assignment (S1 S2):
//   00 XOR, 01 OR, 10 unused (result unspecified), 11 AND.
// NOT is available as XOR with one operand at 1. The result O1 leaves on
// line 2; lines 0, 1 and 3 are garbage. Gate list (last number is the
// target): (3 0) (1 2 3) (0 3 2):
//   line0 ^= B            -> S1 xor B
//   line3 ^= S2.A         -> B xor S2.A
//   line2 ^= line0.line3  -> A xor (S1^B).(B^S2.A)
//
// Interface: in_lines[0:3] = (S1, S2, A, B), out_lines[0:3] =
// (g1, g2, O1, g3). Combinational.
// Operation set and assignment follow the published design; the three-gate
// circuit is this design's pick among the minimum ones for that assignment.
module lu (
  input  logic [0:3] in_lines,
  output logic [0:3] out_lines
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 3;

  // w[k] holds the line values after gate k; w[0] is the input.
  logic [0:N-1] w [0:G];

  assign w[0] = in_lines;

  // gate 1: (3 0)
  mct_gate #(.N(N), .CTRL(4'b0001), .TGT(0)) u_g1 (.x(w[0]), .y(w[1]));
  // gate 2: (1 2 3)
  mct_gate #(.N(N), .CTRL(4'b0110), .TGT(3)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (0 3 2)
  mct_gate #(.N(N), .CTRL(4'b1001), .TGT(2)) u_g3 (.x(w[2]), .y(w[3]));

  assign out_lines = w[G];

endmodule
