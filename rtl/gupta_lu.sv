// Gupta's 1-bit logic unit (eight operations) as a three-gate MCT circuit on
// five lines.
//
// Lines are (S1, S2, S3, A, B) = (0, 1, 2, 3, 4). (S1 S2) picks the function
// and S3 inverts it:
//   00 constant 0 / 1, 01 AND / NAND, 10 XOR / XNOR, 11 OR / NOR.
// The result leaves on line 2, so Output = S3 xor f(S1, S2, A, B). Gate list
// (last number is the target): (0 3 2) (1 3 0) (0 4 2):
//   line2 ^= S1.A         -> S3 xor S1.A
//   line0 ^= S2.A         -> S1 xor S2.A
//   line2 ^= line0.B      -> S3 xor S1.A xor (S1 xor S2.A).B
// Three Toffoli gates against eighteen gates in the benchmark's own circuit.
//
// Interface: in_lines[0:4] = (S1, S2, S3, A, B), out_lines[0:4] =
// (S1 xor S2.A, S2, Output, A, B). Combinational.
// The operation assignment and the three-gate size follow the published
// design; the gate list is this design's pick among the three-gate circuits.
module gupta_lu (
  input  logic [0:4] in_lines,
  output logic [0:4] out_lines
);

  localparam int unsigned N = 5;
  localparam int unsigned G = 3;

  // w[k] holds the line values after gate k; w[0] is the input.
  logic [0:N-1] w [0:G];

  assign w[0] = in_lines;

  // gate 1: (0 3 2)
  mct_gate #(.N(N), .CTRL(5'b10010), .TGT(2)) u_g1 (.x(w[0]), .y(w[1]));
  // gate 2: (1 3 0)
  mct_gate #(.N(N), .CTRL(5'b01010), .TGT(0)) u_g2 (.x(w[1]), .y(w[2]));
  // gate 3: (0 4 2)
  mct_gate #(.N(N), .CTRL(5'b10001), .TGT(2)) u_g3 (.x(w[2]), .y(w[3]));

  assign out_lines = w[G];

endmodule
