// Multiple-control Toffoli gate (Toffoli-k) on an N-line bus.
//
// The gate has a set of control lines and one target line. When every control
// line is 1 the target line is inverted; all other lines pass through
// unchanged. With no controls it is a NOT gate, with one a CNOT (Feynman)
// gate, with two the classic Toffoli gate. The gate is its own inverse, so a
// cascade of such gates is a bijection on the N-bit line values.
//
// Parameters: N lines; CTRL is a [0:N-1] mask of control lines (CTRL[i]=1 makes
// line i a control); TGT is the target line number. A control on the target
// line is not an MCT gate and stops elaboration.
//
// Interface: x[0:N-1] in, y[0:N-1] out, line i on index i. Purely
// combinational, no clock. The gate definition follows the MCT gate of the
// reversible-logic literature; the parameter encoding is this design's own.
module mct_gate #(
  parameter int unsigned    N    = 4,
  parameter logic [0:N-1]   CTRL = '0,
  parameter int unsigned    TGT  = 0
) (
  input  logic [0:N-1] x,
  output logic [0:N-1] y
);

  if (TGT >= N) begin : g_bad_tgt
    $error("mct_gate: target line %0d outside 0..%0d", TGT, N - 1);
  end
  if (CTRL[TGT]) begin : g_bad_ctrl
    $error("mct_gate: target line %0d is also a control", TGT);
  end

  logic fire;

  // All controls 1: lines that are not controls count as 1.
  assign fire = &(x | ~CTRL);

  always_comb begin
    y      = x;
    y[TGT] = x[TGT] ^ fire;
  end

endmodule
