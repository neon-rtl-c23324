// toffoli_gate: 3x3 reversible Toffoli gate.
//
// The gate passes its first two inputs through unchanged and flips the third
// input when both of the first two are 1:
//     (A, B, C) -> (A, B, (A & B) ^ C)
// The map is a bijection on the eight input vectors, so every input vector can
// be recovered from the output vector; this is what makes the gate reversible.
//
// Interface: a, b, c in; p = A, q = B, r = AB xor C out.
// Timing: purely combinational, no clock.
//
// The equations are those of the published gate. The design chooses to write
// the third output as a plain XOR expression and leaves the choice of cells to
// synthesis.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end

endmodule
