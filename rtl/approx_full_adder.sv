// approx_full_adder: approximate one-bit full adder made of one Toffoli gate.
//
// The cell drops the exact full-adder equations in favour of the outputs of a
// single reversible Toffoli gate, wired as
//     Toffoli(A, B, Cin) -> (A, B, AB xor Cin)
// The sum is always the gate's second output, sum = B. It equals the exact sum
// for half of the eight input vectors (A B Cin = 000, 010, 101, 111).
// CARRY_MODE picks the carry from the two remaining outputs; the other one is
// the cell's only garbage output:
//     CARRY_TOFFOLI (default)  cout = (A & B) ^ Cin, garbage = A
//     CARRY_A                  cout = A,             garbage = (A & B) ^ Cin
// Either carry equals the exact carry for six of the eight input vectors:
// CARRY_TOFFOLI misses 001 and 111, CARRY_A misses 011 and 100.
//
// Interface: a, b, cin in; garbage, sum, cout out.
// Timing: combinational, one AND followed by one XOR.
//
// The Toffoli gate, sum = B and the carry AB xor Cin follow the published cell
// and its gate-level drawing; the published truth table instead reads the
// carry as A, which CARRY_A provides. Making this a parameter is this design's
// choice.
module approx_full_adder
  import neon_pkg::*;
#(
  parameter carry_mode_e CARRY_MODE = CARRY_TOFFOLI
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic garbage,
  output logic sum,
  output logic cout
);

  logic t_a, t_ab_c;

  toffoli_gate u_toffoli (
    .a (a),
    .b (b),
    .c (cin),
    .p (t_a),
    .q (sum),
    .r (t_ab_c)
  );

  always_comb begin
    if (CARRY_MODE == CARRY_A) begin
      cout    = t_a;
      garbage = t_ab_c;
    end else begin
      cout    = t_ab_c;
      garbage = t_a;
    end
  end

endmodule
