// neon_pkg: types shared by the approximate adder cells and the filter.
//
// carry_mode_e selects which Toffoli output an approximate full-adder cell
// uses as its carry:
//   CARRY_TOFFOLI  carry = A&B xor Cin (the gate's third output), garbage = A.
//                  This is the cell as drawn at gate level and the default.
//   CARRY_A        carry = A, garbage = A&B xor Cin. This is the reading
//                  "Sum = B, Cout = A" of the cell's truth table.
// Both keep sum = B and leave exactly one garbage output.
package neon_pkg;

  typedef enum logic {
    CARRY_TOFFOLI = 1'b0,
    CARRY_A       = 1'b1
  } carry_mode_e;

endpackage
