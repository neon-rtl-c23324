// tap_multiplier: multiplies one delayed input sample by its coefficient b_i.
//
// The product p = x * coeff is exact and full width (DATA_W + COEF_W bits), so
// nothing is lost before the approximate adder chain. Operands are unsigned.
//
// Interface: x (DATA_W bits), coeff (COEF_W bits) in; p (DATA_W+COEF_W) out.
// Timing: combinational.
//
// The filter multiplies each tap by its coefficient; how the product is formed,
// its width and the unsigned number format are this design's choices.
module tap_multiplier #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16
) (
  input  logic [DATA_W-1:0]        x,
  input  logic [COEF_W-1:0]        coeff,
  output logic [DATA_W+COEF_W-1:0] p
);

  always_comb begin
    p = (DATA_W+COEF_W)'(x) * (DATA_W+COEF_W)'(coeff);
  end

endmodule
