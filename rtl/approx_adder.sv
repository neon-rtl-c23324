// approx_adder: WIDTH-bit adder made of approximate full-adder cells.
//
// Every bit position holds one approx_full_adder cell; the carry out of bit i
// feeds the carry in of bit i+1 (ripple carry), ci feeds bit 0 and co is the
// carry out of the top bit. Because each cell's sum output equals its B input,
// the word sum s equals operand b whatever a and ci are; a and ci only reach
// the carry chain and so the carry out co. Each cell leaves one garbage output
// (its copy of A); they are collected on the garbage port so that the
// reversible cells keep all their outputs visible.
//
// Interface: a, b (WIDTH bits), ci in; s (WIDTH bits), co, garbage out.
// CARRY_MODE selects the cell's carry (see neon_pkg).
// Timing: combinational. The sum has one wire of delay; the carry ripples
// through WIDTH AND/XOR stages.
//
// Building the word adder as a ripple chain of the proposed cells follows the
// published description of replacing every conventional adder by the
// proposed cells. The ripple organisation and WIDTH default (32, enough for a
// 16-bit sample times a 16-bit coefficient) are this design's choice.
module approx_adder
  import neon_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter carry_mode_e CARRY_MODE = CARRY_TOFFOLI
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic [WIDTH-1:0] garbage
);

  // carry[i] enters bit i; carry[WIDTH] leaves the top bit.
  logic [WIDTH:0] carry;

  assign carry[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    approx_full_adder #(
      .CARRY_MODE (CARRY_MODE)
    ) u_cell (
      .a       (a[i]),
      .b       (b[i]),
      .cin     (carry[i]),
      .garbage (garbage[i]),
      .sum     (s[i]),
      .cout    (carry[i+1])
    );
  end

  assign co = carry[WIDTH];

endmodule
