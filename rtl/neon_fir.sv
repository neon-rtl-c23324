// neon_fir: N-th order direct-form FIR filter whose adders are approximate
// reversible adder cells.
//
// The filter computes the direct form y[n] = sum_{i=0..N} b_i x[n-i] with the
// usual structure: a tapped delay line holds x[n-1] .. x[n-N], one multiplier
// per tap forms p_i = b_i * x[n-i], and a chain of N adders accumulates the
// products from left to right. Adder k (k = 1..N) takes the running sum from
// adder k-1 (p_0 for adder 1) on its A input and p_k on its B input; the sum
// of adder N is y[n]. Every adder is an approx_adder, a ripple chain of
// approximate full-adder cells (sum = B, carry = AB xor Cin) built from one
// Toffoli gate each.
//
// Consequence of the cell equations: each adder's sum equals its B operand, so
// y[n] = b_N * x[n-N] bit for bit. The other taps influence only the carry
// outputs c_out[k] of the adders. This is the behaviour of the published
// structure, not an error of this implementation.
//
// Parameters: ORDER (N), DATA_W (sample width), COEF_W (coefficient width),
// ACC_W (adder width, default the full product width) and CARRY_MODE (which
// Toffoli output the adder cells use as carry, see neon_pkg).
//
// The garbage outputs of the cells are kept as a named internal net and not
// brought out; they carry no result, so the lint warning that they are unused
// is expected.
//
// Interface:
//   clk, rst_n   clock, asynchronous active-low reset (clears the delay line)
//   en           shift enable: a new sample x_in is taken on each clock edge
//                with en high
//   x_in         input sample x[n], DATA_W bits, unsigned
//   coeff[i]     coefficient b_i, COEF_W bits, unsigned, i = 0..ORDER
//   c_in[k]      carry into bit 0 of adder k, k = 1..ORDER
//   y_out        filter output y[n], ACC_W = DATA_W + COEF_W bits
//   c_out[k]     carry out of the top bit of adder k
// Timing: x[n] enters combinationally: y_out and c_out belong to the current
// x_in and the delay line contents; the delay line shifts on the clock edge.
// The latency from x_in to y_out is therefore ORDER enabled clock edges for
// the b_N tap (the only tap that reaches the sum).
//
// Order, adder structure, delay line and tap multipliers follow the published
// filter; ORDER = 16 and DATA_W = 16 are the largest order and input width it
// evaluates. The coefficient width, unsigned format, full-width products,
// enable, reset and the separate carry-in/carry-out port per adder (drawn but
// not described) are this design's choices.
module neon_fir
  import neon_pkg::*;
#(
  parameter int unsigned ORDER      = 16,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned COEF_W     = 16,
  parameter int unsigned ACC_W      = DATA_W + COEF_W,
  parameter carry_mode_e CARRY_MODE = CARRY_TOFFOLI
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] x_in,
  input  logic [COEF_W-1:0] coeff [0:ORDER],
  input  logic [ORDER:1]    c_in,
  output logic [ACC_W-1:0]  y_out,
  output logic [ORDER:1]    c_out
);

  // x[n-i] for i = 0..ORDER
  logic [DATA_W-1:0] taps [0:ORDER];
  // p_i = b_i * x[n-i]
  logic [ACC_W-1:0]  prod [0:ORDER];
  // psum[0] = p_0, psum[k] = sum output of adder k
  logic [ACC_W-1:0]  psum [0:ORDER];
  // garbage outputs of the reversible cells: carry no result by construction
  logic [ACC_W-1:0]  garbage [1:ORDER];

  delay_line #(
    .DEPTH  (ORDER),
    .DATA_W (DATA_W)
  ) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .x     (x_in),
    .taps  (taps)
  );

  for (genvar i = 0; i <= ORDER; i++) begin : g_tap
    logic [DATA_W+COEF_W-1:0] p_full;

    tap_multiplier #(
      .DATA_W (DATA_W),
      .COEF_W (COEF_W)
    ) u_mul (
      .x     (taps[i]),
      .coeff (coeff[i]),
      .p     (p_full)
    );

    assign prod[i] = ACC_W'(p_full);
  end

  assign psum[0] = prod[0];

  for (genvar k = 1; k <= ORDER; k++) begin : g_add
    approx_adder #(
      .WIDTH      (ACC_W),
      .CARRY_MODE (CARRY_MODE)
    ) u_add (
      .a       (psum[k-1]),
      .b       (prod[k]),
      .ci      (c_in[k]),
      .s       (psum[k]),
      .co      (c_out[k]),
      .garbage (garbage[k])
    );
  end

  assign y_out = psum[ORDER];

endmodule
