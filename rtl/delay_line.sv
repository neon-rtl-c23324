// delay_line: tapped delay line of DEPTH unit delays (the z^-1 chain).
//
// On every clock edge with en high, the input sample moves into stage 1 and
// every stage k moves into stage k+1, so stage k holds x[n-k]. taps[0] is the
// current input x[n] itself (no register), taps[k] for k = 1..DEPTH is the
// output of the k-th register.
//
// Interface: clk, rst_n (active-low, asynchronous), en (shift enable), x in;
// taps[0:DEPTH] out.
// Timing: a sample applied while en is high appears on taps[k] k enabled clock
// edges later.
//
// The chain of unit delays is the filter's published structure. The enable,
// the asynchronous active-low reset to zero and the register implementation
// are this design's choices.
module delay_line #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] x,
  output logic [DATA_W-1:0] taps [0:DEPTH]
);

  logic [DATA_W-1:0] stage [1:DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= DEPTH; k++) stage[k] <= '0;
    end else if (en) begin
      stage[1] <= x;
      for (int k = 2; k <= DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k <= DEPTH; k++) taps[k] = stage[k];
  end

endmodule
