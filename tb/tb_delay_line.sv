// tb_delay_line: self-checking test of the tapped delay line.
//
// Streams random samples with a random shift enable and compares every tap
// after every clock edge with a history array kept by the testbench. Checks
// that reset clears all stages and that a held enable freezes the line.
module tb_delay_line;
  localparam int DEPTH = 16, W = 16;
  logic clk = 0, rst_n, en;
  logic [W-1:0] x;
  logic [W-1:0] taps [0:DEPTH];
  logic [W-1:0] hist [1:DEPTH];
  int checks = 0, failures = 0, holds = 0;

  delay_line #(.DEPTH(DEPTH), .DATA_W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .taps(taps));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (taps[0] !== x) begin
      failures++;
      $display("FAIL tap0 %h vs %h", taps[0], x);
    end
    for (int k = 1; k <= DEPTH; k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        $display("FAIL tap%0d %h vs %h", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    rst_n = 0; en = 0; x = '0;
    for (int k = 1; k <= DEPTH; k++) hist[k] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 1000; n++) begin
      x  = W'($urandom);
      en = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) begin
        for (int k = DEPTH; k > 1; k--) hist[k] = hist[k-1];
        hist[1] = x;
      end else holds++;
      @(negedge clk);
      compare();
    end
    // reset in the middle of a stream clears every stage
    rst_n = 0;
    #1;
    for (int k = 1; k <= DEPTH; k++) hist[k] = '0;
    compare();
    rst_n = 1;
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL: enable never held low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
