// tb_tap_multiplier: random self-checking test of the tap multiplier.
//
// Compares the 32-bit product of two 16-bit unsigned operands with a 64-bit
// reference product, including the extreme operands.
module tb_tap_multiplier;
  logic [15:0] x, coeff;
  logic [31:0] p;
  int checks = 0, failures = 0;

  tap_multiplier #(.DATA_W(16), .COEF_W(16)) dut (.x(x), .coeff(coeff), .p(p));

  task automatic apply(logic [15:0] tx, logic [15:0] tc);
    longint unsigned ref_p;
    x = tx; coeff = tc;
    #1;
    ref_p = longint'(tx) * longint'(tc);
    checks++;
    if (64'(p) !== ref_p) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", tx, tc, p, ref_p);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 1);
    apply(1, 16'hFFFF);
    for (int n = 0; n < 2000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
