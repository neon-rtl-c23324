// tb_neon_fir_orders: runs the approximate FIR filter at the three sizes it is
// meant for: order 8 with 8-bit samples and coefficients, order 12 with 12-bit
// and order 16 with 16-bit. Each size is one fir_order_harness instance that
// checks y_out and the carry outputs against a bit-level model on every
// cycle. A fourth instance runs order 8 with the alternative cell carry
// (carry = A). This testbench waits for all of them and adds up their results.
module tb_neon_fir_orders;
  import neon_pkg::*;
  logic done8, done12, done16, done8a;
  int   c8, c12, c16, c8a, f8, f12, f16, f8a;
  int   checks = 0, failures = 0;

  fir_order_harness #(.ORDER(8),  .DATA_W(8),  .COEF_W(8))  u_o8  (.done(done8),  .checks(c8),  .failures(f8));
  fir_order_harness #(.ORDER(12), .DATA_W(12), .COEF_W(12)) u_o12 (.done(done12), .checks(c12), .failures(f12));
  fir_order_harness #(.ORDER(16), .DATA_W(16), .COEF_W(16)) u_o16 (.done(done16), .checks(c16), .failures(f16));
  fir_order_harness #(.ORDER(8),  .DATA_W(8),  .COEF_W(8), .CARRY_MODE(CARRY_A))
    u_o8a (.done(done8a), .checks(c8a), .failures(f8a));

  initial begin : watchdog
    #1000000;
    checks   = c8 + c12 + c16 + c8a;
    failures = f8 + f12 + f16 + f8a + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done8 && done12 && done16 && done8a);
    checks   = c8 + c12 + c16 + c8a;
    failures = f8 + f12 + f16 + f8a;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
