// tb_toffoli_gate: exhaustive self-checking test of the Toffoli gate.
//
// Applies all eight input vectors, compares each output with the gate's
// defining equations (A, B, AB xor C) and checks that the eight output vectors
// are all different, i.e. that the gate is reversible.
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q} !== {a, b}) begin
        failures++;
        $display("FAIL v=%0d: pass-through outputs %b%b", v, p, q);
      end
      checks++;
      // third output is 1 for exactly these input vectors: 001, 011, 101, 110
      if (r !== (v == 1 || v == 3 || v == 5 || v == 6)) begin
        failures++;
        $display("FAIL v=%0d: r=%b", v, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL: gate is not a bijection, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
