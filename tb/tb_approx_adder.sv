// tb_approx_adder: random self-checking test of the word-wide approximate adder.
//
// A second instance uses the CARRY_A cells, whose carry out must be the top
// bit of operand a and whose garbage outputs must be the cells' AB xor carry.
// Drives random operands and carry-in into a 32-bit adder and compares sum,
// carry out and garbage outputs with a bit-serial model of the ripple chain of
// cells (sum bit = B bit, carry = A&B xor carry, garbage bit = A bit). Also
// checks corner operands and that a carry-in can reach the carry out.
module tb_approx_adder;
  import neon_pkg::*;
  localparam int W = 32;
  logic [W-1:0] a, b, s, garbage, s2, garbage2;
  logic ci, co, co2;
  int checks = 0, failures = 0;
  int co_ones = 0;

  approx_adder #(.WIDTH(W)) dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .garbage(garbage));
  approx_adder #(.WIDTH(W), .CARRY_MODE(CARRY_A)) dut_a (
    .a(a), .b(b), .ci(ci), .s(s2), .co(co2), .garbage(garbage2));

  function automatic logic [W:0] model(logic [W-1:0] fa, logic [W-1:0] fb, logic fci);
    logic c = fci;
    logic [W-1:0] fs;
    for (int i = 0; i < W; i++) begin
      fs[i] = fb[i];
      c = (fa[i] & fb[i]) ^ c;
    end
    return {c, fs};
  endfunction

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb, logic tci);
    logic [W:0] exp_v;
    a = ta; b = tb; ci = tci;
    #1;
    exp_v = model(ta, tb, tci);
    checks++;
    if ({co, s} !== exp_v || garbage !== ta) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b: got co=%b s=%h g=%h expected %h", ta, tb, tci, co, s, garbage, exp_v);
    end
    if (co) co_ones++;
    // CARRY_A: carry into bit i is a[i-1] (ci for bit 0), garbage = a&b ^ carry-in
    checks++;
    if (s2 !== tb || co2 !== ta[W-1] || garbage2 !== ((ta & tb) ^ {ta[W-2:0], tci})) begin
      failures++;
      $display("FAIL carry=A a=%h b=%h ci=%b: got co=%b s=%h g=%h", ta, tb, tci, co2, s2, garbage2);
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
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);           // carry-in passes to carry out unchanged
    apply('1, '1, 1'b0);           // every stage toggles the carry
    apply('1, '1, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 2000; n++) apply($urandom, $urandom, 1'($urandom));
    checks++;
    if (co_ones == 0) begin
      failures++;
      $display("FAIL: carry out never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
