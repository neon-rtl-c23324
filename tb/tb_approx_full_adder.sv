// tb_approx_full_adder: exhaustive self-checking test of the approximate cell
// in both carry modes.
//
// Compares each cell with a table of expected outputs for all eight inputs:
//   CARRY_TOFFOLI: sum = B, cout = AB xor Cin, garbage = A
//   CARRY_A:       sum = B, cout = A,          garbage = AB xor Cin
// and counts how often sum and carry agree with an exact full adder: the sum
// must agree in four of the eight cases and either carry in six.
module tb_approx_full_adder;
  import neon_pkg::*;

  logic a, b, cin;
  logic g_t, s_t, c_t;   // CARRY_TOFFOLI instance
  logic g_a, s_a, c_a;   // CARRY_A instance
  int checks = 0, failures = 0;
  int sum_ok = 0, carry_t_ok = 0, carry_a_ok = 0;
  // expected {garbage, sum, cout} indexed by {a, b, cin}
  localparam logic [2:0] EXP_T [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b100, 3'b101, 3'b111, 3'b110};
  localparam logic [2:0] EXP_A [8] = '{3'b000, 3'b100, 3'b010, 3'b110,
                                       3'b001, 3'b101, 3'b111, 3'b011};

  approx_full_adder #(.CARRY_MODE(CARRY_TOFFOLI)) dut_t (
    .a(a), .b(b), .cin(cin), .garbage(g_t), .sum(s_t), .cout(c_t));
  approx_full_adder #(.CARRY_MODE(CARRY_A)) dut_a (
    .a(a), .b(b), .cin(cin), .garbage(g_a), .sum(s_a), .cout(c_a));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exact;
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({g_t, s_t, c_t} !== EXP_T[v]) begin
        failures++;
        $display("FAIL toffoli carry %b%b%b: got g=%b s=%b c=%b expected %b", a, b, cin, g_t, s_t, c_t, EXP_T[v]);
      end
      checks++;
      if ({g_a, s_a, c_a} !== EXP_A[v]) begin
        failures++;
        $display("FAIL carry=A %b%b%b: got g=%b s=%b c=%b expected %b", a, b, cin, g_a, s_a, c_a, EXP_A[v]);
      end
      exact = 2'(a) + 2'(b) + 2'(cin);
      if (s_t == exact[0]) sum_ok++;
      if (c_t == exact[1]) carry_t_ok++;
      if (c_a == exact[1]) carry_a_ok++;
    end
    checks++;
    if (sum_ok != 4 || carry_t_ok != 6 || carry_a_ok != 6) begin
      failures++;
      $display("FAIL: exact matches sum=%0d (4) carry_toffoli=%0d (6) carry_a=%0d (6)",
               sum_ok, carry_t_ok, carry_a_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
