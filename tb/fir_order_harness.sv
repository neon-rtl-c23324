// fir_order_harness: self-checking harness that runs the approximate FIR filter
// at one order and word width given by its parameters.
//
// It drives the same phases as the full-size test (reset, impulse latency,
// random samples, coefficients and carry inputs with the shift enable held low
// at random, a mid-stream reset) and compares y_out and every carry output with
// a bit-level model of the approximate adder chain on every cycle. The
// enclosing testbench collects done, checks and failures from each instance.
// CARRY_MODE selects the cell carry of the filter and of the model alike.
module fir_order_harness
  import neon_pkg::*;
#(
  parameter int          ORDER      = 8,
  parameter int          DATA_W     = 8,
  parameter int          COEF_W     = 8,
  parameter carry_mode_e CARRY_MODE = CARRY_TOFFOLI
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int ACC_W = DATA_W + COEF_W;

  logic              clk = 1'b0;
  logic              rst_n, en;
  logic [DATA_W-1:0] x_in;
  logic [COEF_W-1:0] coeff [0:ORDER];
  logic [ORDER:1]    c_in;
  logic [ACC_W-1:0]  y_out;
  logic [ORDER:1]    c_out;

  // testbench history: hist[i] = x[n-i] for i >= 1
  logic [DATA_W-1:0] hist [1:ORDER];

  int n_shift = 0, n_hold = 0, n_reset = 0, n_latency = 0, n_cout = 0, n_cin = 0;
  real err_sum = 0.0;
  int  err_n = 0;

  neon_fir #(.ORDER(ORDER), .DATA_W(DATA_W), .COEF_W(COEF_W), .CARRY_MODE(CARRY_MODE)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .coeff(coeff),
    .c_in(c_in), .y_out(y_out), .c_out(c_out)
  );

  always #5 clk = ~clk;

  // exact product of tap i for the current input and history
  function automatic logic [ACC_W-1:0] tap_product(int i);
    longint unsigned xv = (i == 0) ? longint'(x_in) : longint'(hist[i]);
    return ACC_W'(xv * longint'(coeff[i]));
  endfunction

  // one approximate word addition, bit by bit from the cell equations
  function automatic logic [ACC_W:0] cell_chain(logic [ACC_W-1:0] a, logic [ACC_W-1:0] b, logic ci);
    logic c = ci;
    logic [ACC_W-1:0] s;
    for (int j = 0; j < ACC_W; j++) begin
      s[j] = b[j];
      c    = (CARRY_MODE == CARRY_A) ? a[j] : ((a[j] & b[j]) ^ c);
    end
    return {c, s};
  endfunction

  int fails_shown = 0;

  task automatic compare();
    logic [ACC_W-1:0] run;
    logic [ACC_W:0]   r;
    logic [ORDER:1]   exp_cout;
    longint unsigned  exact = 0;
    run = tap_product(0);
    exact = longint'(run);
    for (int k = 1; k <= ORDER; k++) begin
      r = cell_chain(run, tap_product(k), c_in[k]);
      exp_cout[k] = r[ACC_W];
      run = r[ACC_W-1:0];
      exact += longint'(tap_product(k));
    end
    checks++;
    if (y_out !== run || c_out !== exp_cout) begin
      failures++;
      if (fails_shown++ < 10)
        $display("FAIL t=%0t: y=%h expected %h, c_out=%b expected %b", $time, y_out, run, c_out, exp_cout);
    end
    if (c_out != '0) n_cout++;
    if (exact != 0) begin
      real d = real'(exact) - real'(y_out);
      err_sum += ((d < 0.0) ? -d : d) / real'(exact);
      err_n++;
    end
  endtask

  // one clock cycle: inputs are set on the falling edge, checked, then the
  // rising edge shifts the line when en is high
  task automatic cycle(logic [DATA_W-1:0] x, logic e);
    @(negedge clk);
    x_in = x;
    en   = e;
    #1 compare();
    @(posedge clk);
    if (e && rst_n) begin
      for (int k = ORDER; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = x;
      n_shift++;
    end else n_hold++;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    en    = 1'b0;
    #1;
    for (int k = 1; k <= ORDER; k++) hist[k] = '0;
    compare();
    @(negedge clk);
    rst_n = 1'b1;
    n_reset++;
  endtask

  initial begin
    int first_seen;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; en = 1'b0; x_in = '0; c_in = '0;
    for (int i = 0; i <= ORDER; i++) coeff[i] = '0;
    for (int k = 1; k <= ORDER; k++) hist[k] = '0;
    #2 do_reset();

    // impulse with all-ones coefficients: the output shows it after ORDER edges
    for (int i = 0; i <= ORDER; i++) coeff[i] = COEF_W'(1);
    first_seen = -1;
    for (int t = 0; t <= ORDER + 4; t++) begin
      @(negedge clk);
      x_in = (t == 0) ? DATA_W'(1) : '0;
      en   = 1'b1;
      #1 compare();
      if (y_out != '0 && first_seen < 0) first_seen = t;
      @(posedge clk);
      for (int k = ORDER; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = x_in;
      n_shift++;
    end
    checks++;
    if (first_seen != ORDER) begin
      failures++;
      $display("FAIL: impulse reached the output after %0d edges, expected %0d", first_seen, ORDER);
    end else n_latency++;

    // random operation
    for (int n = 0; n < 3000; n++) begin
      if (n % 200 == 0)
        for (int i = 0; i <= ORDER; i++) coeff[i] = COEF_W'($urandom);
      c_in = ORDER'($urandom);
      if (c_in != '0) n_cin++;
      cycle(DATA_W'($urandom), ($urandom % 5) != 0);
      if (n == 1500) do_reset();
    end

    checks++;
    if (n_shift == 0 || n_hold == 0 || n_reset < 2 || n_latency == 0 || n_cout == 0 || n_cin == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred: shift=%0d hold=%0d reset=%0d latency=%0d cout=%0d cin=%0d",
               n_shift, n_hold, n_reset, n_latency, n_cout, n_cin);
    end
    $display("order %0d, %0d-bit, carry mode %s: mechanisms: shift=%0d hold=%0d reset=%0d impulse_latency=%0d cout_set=%0d cin_used=%0d",
             ORDER, DATA_W, CARRY_MODE.name(), n_shift, n_hold, n_reset, n_latency, n_cout, n_cin);
    if (err_n > 0)
      $display("order %0d: mean relative error of y against the exact FIR sum: %f over %0d outputs", ORDER, err_sum / err_n, err_n);
    done = 1'b1;
  end
endmodule
