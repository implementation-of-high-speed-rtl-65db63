// fir_filter_tb: checks the FIR filter against an exact model.
//
// Phase 1: coefficients that are multiples of 256 make every product exact, so
// an impulse of 256 must reproduce the coefficients one per cycle (impulse
// response) and a step must give their running sums. Phase 2: random samples
// and coefficients; the output must lie within TAPS ulps of the exact sum
// sum_k x(n-k)*C_k / 256 (every product errs by less than one ulp). The model
// keeps its own history of x. The output is combinational: it is checked one
// step after x changes, before the next rising clock edge.
module fir_filter_tb;
  localparam int N = 16, P = 24, TAPS = 8, YW = P + $clog2(TAPS);
  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  x;
  logic [N-1:0]  coef [TAPS];
  logic [YW-1:0] y;
  logic [N-1:0]  hist [TAPS];      // model history, hist[k] = x(n-k)

  fir_filter #(.N(N), .P(P), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present sample v, check y, then clock it into the delay line
  task automatic step(input logic [N-1:0] v, input bit exact_mode);
    longint sum_exact, got;
    x = v;
    hist[0] = v;
    #1;
    sum_exact = 0;
    for (int k = 0; k < TAPS; k++) sum_exact += longint'(hist[k]) * longint'(coef[k]);
    got = longint'(y) * 256;
    checks++;
    if (exact_mode ? (got != sum_exact)
                   : (got <= sum_exact - TAPS * 256 || got >= sum_exact + TAPS * 256)) begin
      failures++;
      if (failures < 10) $display("FAIL: y=%0d exact*256=%0d", y, sum_exact);
    end
    @(posedge clk);
    #1;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
  endtask

  initial begin
    x = '0;
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = N'((k + 1) * 256 + 256 * (k % 3));
      hist[k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // impulse response
    step(16'd256, 1'b1);
    for (int n = 1; n < TAPS + 2; n++) step(16'd0, 1'b1);
    // step response
    for (int n = 0; n < TAPS + 2; n++) step(16'd512, 1'b1);
    // random data and coefficients
    for (int k = 0; k < TAPS; k++) coef[k] = N'($urandom);
    for (int n = 0; n < 2000; n++) step(N'($urandom), 1'b0);
    // full-scale values
    for (int k = 0; k < TAPS; k++) coef[k] = '1;
    for (int n = 0; n < TAPS + 1; n++) step('1, 1'b0);
    // reset clears the delay line
    rst_n = 0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int k = 1; k < TAPS; k++) hist[k] = '0;
    step(16'd0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
