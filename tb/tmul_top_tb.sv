// tmul_top_tb: end-to-end test of the top level at its default parameters.
//
// Multiplier side: every 8 x 8 operand pair; the result must be within one ulp
// of a*b/256 and exact when a*b is a multiple of 256. Counted mechanisms: a
// deleted PP bit being 1 (so deletion changed the matrix), a result rounded up,
// a result rounded down, an exact result. Filter side: an impulse of 256 with
// coefficients that are multiples of 256 must reproduce every coefficient in
// turn as it travels down the delay line; random data must stay within TAPS
// ulps of the exact sum; a reset must clear the delay line. Each mechanism
// that never occurs counts as a failure.
module tmul_top_tb;
  localparam int TAPS = 8;
  int checks = 0, failures = 0;

  logic [7:0]   a, b, p;
  logic         clk = 0, rst_n = 0;
  logic [15:0]  x;
  logic [15:0]  coef [TAPS];
  logic [26:0]  y;
  logic [15:0]  hist [TAPS];

  int n_deleted = 0, n_up = 0, n_down = 0, n_exact = 0, n_impulse = 0, n_reset = 0;

  tmul_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fir_step(input logic [15:0] v, input bit exact_mode);
    longint e, got;
    x = v;
    hist[0] = v;
    #1;
    e = 0;
    for (int k = 0; k < TAPS; k++) e += longint'(hist[k]) * longint'(coef[k]);
    got = longint'(y) * 256;
    checks++;
    if (exact_mode ? (got != e) : (got <= e - TAPS * 256 || got >= e + TAPS * 256)) begin
      failures++;
      if (failures < 10) $display("FAIL fir: y=%0d exact*256=%0d", y, e);
    end
    @(posedge clk);
    #1;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
  endtask

  initial begin
    longint exact, got;
    x = '0;
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = 16'((k + 2) * 256);
      hist[k] = '0;
    end
    // multiplier
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        exact = longint'(i * j);
        got   = longint'(p) * 256;
        checks++;
        if (got <= exact - 256 || got >= exact + 256 || (exact % 256 == 0 && got != exact)) begin
          failures++;
          if (failures < 10) $display("FAIL mult: %h * %h gave %h", a, b, p);
        end
        // bits a0b0, a0b1, a1b0 are among the deleted ones
        if ((a[0] & b[0]) | (a[0] & b[1]) | (a[1] & b[0])) n_deleted++;
        if (got > exact) n_up++;
        if (got < exact) n_down++;
        if (got == exact) n_exact++;
      end
    // filter
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fir_step(16'd256, 1'b1);
    for (int n = 1; n < TAPS; n++) begin
      x = '0;
      #1;
      if (y == 27'(coef[n])) n_impulse++;   // impulse has reached tap n
      fir_step(16'd0, 1'b1);
    end
    for (int k = 0; k < TAPS; k++) coef[k] = 16'($urandom);
    for (int n = 0; n < 500; n++) fir_step(16'($urandom), 1'b0);
    rst_n = 0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int k = 1; k < TAPS; k++) hist[k] = '0;
    x = '0;
    #1;
    if (y == '0) n_reset++;
    fir_step(16'd0, 1'b1);

    $display("deleted-bit inputs=%0d rounded up=%0d down=%0d exact=%0d impulse taps=%0d resets=%0d",
             n_deleted, n_up, n_down, n_exact, n_impulse, n_reset);
    checks++;
    if (n_deleted == 0 || n_up == 0 || n_down == 0 || n_exact == 0 ||
        n_impulse != TAPS - 1 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
