// trunc_mult_tb: exhaustive check of the 8 x 8 fixed-width multiplier and a
// random check of the 16 x 16 -> 24-bit configuration used by the FIR filter.
//
// For every operand pair the exact product X = a*b is computed here with a
// plain multiplication; the DUT's result p must satisfy
//     |p * 2^(2N-P) - X| < 2^(2N-P)      (faithful rounding, error < 1 ulp)
// and must be exact when X is a multiple of 2^(2N-P). The worked example
// 0x89 * 0xA5 = 0x59 is checked by itself. The multiplier is combinational;
// each vector is given 1 ns to settle.
module trunc_mult_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [7:0]  p8;
  logic [15:0] a16, b16;
  logic [23:0] p24;

  trunc_mult dut8 (.a(a8), .b(b8), .p(p8));
  trunc_mult #(.N(16), .P(24)) dut16 (.a(a16), .b(b16), .p(p24));

  int n_up = 0, n_down = 0;   // results above / below the exact product

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    longint exact, got;
    a8 = x; b8 = y;
    #1;
    exact = longint'(x) * longint'(y);
    got   = longint'(p8) << 8;
    checks++;
    if (got <= exact - 256 || got >= exact + 256 ||
        (exact % 256 == 0 && got != exact)) begin
      failures++;
      if (failures < 10)
        $display("FAIL 8x8: a=%h b=%h p=%h exact=%0d", x, y, p8, exact);
    end
    if (got > exact) n_up++;
    if (got < exact) n_down++;
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    longint exact, got;
    a16 = x; b16 = y;
    #1;
    exact = longint'(x) * longint'(y);
    got   = longint'(p24) << 8;
    checks++;
    if (got <= exact - 256 || got >= exact + 256 ||
        (exact % 256 == 0 && got != exact)) begin
      failures++;
      if (failures < 10)
        $display("FAIL 16x16: a=%h b=%h p=%h exact=%0d", x, y, p24, exact);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    // worked example: 0x89 * 0xA5 -> 0x59
    a8 = 8'h89; b8 = 8'hA5; #1;
    checks++;
    if (p8 !== 8'h59) begin
      failures++;
      $display("FAIL example: 89 * A5 gave %h, expected 59", p8);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check8(8'(x), 8'(y));
    // both rounding directions must occur, else the check above is too weak
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL: results never rounded both ways (up=%0d down=%0d)", n_up, n_down);
    end
    // corners and random vectors at 16 x 16
    check16(16'h0000, 16'h0000);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFF, 16'h0001);
    check16(16'h8000, 16'h8000);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
    $display("8x8: %0d results above, %0d below the exact product", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
