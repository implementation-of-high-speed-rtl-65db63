// pp_reduction_tb: exhaustive 8 x 8 check of the reduction tree.
//
// The testbench forms the kept partial products itself (deletion rule as in
// pp_generation_tb) and computes S = (sum of kept PP bits) + 255, the bias.
// The two output rows cover columns 6..15, so V = (row0 + row1) * 64 must
// equal S minus the truncated low part: D = S - V must lie in 0..126 (two rows
// of six bits) and agree with S modulo 64. Columns 0..5 being truncated is
// checked by D >= 64 occurring, i.e. a carry was dropped.
module pp_reduction_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0][N-1:0] pp;
  logic [9:0]          row0, row1;
  bit   kept [N][N];
  int   n_big = 0;

  pp_reduction dut (.pp(pp), .row0(row0), .row1(row1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cum, s, v, d;
    cum = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) kept[i][j] = 1;
    for (int c = 0; c < 2 * N - 1; c++)
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N && cum + (1 << c) <= 128) begin
          kept[i][c-i] = 0;
          cum += 1 << c;
        end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        s = 255;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            pp[i][j] = kept[i][j] & x[i] & y[j];
            s += int'(pp[i][j]) << (i + j);
          end
        #1;
        v = (int'(row0) + int'(row1)) * 64;
        d = s - v;
        checks++;
        if (d < 0 || d > 126 || (d % 64) != (s % 64)) begin
          failures++;
          if (failures < 10) $display("FAIL: a=%h b=%h S=%0d V=%0d", x, y, s, v);
        end
        if (d >= 64) n_big++;
      end
    checks++;
    if (n_big == 0) begin
      failures++;
      $display("FAIL: truncated part never reached 64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
