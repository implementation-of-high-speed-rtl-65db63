// pp_generation_tb: exhaustive 8 x 8 check of partial-product generation.
//
// The testbench works out the deletion set on its own: walking the columns
// from the least significant, and within a column by increasing multiplicand
// index, a bit is deleted while the running total of deleted weights stays
// within half an ulp (2^7 for an 8-bit result). Every kept bit must equal
// a[i]&b[j]; every deleted bit must read 0. It also checks that exactly 14
// bits (total weight 113) are deleted.
module pp_generation_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0]         a, b;
  logic [N-1:0][N-1:0]  pp;
  bit   kept [N][N];

  pp_generation dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cum, ndel;
    cum = 0; ndel = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) kept[i][j] = 1;
    for (int c = 0; c < 2 * N - 1; c++)
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N && cum + (1 << c) <= 128) begin
          kept[i][c-i] = 0;
          cum += 1 << c;
          ndel++;
        end
    checks++;
    if (ndel != 14 || cum != 113) begin
      failures++;
      $display("FAIL: model deletes %0d bits of weight %0d", ndel, cum);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            checks++;
            if (pp[i][j] !== (kept[i][j] & a[i] & b[j])) begin
              failures++;
              if (failures < 10) $display("FAIL: a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
