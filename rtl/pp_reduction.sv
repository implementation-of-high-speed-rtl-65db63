// pp_reduction: tree reduction of the partial products to two rows, with the
// bias constant injected and the low columns truncated.
//
// The kept PP bits of each column, plus one bias bit in every column below the
// ulp column K = 2N-P (the constant ulp-1, see tmul_pkg), form the level-0
// matrix. Each reduction level works column by column from the least
// significant one: it places full adders (3 bits -> sum + carry) and half adders
// (2 bits -> sum + carry) until the column, counting the carries arriving from
// the column below in the same level, meets that level's target height. The
// targets follow the sequence ..., 6, 4, 3, 2, so for N = P = 8 there are four
// levels. Within a column the next level holds, in order: the sums, the bits
// passed straight down, then the carries from the column below.
//
// After the last level every column holds at most two bits. Columns below
// TRUNC = 2N-P-2 are discarded (truncation); in the last level an adder whose
// sum would fall there is a carry-only cell (full_carry / half_carry). The
// outputs are the two rows of columns TRUNC..2N-1, bit 0 being column TRUNC.
// row0 + row1 then equals, above the truncated columns, a*b minus the deleted
// bits plus the bias. Purely combinational; the depth is the number of levels
// times one full-adder delay.
//
// Deletion, the bias constants, column-wise reduction from the least
// significant column, truncation of the low part and the carry-only cells follow
// the document. The exact adder placement (Dadda-style targets), the single
// merged bias word and truncating both rows of the lowest 2N-P-2 columns are
// this design's choices, made so that the faithful-rounding bound holds by
// construction.
module pp_reduction
  import tmul_pkg::*;
#(
  parameter int N = 8,  // operand width
  parameter int P = 8,  // width of the fixed-width product
  localparam int W  = 2 * N,           // PP columns
  localparam int TR = 2 * N - P - 2,   // first column kept after truncation
  localparam int OW = W - TR           // width of the two output rows
) (
  input  logic [N-1:0][N-1:0] pp,      // pp[i][j], weight 2^(i+j)
  output logic [OW-1:0]       row0,    // first row, columns TR..W-1
  output logic [OW-1:0]       row1     // second row, columns TR..W-1
);
  localparam plan_t PLAN = make_plan(N, P);
  localparam kept_t KEPT = kept_mask(N, P);
  localparam int L    = plan_levels(PLAN);
  localparam int MAXH = plan_maxh(PLAN);
  localparam int H    = (MAXH > 2) ? MAXH : 2;

  if (N > MAXN || P < N || P > 2 * N - 2) begin : g_bad_size
    $error("pp_reduction: need N <= %0d and N <= P <= 2N-2 (N=%0d P=%0d)", MAXN, N, P);
  end
  if (!plan_ok(PLAN)) begin : g_bad_plan
    $error("pp_reduction: reduction plan does not reach two rows");
  end

  // lvl0[c][r] (and g_lvl[l].nxt[c][r] after level l): bit r of column c.
  // Column W collects carries out of the top column; they are always zero
  // because a*b plus the bias stays below 2^(2N), and are never read.
  wire [W:0][H-1:0] lvl0;

  // Level 0: kept PP bits, then the bias bit, then zeros.
  for (genvar c = 0; c <= W; c++) begin : g_l0
    localparam int HC = plan_height(PLAN, 0, c);
    for (genvar r = 0; r < H; r++) begin : g_r
      if (r < HC) begin : g_bit
        localparam int I = init_row_i(KEPT, N, c, r);
        if (I < 0) begin : g_bias
          assign lvl0[c][r] = 1'b1;
        end else begin : g_pp
          assign lvl0[c][r] = pp[I][c-I];
        end
      end else begin : g_zero
        assign lvl0[c][r] = 1'b0;
      end
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    wire [W:0][H-1:0] cur;   // columns entering level l
    wire [W:0][H-1:0] nxt;   // columns leaving level l
    if (l == 0) begin : g_first
      assign cur = lvl0;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar c = 0; c <= W; c++) begin : g_col
      localparam int HH = plan_height(PLAN, l, c);
      localparam int NF = plan_fa(PLAN, l, c);
      localparam int NH = plan_ha(PLAN, l, c);
      localparam int NS = NF + NH;                 // sums kept in column c
      localparam int NP = HH - 3 * NF - 2 * NH;    // bits passed straight down
      localparam int HN = plan_height(PLAN, l + 1, c);
      // first row of column c+1 at level l+1 that receives carries from here
      localparam int CO = (c < W) ? plan_height(PLAN, l, c + 1)
                                    - 2 * plan_fa(PLAN, l, c + 1)
                                    - plan_ha(PLAN, l, c + 1) : 0;
      // last level, sum lands in a truncated column: carry-only cells
      localparam bit CARRY_ONLY = (l == L - 1) && (c < TR);

      for (genvar k = 0; k < NF; k++) begin : g_fa
        if (CARRY_ONLY) begin : g_fc
          full_carry u_fc (
            .a (cur[c][3*k]), .b(cur[c][3*k+1]), .ci(cur[c][3*k+2]),
            .co(nxt[c+1][CO+k])
          );
          assign nxt[c][k] = 1'b0;
        end else begin : g_full
          full_adder u_fa (
            .a (cur[c][3*k]), .b(cur[c][3*k+1]), .ci(cur[c][3*k+2]),
            .s (nxt[c][k]), .co(nxt[c+1][CO+k])
          );
        end
      end

      for (genvar k = 0; k < NH; k++) begin : g_ha
        if (CARRY_ONLY) begin : g_hc
          half_carry u_hc (
            .a (cur[c][3*NF+2*k]), .b(cur[c][3*NF+2*k+1]),
            .co(nxt[c+1][CO+NF+k])
          );
          assign nxt[c][NF+k] = 1'b0;
        end else begin : g_half
          half_adder u_ha (
            .a (cur[c][3*NF+2*k]), .b(cur[c][3*NF+2*k+1]),
            .s (nxt[c][NF+k]), .co(nxt[c+1][CO+NF+k])
          );
        end
      end

      for (genvar r = 0; r < NP; r++) begin : g_pass
        assign nxt[c][NS+r] = cur[c][3*NF+2*NH+r];
      end

      // rows NS+NP .. HN-1 are carries driven from column c-1
      for (genvar r = HN; r < H; r++) begin : g_zero
        assign nxt[c][r] = 1'b0;
      end
    end
  end

  wire [W:0][H-1:0] fin;     // columns after the last level
  if (L == 0) begin : g_fin0
    assign fin = lvl0;
  end else begin : g_fin
    assign fin = g_lvl[L-1].nxt;
  end

  for (genvar c = TR; c < W; c++) begin : g_out
    assign row0[c-TR] = fin[c][0];
    assign row1[c-TR] = fin[c][1];
  end
endmodule
