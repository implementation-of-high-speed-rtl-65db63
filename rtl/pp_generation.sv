// pp_generation: partial-product generation with deletion.
//
// Forms the N x N AND array pp[i][j] = a[i] & b[j] of an unsigned multiplication;
// bit pp[i][j] has weight 2^(i+j). The lowest-weight bits chosen for deletion
// (tmul_pkg::kept_mask, total weight at most half an ulp of the P-bit result) are
// not formed: no AND gate exists for them and their output is a constant 0 that
// the reduction tree never reads. Purely combinational.
//
// Forming the AND array and deleting low-order bits before reduction follow
// the document; the greedy order in which bits are deleted is this design's.
module pp_generation
  import tmul_pkg::*;
#(
  parameter int N = 8,  // operand width
  parameter int P = 8   // width of the fixed-width product
) (
  input  logic [N-1:0]         a,   // multiplicand
  input  logic [N-1:0]         b,   // multiplier
  output logic [N-1:0][N-1:0]  pp   // pp[i][j] = a[i] & b[j], 0 where deleted
);
  localparam kept_t KEPT = kept_mask(N, P);

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      if (KEPT[i*MAXN + j]) begin : g_and
        assign pp[i][j] = a[i] & b[j];
      end else begin : g_del
        assign pp[i][j] = 1'b0;
      end
    end
  end
endmodule
