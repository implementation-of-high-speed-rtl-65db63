// trunc_mult: N x N unsigned fixed-width multiplier with a faithfully rounded
// P-bit result.
//
// p is within one unit of its last place of a*b / 2^(2N-P): it equals
// floor(a*b / 2^(2N-P)) or that value plus one, and is exact whenever a*b is a
// multiple of 2^(2N-P). No error-compensation logic is needed, because deletion,
// reduction, truncation and rounding are planned together:
//
//   pp_generation      forms only the PP bits that survive deletion;
//   pp_reduction       adds the bias constant and reduces to two rows over the
//                      columns 2N-P-2 .. 2N-1, dropping everything below;
//   ripple_carry_adder adds the two rows (P+2 bits wide); its top P sum bits
//                      are the product, the two lower bits only feed the carry.
//
// With N = P = 8, 14 of the 64 PP bits are deleted (columns 0-3 and four of
// the five bits of column 4) and the final adder is 10 bits wide instead of 16.
// Interface: a, b unsigned N-bit operands; p the P-bit product. Purely
// combinational, no clock; the delay is the reduction depth (four full-adder
// levels at 8 x 8) plus the P+2 bit ripple carry chain.
//
// The operations and their order follow the document; the sizes of the deleted
// and truncated sets and the single bias word are this design's choices (see
// tmul_pkg), sized so that the error stays below one ulp.
module trunc_mult #(
  parameter int N = 8,  // operand width
  parameter int P = 8   // product width (fixed width: P = N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [P-1:0] p
);
  localparam int TR = 2 * N - P - 2;   // lowest column kept after truncation
  localparam int OW = 2 * N - TR;      // final adder width, P + 2

  logic [N-1:0][N-1:0] pp;
  logic [OW-1:0]       row0, row1, sum;
  logic                cout;           // always 0: a*b + bias < 2^(2N)

  pp_generation #(.N(N), .P(P)) u_ppg (.a(a), .b(b), .pp(pp));

  pp_reduction #(.N(N), .P(P)) u_red (.pp(pp), .row0(row0), .row1(row1));

  ripple_carry_adder #(.WIDTH(OW)) u_cpa (
    .x(row0), .y(row1), .cin(1'b0), .sum(sum), .cout(cout)
  );

  assign p = sum[OW-1 -: P];
endmodule
