// fir_filter: direct-form FIR filter whose tap multipliers are fixed-width
// truncated multipliers.
//
// y = sum over k of  C_k * x(n-k) / 2^(2N-P), each product faithfully rounded
// to P bits by trunc_mult. The input x(n) enters a delay line of TAPS-1
// registers (the z^-1 boxes); tap k multiplies the sample delayed by k cycles
// with coefficient coef[k], and a chain of adders sums the P-bit products into
// y. Operands are unsigned. Each product is within one ulp of the exact scaled
// product, so y is within TAPS ulps of the exact sum.
//
// Interface: clk, rst_n (synchronous, active low, clears the delay line); x is
// the new sample, sampled into the delay line at each rising edge; coef holds
// the TAPS coefficients; y is combinational from x, the delay line and coef,
// so y belongs to the sample currently on x (no latency).
//
// The structure and the widths (16-bit samples and coefficients, 24-bit
// products) follow the document's filter diagram; the tap count, the reset,
// unsigned operands and the output width (wide enough that the sum never
// overflows) are this design's choices.
module fir_filter #(
  parameter int N    = 16,  // sample and coefficient width
  parameter int P    = 24,  // product width
  parameter int TAPS = 8,   // number of taps
  localparam int YW  = P + $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        coef [TAPS],
  output logic [YW-1:0]       y
);
  logic [N-1:0]  taps  [TAPS];      // taps[k] = x(n-k)
  logic [N-1:0]  dline [TAPS-1];    // delay registers
  logic [P-1:0]  prod  [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) dline[k] <= '0;
    end else begin
      dline[0] <= x;
      for (int k = 1; k < TAPS - 1; k++) dline[k] <= dline[k-1];
    end
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < TAPS; k++) taps[k] = dline[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    trunc_mult #(.N(N), .P(P)) u_mul (.a(taps[k]), .b(coef[k]), .p(prod[k]));
  end

  always_comb begin
    y = '0;
    for (int k = 0; k < TAPS; k++) y = y + YW'(prod[k]);
  end
endmodule
