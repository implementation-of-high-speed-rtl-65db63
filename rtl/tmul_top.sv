// tmul_top: top level of the fixed-width multiplier design.
//
// Two independent parts stand side by side, each with its own ports:
//   - the 8 x 8 fixed-width multiplier (trunc_mult, N = P = 8): p is the
//     faithfully rounded upper byte of a*b, combinational;
//   - a direct-form FIR filter (fir_filter, 16-bit samples and coefficients,
//     24-bit products, TAPS taps) whose tap multipliers are the same truncated
//     multiplier at N = 16, P = 24; x is clocked into its delay line on each
//     rising clk edge, y is combinational.
// The multiplier is the design proper; the filter is the application the
// document proposes for it. Tap count and reset are this design's choices.
module tmul_top #(
  parameter int N     = 8,   // multiplier operand width
  parameter int P     = 8,   // multiplier product width
  parameter int FIR_N = 16,  // filter sample / coefficient width
  parameter int FIR_P = 24,  // filter product width
  parameter int TAPS  = 8,   // filter taps
  localparam int YW   = FIR_P + $clog2(TAPS)
) (
  // fixed-width multiplier
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [P-1:0]     p,
  // FIR filter
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FIR_N-1:0] x,
  input  logic [FIR_N-1:0] coef [TAPS],
  output logic [YW-1:0]    y
);
  trunc_mult #(.N(N), .P(P)) u_mult (.a(a), .b(b), .p(p));

  fir_filter #(.N(FIR_N), .P(FIR_P), .TAPS(TAPS)) u_fir (
    .clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .y(y)
  );
endmodule
