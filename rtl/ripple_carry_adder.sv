// ripple_carry_adder: WIDTH-bit carry-propagate adder built as a chain of
// 1-bit full adders.
//
// {cout, sum} = x + y + cin. Stage k adds x[k], y[k] and the carry of stage k-1;
// its carry "ripples" into stage k+1, so the delay grows linearly with WIDTH.
// Purely combinational. The structure follows the document (its 4-bit example
// sets the default width); in the multiplier it is the final adder.
module ripple_carry_adder #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;   // c[k] is the carry into stage k

  assign c[0] = cin;
  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    full_adder u_fa (.a(x[k]), .b(y[k]), .ci(c[k]), .s(sum[k]), .co(c[k+1]));
  end
  assign cout = c[WIDTH];
endmodule
