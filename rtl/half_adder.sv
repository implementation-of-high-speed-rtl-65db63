// half_adder: 1-bit half adder, the HA cell of the reduction tree.
//
// Adds two bits of equal weight: s is their sum modulo 2 (weight 1) and co the
// carry (weight 2). Purely combinational; the function follows the document.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
