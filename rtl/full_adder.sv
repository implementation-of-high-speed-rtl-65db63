// full_adder: 1-bit full adder, the FA cell of the reduction tree and the
// stage of the ripple-carry adder.
//
// Adds three bits of equal weight: s is their sum modulo 2 (weight 1) and co the
// carry (weight 2). Purely combinational. The cell's function follows the
// document; the gate-level form (XOR for the sum, majority for the carry) is the
// usual one and this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
