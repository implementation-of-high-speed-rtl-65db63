// full_carry: carry-only full adder (FC cell).
//
// Used in the last reduction level where a full adder's sum would land in a
// column that is truncated: only the carry (weight 2) of the three input bits
// is formed, so the XOR tree of the sum is never built. Purely combinational.
// The cell and its role follow the document's reduction diagram.
module full_carry (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co
);
  always_comb co = (a & b) | (a & ci) | (b & ci);
endmodule
