// half_carry: carry-only half adder (HC cell).
//
// Used in the last reduction level where a half adder's sum would land in a
// column that is truncated: only the carry (weight 2) of the two input bits is
// formed. Purely combinational. The cell and its role follow the document's
// reduction diagram.
module half_carry (
  input  logic a,
  input  logic b,
  output logic co
);
  always_comb co = a & b;
endmodule
