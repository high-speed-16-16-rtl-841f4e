// kh_generator: folds the Neg bit of a partial-product row into the row's
// least significant bit.
//
// Bit 0 of a row is (A0*One) ^ Neg (A-1 is 0), and the two's complement of a
// negative row also needs Neg added at that same column. Their two-bit sum is
// K + 2H with K = A0*One (sum, stays in the row's LSB column) and
// H = Neg*~(One*A0) (carry, placed in the next column where the row below has
// an empty slot). This keeps the Neg bits of rows 1..7 out of a separate row.
//
// Interface: one, neg of the row, multiplicand bit a0; outputs k and h.
// Purely combinational.
module kh_generator (
  input  logic one,
  input  logic neg,
  input  logic a0,
  output logic k,
  output logic h
);

  always_comb begin
    k = a0 & one;
    h = neg & ~(one & a0);
  end

endmodule
