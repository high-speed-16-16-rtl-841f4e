// twos_complementer5: removes the extra partial-product row of the radix-4
// Booth array.
//
// Every negative Booth row needs a +1 (its Neg bit) at the row's LSB column.
// For rows 1..7 that bit is merged into the row itself (kh_generator); the
// last row has no row below it to receive the carry. Instead, the low five
// multiplicand bits fed to the last row's selectors are replaced by their
// 5-bit two's complement when Neg8 = 1, and the selectors of those five bits
// are then used without inversion. The carry of that complement, C6, has
// weight 2^5 relative to the last row (column 19), the first column left of
// row 1's sign extension, which is empty. Five bits are needed because that
// empty column is five places to the left of the last row's LSB; the width
// does not grow with the operand size.
//
// The complement is built as in the published circuit: x[0] = a[0] always,
// a zero-detect over the lower bits drives an XNOR per bit, and a 4-bit 2:1
// mux picks a[4:1] (Neg8 = 0) or the complemented bits (Neg8 = 1). C6 is
// chosen like a Booth branch: area I (x1) gives Neg8 & (a[4:0] == 0), area II
// (x2) gives Neg8 & (a[3:0] == 0), area III gives Neg8 (the -0 code).
//
// Interface: a = multiplicand bits 4..0, sel = Booth select of the last row;
// x = bits fed to the last row's five low selectors, c6 = carry into column
// 19. Purely combinational.
module twos_complementer5
  import booth_pkg::*;
(
  input  logic [TC_BITS-1:0] a,
  input  booth_sel_t         sel,
  output logic [TC_BITS-1:0] x,
  output logic               c6
);

  logic [TC_BITS:0]   zero;   // zero[k] = (a[k-1:0] == 0)
  logic [TC_BITS-1:1] neg_a;  // bits 4..1 of (-a) modulo 2^5 (bit 0 is a[0])

  assign zero[0] = 1'b1;

  for (genvar k = 1; k <= TC_BITS; k++) begin : g_zero
    assign zero[k] = zero[k-1] & ~a[k-1];
  end

  for (genvar k = 1; k < TC_BITS; k++) begin : g_neg
    assign neg_a[k] = ~(a[k] ^ zero[k]);
  end

  always_comb begin
    x[0]           = a[0];
    x[TC_BITS-1:1] = sel.neg ? neg_a[TC_BITS-1:1] : a[TC_BITS-1:1];
    if (sel.one)      c6 = sel.neg & zero[TC_BITS];
    else if (sel.two) c6 = sel.neg & zero[TC_BITS-1];
    else              c6 = sel.neg;
  end

endmodule
