// booth_encoder: radix-4 (modified Booth) digit recoder for one partial-
// product row.
//
// The multiplier triple {b2i+1, b2i, b2i-1} selects one of +0, +A, +2A, -2A,
// -A, -0. Following the design's truth table, the row is described by three
// signals: One (select A), Two (select 2A) and Neg (invert the row and add 1).
// As in the published encoder, One = X = b2i ^ b2i-1, Two = ~X & Y with
// Y = b2i ^ b2i+1, and Neg = b2i+1. One and Two are never both 1; for 000 and
// 111 both are 0 (area III), and Neg still follows b2i+1, so 111 produces an
// all-ones row plus one, which is zero.
//
// Interface: b = {b2i+1, b2i, b2i-1}; sel = {neg, one, two}. Purely
// combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0] b,
  output booth_sel_t sel
);

  logic x, y;

  always_comb begin
    x       = b[1] ^ b[0];
    y       = b[1] ^ b[2];
    sel.one = x;
    sel.two = ~x & y;
    sel.neg = b[2];
  end

endmodule
