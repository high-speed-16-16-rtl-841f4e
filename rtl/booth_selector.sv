// booth_selector: one partial-product bit of a radix-4 Booth row,
// PP_ij = (A_j*One + A_j-1*Two) ^ Neg.
//
// The published selector splits this into three branches of which exactly
// one conducts: area I (One=1) passes A_j ^ Neg, area II (Two=1) passes the
// left-shifted bit A_j-1 ^ Neg, and area III (neither) passes Neg itself, so
// the -0 code yields a 1 that the added Neg bit later cancels. The same
// three-way choice is written here as a priority select; the one-hot
// encoding makes the priority immaterial.
//
// Interface: sel from booth_encoder, multiplicand bits a_j and a_jm1; pp is
// the partial-product bit. Purely combinational.
module booth_selector
  import booth_pkg::*;
(
  input  booth_sel_t sel,
  input  logic       a_j,
  input  logic       a_jm1,
  output logic       pp
);

  always_comb begin
    if (sel.one)      pp = a_j ^ sel.neg;    // area I:   +-A
    else if (sel.two) pp = a_jm1 ^ sel.neg;  // area II:  +-2A
    else              pp = sel.neg;          // area III: +-0
  end

endmodule
