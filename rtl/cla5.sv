// cla5: 5-bit block adder with carry-in 0, the partial adder of the final
// adder and the 5-bit adder of stage 3.
//
// Bit 0 is a half adder (the carry-in is known to be 0, so the block can take
// one more bit for free); bits 1..4 use the carry cell
//   C_i = A_i*B_i + (A_i ^ B_i)*C_i-1,
// which passes C_i-1 when exactly one input is 1 and otherwise forces the
// carry to the common input value. The block sum is S^0 (sum for carry-in 0)
// and the last carry is the block generate G = C4. The published transistor
// chain alternates true and complemented carry cells; logically they are the
// same carry and one polarity is used here.
//
// Interface: a, b in; s = (a + b) mod 32, g = carry out. Purely
// combinational.
module cla5
  import booth_pkg::*;
(
  input  logic [BLK_W-1:0] a,
  input  logic [BLK_W-1:0] b,
  output logic [BLK_W-1:0] s,
  output logic             g
);

  logic [BLK_W-1:0] c;   // c[i] = carry out of bit i
  logic [BLK_W-1:0] h;   // half sums

  assign h    = a ^ b;
  assign s[0] = h[0];
  assign c[0] = a[0] & b[0];

  for (genvar i = 1; i < BLK_W; i++) begin : g_bit
    assign c[i] = (a[i] & b[i]) | (h[i] & c[i-1]);
    assign s[i] = h[i] ^ c[i-1];
  end

  assign g = c[BLK_W-1];

endmodule
