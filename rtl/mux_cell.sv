// mux_cell: sum selection of a 5-bit carry-select block.
//
// The block sum for carry-in 0 is S^0; for carry-in 1 it is S^0 + 1, which is
// S^0 with bit 0 and every bit whose lower bits all propagate flipped. Each
// bit's mux therefore chooses between S^0_k and its complement, the select
// being cin for bit 0 and cin & prefix[k-1] above it.
//
// Interface: s0, prefix (from add_one5, bits 0..3), cin (from the block carry
// generator); s = final block sum. Purely combinational.
module mux_cell
  import booth_pkg::*;
(
  input  logic [BLK_W-1:0] s0,
  input  logic [BLK_W-2:0] prefix,
  input  logic             cin,
  output logic [BLK_W-1:0] s
);

  logic [BLK_W-1:0] flip;

  always_comb begin
    flip = {prefix & {(BLK_W-1){cin}}, cin};
    for (int k = 0; k < BLK_W; k++) s[k] = flip[k] ? ~s0[k] : s0[k];
  end

endmodule
