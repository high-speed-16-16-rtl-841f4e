// add_one5: add-one cell of a 5-bit carry-select block.
//
// Adding 1 to the block sum S^0 flips the lowest bits up to and including the
// first 0. Because S^0 is formed with carry-in 0, its lowest run of 1s is
// exactly the lowest run of 1s in A ^ B (no carry can be generated inside a
// run of propagating bits), so the cell works from the half sums h = A ^ B,
// which settle before S^0 does. prefix[k] = h[0] & ... & h[k]; bit k+1 of the
// sum flips when the block carry-in is 1 and prefix[k] is 1. The block
// propagate P = prefix[4].
//
// Interface: h in; prefix and p out. Purely combinational.
module add_one5
  import booth_pkg::*;
(
  input  logic [BLK_W-1:0] h,
  output logic [BLK_W-1:0] prefix,
  output logic             p
);

  assign prefix[0] = h[0];

  for (genvar k = 1; k < BLK_W; k++) begin : g_bit
    assign prefix[k] = prefix[k-1] & h[k];
  end

  assign p = prefix[BLK_W-1];

endmodule
