// bcg: block carry generator of the two-cycle final adder.
//
// Starting from the carry out of block 1 (c_first = C2), the carry into each
// following 5-bit block is C_j+1 = G_j + P_j * C_j, where G_j is the block's
// carry out for carry-in 0 and P_j says all its bits propagate. G_j and P_j
// are never both 1, which the published pass-transistor cell exploits; the
// logic function is the same.
//
// Interface: c_first, g[NB-1:0] and p[NB-1:0] of blocks 2..NB+1; c[j] is the
// carry into block j+2 (c[0] = c_first) and c[NB] the carry out of the last
// block. Purely combinational.
module bcg #(
  parameter int unsigned NB = 4
) (
  input  logic          c_first,
  input  logic [NB-1:0] g,
  input  logic [NB-1:0] p,
  output logic [NB:0]   c
);

  assign c[0] = c_first;

  for (genvar j = 1; j <= NB; j++) begin : g_blk
    assign c[j] = g[j-1] | (p[j-1] & c[j-1]);
  end

endmodule
