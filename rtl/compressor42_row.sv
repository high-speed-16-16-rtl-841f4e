// compressor42_row: one row of 4:2 compressors across W columns.
//
// Column k gets a compressor42 with the four vectors' bit k and the cout of
// column k-1 (cin for column 0). Its sum stays in column k, its carry moves
// to column k+1, so four vectors become two with the same total modulo 2^W:
//   x0 + x1 + x2 + x3 + cin == sum + carry   (mod 2^W).
// Where fewer than four inputs are ever non-zero, synthesis trims the cell to
// a 3:2 compressor or a half adder, which is what the design uses in those
// columns.
//
// Interface: x0..x3 and cin in; sum and carry (already shifted one column
// left) out. Purely combinational.
module compressor42_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W:0]   chain;  // chain[k] = cin of column k
  logic [W-1:0] cy;

  assign chain[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_col
    compressor42 u_c42 (
      .x    ({x3[k], x2[k], x1[k], x0[k]}),
      .cin  (chain[k]),
      .sum  (sum[k]),
      .carry(cy[k]),
      .cout (chain[k+1])
    );
  end

  // Carries out of the top column fall outside the W-bit result.
  if (W > 1) begin : g_shift
    assign carry = {cy[W-2:0], 1'b0};
  end else begin : g_one
    assign carry = '0;
  end

endmodule
