// wallace_tree: stages 2 and 3 of the multiplier, partial-product reduction.
//
// Stage 2: two rows of 4:2 compressors, one on rows 0..3 and one on rows
// 4..7, turn the eight vectors into four. A pipeline register follows.
// Stage 3: one row of 4:2 compressors on columns 7..31 turns the four into
// two. Columns 0..6 then already hold at most two bits: columns 0 and 1 a
// single bit, columns 2..6 the two stage-2 outputs of rows 0..3 (rows 4..7
// start at column 7). A 5-bit adder (cla5) sums columns 2..6 in stage 3, so
// product bits 0..6 are final here and the final adder only needs 25 bits.
// The 5-bit adder's carry enters column 7 as the incoming carry of that
// column's stage-3 compressor; this placement is this design's choice.
//
// Interface: rows/in_valid from the stage-1 register; after one clock edge
// (the internal stage-2 register) lo = product bits 6..0 and row_x, row_y =
// two 25-bit rows with weight 2^7 whose sum gives product bits 31..7. The
// outputs are combinational from the internal register and are meant to be
// registered by the caller (stage-3 register).
module wallace_tree
  import booth_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  rowset_t             rows,
  output logic                out_valid,
  output logic [LOW_BITS-1:0] lo,
  output logic [FA_W-1:0]     row_x,
  output logic [FA_W-1:0]     row_y
);

  colvec_t sa, ca, sb, cb;          // stage-2 results
  colvec_t sa_q, ca_q, sb_q, cb_q;  // after the stage-2 register
  logic    c7;

  // Stage 2
  compressor42_row #(.W(PW)) u_row_a (
    .x0(rows[0]), .x1(rows[1]), .x2(rows[2]), .x3(rows[3]), .cin(1'b0),
    .sum(sa), .carry(ca)
  );
  compressor42_row #(.W(PW)) u_row_b (
    .x0(rows[4]), .x1(rows[5]), .x2(rows[6]), .x3(rows[7]), .cin(1'b0),
    .sum(sb), .carry(cb)
  );

  pipe_reg #(.W(4*PW)) u_reg2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d({sa, ca, sb, cb}),
    .out_valid(out_valid), .q({sa_q, ca_q, sb_q, cb_q})
  );

  // Stage 3
  assign lo[1:0] = sa_q[1:0];

  cla5 u_add5 (
    .a(sa_q[LOW_BITS-1:2]),
    .b(ca_q[LOW_BITS-1:2]),
    .s(lo[LOW_BITS-1:2]),
    .g(c7)
  );

  compressor42_row #(.W(FA_W)) u_row_c (
    .x0(sa_q[PW-1:LOW_BITS]), .x1(ca_q[PW-1:LOW_BITS]),
    .x2(sb_q[PW-1:LOW_BITS]), .x3(cb_q[PW-1:LOW_BITS]), .cin(c7),
    .sum(row_x), .carry(row_y)
  );

  // Columns 0..6 of the stage-2 carry vector of rows 0..3 (bits 0 and 1) and
  // of both vectors of rows 4..7 are empty by construction of the layout.
  a_low_columns_empty: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (ca_q[1:0] == '0 && sb_q[LOW_BITS-1:0] == '0 && cb_q[LOW_BITS-1:0] == '0));

endmodule
