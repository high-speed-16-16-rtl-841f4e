// pp_generator: stage 1 of the multiplier, Booth encoding and partial-product
// generation, laid out as eight column-aligned vectors.
//
// Eight booth_encoders recode b (with b[-1] = 0) into One/Two/Neg per row.
// Row i (0..7, weight 4^i) has 17 selector bits PP_i,0..16 over the
// multiplicand sign-extended by one bit. Its vector, rows[i], holds:
//   * columns 2i+1 .. 2i+15: PP_i,1..15;
//   * column 2i: K_i, and column 2i+1 of rows[i+1]: H_i, which together
//     equal PP_i,0 + Neg_i (kh_generator), for rows 0..6;
//   * sign extension without extension bits: with E_i the row's sign bit
//     PP_i,16, row 0 gets {~E0, E0, E0} in columns 18..16 and rows 1..7 get
//     ~E_i in column 2i+16 and a constant 1 in column 2i+17. These bits, all
//     rows together, add exactly the sign extension of every row modulo 2^32.
//   * the last row has no K/H. Its five low selectors take the five low
//     multiplicand bits already two's complemented (twos_complementer5) and
//     run without inversion; the complement's carry C6 goes into column 19
//     of rows[0], the empty column next to row 0's sign bits.
// So no ninth row is needed, and rows[0..3] and rows[4..7] each feed a row
// of 4:2 compressors in stage 2. The layout follows the published dot
// diagram; the bit-level bookkeeping (17-bit rows, column numbers) is
// derived from it.
//
// The operand width W is a parameter (even, at least 8; default 16). The
// same construction holds at every width: the last row always starts five
// columns to the right of the column next to row 0's sign bits (W+3), so the
// complement stays five bits wide. The multiplier itself uses W = 16.
//
// Interface: a (multiplicand) and b (multiplier), two's complement; rows =
// W/2 vectors of 2W bits (eight 32-bit vectors, booth_pkg::rowset_t, at the
// default) whose sum is a*b modulo 2^(2W). Purely combinational.
module pp_generator
  import booth_pkg::*;
#(
  parameter int unsigned W = N
) (
  input  logic [W-1:0]                 a,
  input  logic [W-1:0]                 b,
  output logic [W/2-1:0][2*W-1:0]      rows
);

  localparam int unsigned R  = W / 2;   // rows
  localparam int unsigned RW = W + 1;   // bits per row

  if (W % 2 != 0 || W < 6) begin : g_bad_width
    $error("pp_generator: W must be even and at least 6");
  end

  logic [W:0]         aext;   // multiplicand, one sign bit added
  logic [W:0]         bext;   // multiplier with b[-1] = 0 below it
  booth_sel_t         sel      [R];
  booth_sel_t         sel_mag;           // last row's select, inversion off
  logic [RW-1:0]      pp       [R];      // bit 0 of rows 0..R-2 holds K_i
  logic [R-2:0]       h;
  logic [TC_BITS-1:0] x;
  logic               c6;

  assign aext = {a[W-1], a};
  assign bext = {b, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    booth_encoder u_be (
      .b  (bext[2*i+2 -: 3]),
      .sel(sel[i])
    );
    if (i < R - 1) begin : g_normal
      kh_generator u_kh (
        .one(sel[i].one),
        .neg(sel[i].neg),
        .a0 (a[0]),
        .k  (pp[i][0]),
        .h  (h[i])
      );
      for (genvar j = 1; j < RW; j++) begin : g_bit
        booth_selector u_sel (
          .sel  (sel[i]),
          .a_j  (aext[j]),
          .a_jm1(aext[j-1]),
          .pp   (pp[i][j])
        );
      end
    end else begin : g_last
      for (genvar j = 0; j < RW; j++) begin : g_bit
        if (j < TC_BITS) begin : g_tc
          booth_selector u_sel (
            .sel  (sel_mag),
            .a_j  (x[j]),
            .a_jm1(j == 0 ? 1'b0 : x[(j == 0) ? 0 : j-1]),
            .pp   (pp[i][j])
          );
        end else begin : g_plain
          booth_selector u_sel (
            .sel  (sel[i]),
            .a_j  (aext[j]),
            .a_jm1(aext[j-1]),
            .pp   (pp[i][j])
          );
        end
      end
    end
  end

  always_comb begin
    sel_mag     = sel[R-1];
    sel_mag.neg = 1'b0;
  end

  twos_complementer5 u_tc (
    .a  (a[TC_BITS-1:0]),
    .sel(sel[R-1]),
    .x  (x),
    .c6 (c6)
  );

  always_comb begin
    rows = '0;
    for (int i = 0; i < R; i++) begin
      rows[i][2*i +: RW-1] = pp[i][RW-2:0];
      if (i == 0) begin
        rows[0][W +: 3] = {~pp[0][RW-1], pp[0][RW-1], pp[0][RW-1]};
      end else begin
        rows[i][2*i+W]   = ~pp[i][RW-1];
        rows[i][2*i+W+1] = 1'b1;
        rows[i][2*i-1]   = h[i-1];
      end
    end
    rows[0][2*(R-1)+TC_BITS] = c6;
  end

endmodule
