// final_adder: two-cycle 25-bit carry-select adder (stages 4 and 5).
//
// The 25 bits are cut into five 5-bit blocks. Stage 4: block 1 (lowest) is
// a cla5 alone and yields final sum bits and its carry out C2; blocks 2..5
// each run a cla5 (sum S^0 and generate G_j, both for carry-in 0) and an
// add_one5 cell working on A ^ B (propagate P_j and the flags that say which
// bits flip when the carry-in is 1). All of that is registered. Stage 5: the
// block carry generator ripples C_j+1 = G_j + P_j*C_j from C2 across the
// blocks, and each block's mux_cell picks S^0 or S^0 + 1. No block ever
// needs a second adder for carry-in 1. The block structure, the add-one
// cells on A ^ B, the block carry generator and the split over two cycles
// follow the published adder; exactly which signals cross the stage-4
// register (S^0, flip flags, G, P, block-1 sum and C2) is this design's
// choice.
//
// Interface: x, y, in_valid from the stage-3 register; after one clock edge
// (the internal stage-4 register) s = (x + y) mod 2^25 and out_valid. s is
// combinational from the internal register and is meant to be registered by
// the caller (output register).
module final_adder
  import booth_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [FA_W-1:0] x,
  input  logic [FA_W-1:0] y,
  output logic            out_valid,
  output logic [FA_W-1:0] s
);

  localparam int unsigned NB = BLKS - 1;  // blocks with add-one and mux cells

  // Stage-4 results crossing the register.
  typedef struct packed {
    logic [BLK_W-1:0]           s_first;  // block 1 sum (final)
    logic                       c_first;  // C2
    logic [NB-1:0][BLK_W-1:0]   s0;       // S^0 of blocks 2..5
    logic [NB-1:0][BLK_W-2:0]   prefix;   // add-one flip flags, bits 0..3
    logic [NB-1:0]              g;
    logic [NB-1:0]              p;
  } st4_t;

  st4_t            st4, st4_q;
  logic [NB:0]     c;                     // carries into blocks 2..5, and out

  // Stage 4
  cla5 u_blk1 (
    .a(x[BLK_W-1:0]),
    .b(y[BLK_W-1:0]),
    .s(st4.s_first),
    .g(st4.c_first)
  );

  for (genvar j = 0; j < NB; j++) begin : g_blk
    localparam int unsigned LSB = (j + 1) * BLK_W;
    logic [BLK_W-1:0] pre;

    cla5 u_cla (
      .a(x[LSB +: BLK_W]),
      .b(y[LSB +: BLK_W]),
      .s(st4.s0[j]),
      .g(st4.g[j])
    );
    add_one5 u_one (
      .h     (x[LSB +: BLK_W] ^ y[LSB +: BLK_W]),
      .prefix(pre),
      .p     (st4.p[j])
    );
    assign st4.prefix[j] = pre[BLK_W-2:0];
  end

  pipe_reg #(.W($bits(st4_t))) u_reg4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(st4),
    .out_valid(out_valid), .q(st4_q)
  );

  // Stage 5
  bcg #(.NB(NB)) u_bcg (
    .c_first(st4_q.c_first),
    .g      (st4_q.g),
    .p      (st4_q.p),
    .c      (c)
  );

  assign s[BLK_W-1:0] = st4_q.s_first;

  for (genvar j = 0; j < NB; j++) begin : g_mux
    mux_cell u_mux (
      .s0    (st4_q.s0[j]),
      .prefix(st4_q.prefix[j]),
      .cin   (c[j]),
      .s     (s[(j+1)*BLK_W +: BLK_W])
    );
  end

endmodule
