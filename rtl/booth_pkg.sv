// booth_pkg: sizes and types shared by the 16x16 pipelined radix-4 Booth
// multiplier. The operand width, the eight partial-product rows, the 5-bit
// two's complement of the last row, the 25-bit two-cycle final adder and the
// 5-cycle latency are the design's published figures; the remaining
// constants are derived from them.
package booth_pkg;

  localparam int unsigned N        = 16;           // operand width
  localparam int unsigned ROWS     = N / 2;        // radix-4 partial-product rows
  localparam int unsigned PPW      = N + 1;        // bits per row (room for 2A)
  localparam int unsigned PW       = 2 * N;        // product width
  localparam int unsigned TC_BITS  = 5;            // low bits of the last row that are two's complemented
  localparam int unsigned LOW_BITS = N / 2 - 1;    // product bits final after stage 3 (columns 0..6)
  localparam int unsigned BLK_W    = 5;            // final-adder block width
  localparam int unsigned FA_W     = PW - LOW_BITS; // final-adder width (25)
  localparam int unsigned BLKS     = FA_W / BLK_W;  // final-adder blocks (5)
  localparam int unsigned LATENCY  = 5;            // clock edges from input register to output register

  // Column-aligned partial-product vector: bit k has weight 2^k.
  typedef logic [PW-1:0] colvec_t;

  // The eight rows of stage 1, each a column-aligned vector.
  typedef logic [ROWS-1:0][PW-1:0] rowset_t;

  // Booth select signals of one row (Table-1 style one-hot One/Two plus Neg).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_sel_t;

endpackage
