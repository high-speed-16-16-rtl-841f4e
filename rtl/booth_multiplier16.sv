// booth_multiplier16: 16x16-bit two's complement multiplier, radix-4 Booth
// encoding, five pipeline stages, one product per clock.
//
//   input register   a, b
//   stage 1          pp_generator: 8 Booth encoders and selector rows, last
//                    row's Neg bit replaced by a 5-bit two's complement
//   stage 2          wallace_tree: two rows of 4:2 compressors, 8 -> 4 rows
//   stage 3          wallace_tree: one row of 4:2 compressors, 4 -> 2 rows;
//                    5-bit adder finishes product bits 0..6
//   stage 4          final_adder: five 5-bit CLA blocks and add-one cells
//   stage 5          final_adder: block carry generator and sum select
//   output register  p
//
// A pair sampled on a rising edge appears on p, with out_valid high,
// LATENCY = 5 rising edges later; a new pair may be applied every cycle.
// Stage contents, widths and the 5-cycle latency follow the published
// design; the valid tag, the asynchronous reset that clears it, and
// edge-triggered flip-flops in place of level-sensitive latches are this
// design's choices.
//
// Interface: clk, rst_n (active low, clears the valid tags only), in_valid,
// a, b in; out_valid, p = a*b (32-bit two's complement) out.
module booth_multiplier16
  import booth_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [PW-1:0] p
);

  logic [N-1:0]        a_q, b_q;
  logic                v0, v1, v3, v4s, v5_in;
  rowset_t             rows, rows_q;
  logic [LOW_BITS-1:0] lo, lo_s3, lo_s4;
  logic [FA_W-1:0]     row_x, row_y, x_s3, y_s3, sum_hi;
  logic                v2;

  // Input register
  pipe_reg #(.W(2*N)) u_in_reg (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d({a, b}),
    .out_valid(v0), .q({a_q, b_q})
  );

  // Stage 1
  pp_generator u_ppg (.a(a_q), .b(b_q), .rows(rows));

  pipe_reg #(.W($bits(rowset_t))) u_reg1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v0), .d(rows),
    .out_valid(v1), .q(rows_q)
  );

  // Stages 2 and 3 (stage-2 register inside)
  wallace_tree u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .rows(rows_q),
    .out_valid(v2), .lo(lo), .row_x(row_x), .row_y(row_y)
  );

  pipe_reg #(.W(LOW_BITS + 2*FA_W)) u_reg3 (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .d({lo, row_x, row_y}),
    .out_valid(v3), .q({lo_s3, x_s3, y_s3})
  );

  // Stages 4 and 5 (stage-4 register inside); product bits 0..6 wait in a
  // register alongside.
  final_adder u_fa (
    .clk(clk), .rst_n(rst_n), .in_valid(v3), .x(x_s3), .y(y_s3),
    .out_valid(v4s), .s(sum_hi)
  );

  always_ff @(posedge clk) lo_s4 <= lo_s3;

  assign v5_in = v4s;

  // Output register
  pipe_reg #(.W(PW)) u_out_reg (
    .clk(clk), .rst_n(rst_n), .in_valid(v5_in), .d({sum_hi, lo_s4}),
    .out_valid(out_valid), .q(p)
  );

endmodule
