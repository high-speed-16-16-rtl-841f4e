// pipe_reg: one rank of pipeline registers with a valid tag.
//
// Every stage boundary of the multiplier is one of these: W data bits and a
// valid bit, loaded on each rising clock edge (there is no stall, a new
// operand pair may enter every cycle). The valid bit is cleared by an
// asynchronous active-low reset; data bits are not reset, since nothing reads
// them while their valid bit is 0. The published circuit uses static
// level-sensitive latches at the stage outputs; this design uses
// edge-triggered flip-flops, which give the same one-rank-per-cycle timing
// without two-phase clocking.
//
// Interface: d/in_valid sampled at posedge clk, q/out_valid one cycle later.
module pipe_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         out_valid,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) q <= d;

endmodule
