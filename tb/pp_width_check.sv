// pp_width_check: testbench helper. Drives a W-bit pp_generator with corner
// and random operand pairs and checks that its W/2 row vectors add up to
// a*b modulo 2^(2W). Counts checks and failures and raises done when its
// NPAIRS random pairs are through.
module pp_width_check #(
  parameter int unsigned W      = 16,
  parameter int unsigned NPAIRS = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  logic [W-1:0]              a, b;
  logic [W/2-1:0][2*W-1:0]   rows;
  logic [2*W-1:0]            total, want;
  logic signed [2*W-1:0]     ea, eb;

  pp_generator #(.W(W)) dut (.a(a), .b(b), .rows(rows));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    v = '0;
    for (int k = 0; k < W; k += 32) v = (v << 32) ^ W'($urandom);
    return v;
  endfunction

  task automatic check_pair(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta;
    b = tb_;
    #1;
    total = '0;
    for (int i = 0; i < W / 2; i++) total += rows[i];
    ea   = {{W{a[W-1]}}, a};
    eb   = {{W{b[W-1]}}, b};
    want = ea * eb;
    checks++;
    if (total !== want) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h sum=%h expected %h", W, a, b, total, want);
    end
  endtask

  logic [W-1:0] corner [6];

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    corner   = '{'0, W'(1), '1, {1'b0, {(W-1){1'b1}}}, {1'b1, {(W-1){1'b0}}}, W'(32)};
    foreach (corner[i])
      foreach (corner[j]) check_pair(corner[i], corner[j]);
    for (int n = 0; n < NPAIRS; n++) check_pair(rnd(), rnd());
    done = 1'b1;
  end

endmodule
