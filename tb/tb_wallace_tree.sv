// tb_wallace_tree: random stage-1-shaped vectors (rows 4..7 empty below
// column 7, column 0 only in row 0, column 1 only in rows 0 and 1) go in
// back to back. One cycle later lo must equal the vectors' sum in bits 6..0
// and lo + 2^7*(row_x + row_y) must equal their whole sum modulo 2^32.
module tb_wallace_tree;
  import booth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  rowset_t rows, r;
  logic [6:0] lo;
  logic [24:0] row_x, row_y;
  logic [31:0] expect_q [$];
  logic [31:0] total, got;
  int checks = 0, failures = 0, sent = 0;
  int cycle = 0;
  int stamp_q [$];

  wallace_tree dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rows(rows),
    .out_valid(out_valid), .lo(lo), .row_x(row_x), .row_y(row_y)
  );

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid <= (sent < 5000) && ($urandom % 4 != 0);
      for (int i = 0; i < 8; i++) r[i] = (sent % 7 == 0) ? '1 : 32'($urandom);
      for (int i = 4; i < 8; i++) r[i][6:0] = '0;
      r[1][0]   = 1'b0;
      r[2][1:0] = 2'b00;
      r[3][1:0] = 2'b00;
      rows <= r;
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      sent++;
      stamp_q.push_back(cycle);
      total = '0;
      for (int i = 0; i < 8; i++) total += rows[i];
      expect_q.push_back(total);
    end
    if (rst_n && out_valid) begin
      got = {row_x + row_y, 7'd0} + 32'(lo);
      checks++;
      if (expect_q.size() == 0 || got !== expect_q[0] || lo !== expect_q[0][6:0]) begin
        failures++;
        $display("FAIL got %h lo=%h expected %h", got, lo, (expect_q.size() != 0) ? expect_q[0] : 32'h0);
      end
      checks++;
      if (stamp_q.size() == 0 || cycle - stamp_q[0] != 1) begin
        failures++;
        $display("FAIL latency %0d cycles", (stamp_q.size() != 0) ? cycle - stamp_q[0] : -1);
      end
      if (expect_q.size() != 0) void'(expect_q.pop_front());
      if (stamp_q.size() != 0) void'(stamp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent >= 5000);
    repeat (4) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
