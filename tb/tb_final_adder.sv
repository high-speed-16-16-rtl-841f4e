// tb_final_adder: 25-bit operand pairs go in back to back (with random idle
// cycles); exactly one clock edge later s must be (x + y) mod 2^25.
// Directed pairs make every block carry ripple through the propagating
// blocks (x = all ones, y = 1 and similar).
module tb_final_adder;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [24:0] x, y, s;
  logic [24:0] expect_q [$];
  int checks = 0, failures = 0, sent = 0;
  int cycle = 0;
  int stamp_q [$];

  final_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .s(s)
  );

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid <= (sent < 20000) && ($urandom % 5 != 0);
      case (sent % 6)
        0: begin x <= '1; y <= 25'd1; end
        1: begin x <= 25'($urandom); y <= ~x; end
        default: begin x <= 25'($urandom); y <= 25'($urandom); end
      endcase
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      checks++;
      if (expect_q.size() == 0 || s !== expect_q[0]) begin
        failures++;
        $display("FAIL s=%h expected %h", s, (expect_q.size() != 0) ? expect_q[0] : 25'h0);
      end
      checks++;
      if (stamp_q.size() == 0 || cycle - stamp_q[0] != 1) begin
        failures++;
        $display("FAIL latency %0d cycles", (stamp_q.size() != 0) ? cycle - stamp_q[0] : -1);
      end
      if (expect_q.size() != 0) void'(expect_q.pop_front());
      if (stamp_q.size() != 0) void'(stamp_q.pop_front());
    end
    if (rst_n && in_valid) begin
      sent++;
      stamp_q.push_back(cycle);
      expect_q.push_back(x + y);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent >= 20000);
    repeat (3) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL %0d sums never came out", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
