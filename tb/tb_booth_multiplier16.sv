// tb_booth_multiplier16: end-to-end test of the 16x16 pipelined Booth
// multiplier at its default (and only) size.
//
// Operand pairs enter back to back, with occasional idle cycles, in three
// phases: all pairs of a set of corner values, uniformly random pairs, and a
// stream in which every operand bit toggles with probability 0.3102 from
// one pair to the next (the input activity the design's power figure is
// quoted at). Each product is compared with a*b computed here, and each must
// appear exactly LATENCY = 5 rising edges after the edge that sampled it.
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: every Booth digit (+-0, +-A, +-2A), a negative
// last row (its Neg bit replaced by the 5-bit two's complement), the carry
// C6 of that complement, the carry of the stage-3 five-bit adder into
// column 7, a block carry passed through a propagating block of the final
// adder, a block sum flipped by its carry-in, and idle cycles in the stream.
module tb_booth_multiplier16;
  import booth_pkg::*;

  localparam int N_RANDOM = 40000;
  localparam int N_TOGGLE = 20000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [15:0] a = '0, b = '0;
  logic [31:0] p;

  booth_multiplier16 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, received = 0;
  logic [31:0] expect_q [$];
  int stamp_q [$];

  // mechanism counters
  int n_digit [8];          // per Booth triple 000..111
  int n_neg_last = 0, n_c6 = 0, n_c7 = 0, n_bcg_prop = 0, n_flip = 0, n_idle = 0;
  longint toggles = 0, toggle_bits = 0;

  localparam logic [15:0] CORNER [12] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                          16'h8000, 16'h8001, 16'h0002, 16'hFFFE,
                                          16'h5555, 16'hAAAA, 16'h0020, 16'hFFE0};

  // Drive one pair (or an idle cycle) per clock, on the falling edge.
  task automatic drive(input logic v, input logic [15:0] ta, input logic [15:0] tb_);
    @(negedge clk);
    in_valid = v;
    a        = ta;
    b        = tb_;
  endtask

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      received++;
      checks++;
      if (expect_q.size() == 0 || p !== expect_q[0]) begin
        failures++;
        $display("FAIL p=%h expected %h", p, (expect_q.size() != 0) ? expect_q[0] : 32'h0);
      end
      checks++;
      // The output register loads on the LATENCY-th edge after the edge that
      // sampled the pair; this block reads it at the edge after that.
      if (stamp_q.size() == 0 || cycle - stamp_q[0] != int'(LATENCY) + 1) begin
        failures++;
        $display("FAIL latency %0d", (stamp_q.size() != 0) ? cycle - stamp_q[0] : -1);
      end
      if (expect_q.size() != 0) void'(expect_q.pop_front());
      if (stamp_q.size() != 0) void'(stamp_q.pop_front());
    end
    if (rst_n && in_valid) begin
      sent++;
      expect_q.push_back(32'($signed(a) * $signed(b)));
      stamp_q.push_back(cycle);
      for (int i = 0; i < 8; i++) n_digit[(i == 0) ? {b[1:0], 1'b0} : b[2*i-1 +: 3]]++;
      if (b[15]) n_neg_last++;
    end
    if (rst_n && !in_valid) n_idle++;
    // internal events, each sampled while its stage holds a valid pair
    if (dut.v0 && dut.u_ppg.c6) n_c6++;
    if (dut.v2 && dut.u_tree.c7) n_c7++;
    if (dut.v4s) begin
      for (int j = 0; j < 3; j++)
        if (dut.u_fa.st4_q.p[j+1] && dut.u_fa.c[j+1]) n_bcg_prop++;
      if (dut.u_fa.c[3:0] != '0) n_flip++;
    end
  end

  logic [15:0] la, lb, ma, mb;

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: corner pairs
    foreach (CORNER[i])
      foreach (CORNER[j]) drive(1'b1, CORNER[i], CORNER[j]);
    // phase 2: random pairs, about one idle cycle in eight
    for (int n = 0; n < N_RANDOM; n++)
      drive(($urandom % 8) != 0, 16'($urandom), 16'($urandom));
    // phase 3: 31.02% bit-transition probability stream, back to back
    la = 16'($urandom);
    lb = 16'($urandom);
    for (int n = 0; n < N_TOGGLE; n++) begin
      for (int k = 0; k < 16; k++) begin
        ma[k] = ($urandom % 10000) < 3102;
        mb[k] = ($urandom % 10000) < 3102;
      end
      la ^= ma;
      lb ^= mb;
      toggles     += $countones(ma) + $countones(mb);
      toggle_bits += 32;
      drive(1'b1, la, lb);
    end
    drive(1'b0, '0, '0);
    repeat (LATENCY + 2) @(posedge clk);

    checks++;
    if (received != sent || expect_q.size() != 0) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, received);
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (n_digit[t] == 0) begin
        failures++;
        $display("FAIL Booth triple %03b never used", 3'(t));
      end
    end
    checks++; if (n_neg_last == 0) begin failures++; $display("FAIL no negative last row"); end
    checks++; if (n_c6 == 0)       begin failures++; $display("FAIL C6 never set"); end
    checks++; if (n_c7 == 0)       begin failures++; $display("FAIL stage-3 adder never carried"); end
    checks++; if (n_bcg_prop == 0) begin failures++; $display("FAIL no carry through a propagating block"); end
    checks++; if (n_flip == 0)     begin failures++; $display("FAIL no block sum selected for carry-in 1"); end
    checks++; if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    $display("products %0d, digits 000..111: %0d %0d %0d %0d %0d %0d %0d %0d",
             sent, n_digit[0], n_digit[1], n_digit[2], n_digit[3],
             n_digit[4], n_digit[5], n_digit[6], n_digit[7]);
    $display("negative last row %0d, C6 %0d, stage-3 carry %0d, BCG propagate %0d, sum flips %0d, idle %0d",
             n_neg_last, n_c6, n_c7, n_bcg_prop, n_flip, n_idle);
    $display("toggle stream: measured bit-transition probability %0.4f",
             real'(toggles) / real'(toggle_bits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
