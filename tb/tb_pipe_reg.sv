// tb_pipe_reg: an 8-bit register rank: q and out_valid must equal d and
// in_valid of the previous rising edge and hold between edges, and reset
// must clear out_valid.
module tb_pipe_reg;
  logic clk = 1'b0, rst_n = 1'b0, in_valid, out_valid;
  logic [7:0] d, q, d_old;
  int checks = 0, failures = 0;

  pipe_reg #(.W(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(d), .out_valid(out_valid), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    in_valid = 1'b1;
    d        = 8'h5A;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid set during reset");
    end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d_old    = q;
      d        = 8'($urandom);
      in_valid = 1'($urandom);
      #1;
      checks++;
      if (q !== d_old) begin
        failures++;
        $display("FAIL q changed between clock edges");
      end
      @(negedge clk);
      checks++;
      if (q !== d || out_valid !== in_valid) begin
        failures++;
        $display("FAIL q=%h/%b expected %h/%b", q, out_valid, d, in_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
