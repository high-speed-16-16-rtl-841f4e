// tb_cla5: exhaustive check of the 5-bit block adder with carry-in 0.
module tb_cla5;
  logic [4:0] a, b, s;
  logic g;
  int checks = 0, failures = 0;

  cla5 dut (.a(a), .b(b), .s(s), .g(g));

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a = 5'(i);
        b = 5'(j);
        #1;
        checks++;
        if ({g, s} !== 6'(i + j)) begin
          failures++;
          $display("FAIL %0d+%0d gave g=%b s=%0d", i, j, g, s);
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
