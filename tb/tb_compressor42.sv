// tb_compressor42: exhaustive check of the 4:2 cell: the inputs' count
// equals sum + 2*(carry + cout), and cout does not depend on cin.
module tb_compressor42;
  logic [3:0] x;
  logic cin, sum, carry, cout, cout0;
  int checks = 0, failures = 0;

  compressor42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int t = 0; t < 16; t++) begin
      x = 4'(t);
      for (int c = 0; c < 2; c++) begin
        cin = c[0];
        #1;
        if (c == 0) cout0 = cout;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + c) begin
          failures++;
          $display("FAIL x=%b cin=%b sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
        end
        checks++;
        if (cout !== cout0) begin
          failures++;
          $display("FAIL cout depends on cin, x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
