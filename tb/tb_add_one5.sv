// tb_add_one5: exhaustive over all operand pairs of a 5-bit block: flipping
// bit 0 and every bit k whose prefix[k-1] is set must turn a+b into a+b+1
// (modulo 32), and P must be 1 exactly when a+b is 31.
module tb_add_one5;
  logic [4:0] h, prefix, s0, s1;
  logic p;
  int checks = 0, failures = 0;

  add_one5 dut (.h(h), .prefix(prefix), .p(p));

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        h = 5'(i ^ j);
        #1;
        s0 = 5'(i + j);
        s1 = s0 ^ {prefix[3:0], 1'b1};
        checks++;
        if (s1 !== 5'(i + j + 1)) begin
          failures++;
          $display("FAIL a=%0d b=%0d prefix=%b", i, j, prefix);
        end
        checks++;
        if (p !== (s0 == 5'd31)) begin
          failures++;
          $display("FAIL a=%0d b=%0d p=%b", i, j, p);
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
