// tb_kh_generator: exhaustive check that K + 2H equals the row's bit 0,
// (A0*One) xor Neg, plus the row's Neg bit.
module tb_kh_generator;
  logic one, neg, a0, k, h;
  int checks = 0, failures = 0;
  int expv;

  kh_generator dut (.one(one), .neg(neg), .a0(a0), .k(k), .h(h));

  initial begin
    for (int t = 0; t < 8; t++) begin
      {one, neg, a0} = 3'(t);
      #1;
      expv = int'(1'((a0 & one) ^ neg)) + int'(neg);
      checks++;
      if (int'(k) + 2 * int'(h) != expv) begin
        failures++;
        $display("FAIL one=%b neg=%b a0=%b k=%b h=%b expected value %0d", one, neg, a0, k, h, expv);
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
