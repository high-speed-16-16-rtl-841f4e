// tb_booth_selector: exhaustive check of one partial-product bit for every
// legal Booth select code and both multiplicand bits, against
// PP = (A_j*One + A_j-1*Two) xor Neg.
module tb_booth_selector;
  import booth_pkg::*;

  booth_sel_t sel;
  logic a_j, a_jm1, pp, exp_pp;
  int checks = 0, failures = 0;

  // legal {neg, one, two} codes: one and two never both 1
  localparam logic [2:0] CODES [6] = '{3'b000, 3'b010, 3'b001, 3'b101, 3'b110, 3'b100};

  booth_selector dut (.sel(sel), .a_j(a_j), .a_jm1(a_jm1), .pp(pp));

  initial begin
    for (int c = 0; c < 6; c++)
      for (int v = 0; v < 4; v++) begin
        sel   = CODES[c];
        a_j   = v[1];
        a_jm1 = v[0];
        #1;
        exp_pp = ((a_j & sel.one) | (a_jm1 & sel.two)) ^ sel.neg;
        checks++;
        if (pp !== exp_pp) begin
          failures++;
          $display("FAIL sel=%b a_j=%b a_jm1=%b pp=%b expected %b", sel, a_j, a_jm1, pp, exp_pp);
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
