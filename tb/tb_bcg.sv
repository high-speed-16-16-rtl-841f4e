// tb_bcg: block carries from real block sums. For random 25-bit operand
// pairs cut into five 5-bit blocks, G_j and P_j are formed here per block
// and the generator's carries must equal the carries of the full addition
// into bits 10, 15, 20 and out of bit 24.
module tb_bcg;
  logic c_first;
  logic [3:0] g, p;
  logic [4:0] c, want;
  logic [24:0] x, y;
  logic [25:0] full;
  int checks = 0, failures = 0;
  int blk_sum;

  bcg #(.NB(4)) dut (.c_first(c_first), .g(g), .p(p), .c(c));

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x = 25'($urandom);
      y = (n % 3 == 0) ? ~x : 25'($urandom);
      if (n % 5 == 0) y = y + 25'd1;
      c_first = 1'((int'(x[4:0]) + int'(y[4:0])) >> 5);
      for (int j = 0; j < 4; j++) begin
        blk_sum = int'(x[5*(j+1) +: 5]) + int'(y[5*(j+1) +: 5]);
        g[j] = blk_sum > 31;
        p[j] = blk_sum == 31;
      end
      #1;
      full = 26'(x) + 26'(y);
      for (int j = 0; j < 4; j++)
        want[j] = 1'(((longint'(x) % (64'd1 << (5 * (j + 1)))) +
                      (longint'(y) % (64'd1 << (5 * (j + 1))))) >> (5 * (j + 1)));
      want[4] = full[25];
      checks++;
      if (c !== want) begin
        failures++;
        $display("FAIL x=%h y=%h c=%b expected %b", x, y, c, want);
      end
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
