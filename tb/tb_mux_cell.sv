// tb_mux_cell: exhaustive over all operand pairs of a 5-bit block and both
// carry-ins. The flip flags are formed here from a xor b; the selected sum
// must be a+b+cin modulo 32.
module tb_mux_cell;
  logic [4:0] s0, s, hx;
  logic [3:0] prefix;
  logic cin;
  int checks = 0, failures = 0;

  mux_cell dut (.s0(s0), .prefix(prefix), .cin(cin), .s(s));

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          hx  = 5'(i ^ j);
          s0  = 5'(i + j);
          cin = c[0];
          for (int k = 0; k < 4; k++) prefix[k] = (hx & 5'((1 << (k + 1)) - 1)) == 5'((1 << (k + 1)) - 1);
          #1;
          checks++;
          if (s !== 5'(i + j + c)) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d s=%0d", i, j, c, s);
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
