// tb_twos_complementer5: exhaustive over the five multiplicand bits and all
// legal Booth codes. The low five bits of the last row, taken as a Booth
// selector without inversion on x, plus 32*c6, must equal the row's low five
// bits in ones'-complement form plus its Neg bit.
module tb_twos_complementer5;
  import booth_pkg::*;

  logic [4:0] a, x;
  booth_sel_t sel;
  logic c6;
  int checks = 0, failures = 0;
  int mag, ones_form, want, got;

  localparam logic [2:0] CODES [6] = '{3'b000, 3'b010, 3'b001, 3'b101, 3'b110, 3'b100};

  twos_complementer5 dut (.a(a), .sel(sel), .x(x), .c6(c6));

  initial begin
    for (int c = 0; c < 6; c++)
      for (int v = 0; v < 32; v++) begin
        sel = CODES[c];
        a   = 5'(v);
        #1;
        mag       = sel.one ? v : sel.two ? ((v << 1) & 31) : 0;
        ones_form = sel.neg ? (~mag & 31) : mag;
        want      = ones_form + int'(sel.neg);
        got       = (sel.one ? int'(x) : sel.two ? ((int'(x) << 1) & 31) : 0) + 32 * int'(c6);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL sel=%b a=%0d x=%0d c6=%b got %0d expected %0d", sel, a, x, c6, got, want);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
