// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder against
// the recoding table (digit +0, +1, +1, +2, -2, -1, -1, -0 for the triples
// 000..111), written out here as constants.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0] b;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  // {neg, one, two} per triple {b2i+1, b2i, b2i-1}
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b010, 3'b010, 3'b001,
                                     3'b101, 3'b110, 3'b110, 3'b100};

  booth_encoder dut (.b(b), .sel(sel));

  initial begin
    for (int t = 0; t < 8; t++) begin
      b = 3'(t);
      #1;
      checks++;
      if (sel !== EXP[t]) begin
        failures++;
        $display("FAIL b=%b sel=%b expected %b", b, sel, EXP[t]);
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
