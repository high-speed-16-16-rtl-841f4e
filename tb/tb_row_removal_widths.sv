// tb_row_removal_widths: the last-row two's complement that removes the
// extra Booth partial-product row, at operand widths 8, 16, 32, 64 and 128
// bits. For each width the W/2 rows of pp_generator (with the same five
// complemented bits and one carry at every width) must add up to a*b.
module tb_row_removal_widths;
  int c8, f8, c16, f16, c32, f32, c64, f64, c128, f128;
  logic d8, d16, d32, d64, d128;
  int checks, failures;

  pp_width_check #(.W(8))   u8   (.checks(c8),   .failures(f8),   .done(d8));
  pp_width_check #(.W(16))  u16  (.checks(c16),  .failures(f16),  .done(d16));
  pp_width_check #(.W(32))  u32  (.checks(c32),  .failures(f32),  .done(d32));
  pp_width_check #(.W(64))  u64  (.checks(c64),  .failures(f64),  .done(d64));
  pp_width_check #(.W(128)) u128 (.checks(c128), .failures(f128), .done(d128));

  initial begin
    wait (d8 && d16 && d32 && d64 && d128);
    checks   = c8 + c16 + c32 + c64 + c128;
    failures = f8 + f16 + f32 + f64 + f128;
    $display("checks per width 8/16/32/64/128: %0d %0d %0d %0d %0d", c8, c16, c32, c64, c128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
