// tb_compressor42_row: random vectors through a 32-column row of 4:2
// compressors; x0+x1+x2+x3+cin must equal sum+carry modulo 2^32.
module tb_compressor42_row;
  logic [31:0] x0, x1, x2, x3, sum, carry, want;
  logic cin;
  int checks = 0, failures = 0;

  compressor42_row #(.W(32)) dut (
    .x0(x0), .x1(x1), .x2(x2), .x3(x3), .cin(cin), .sum(sum), .carry(carry)
  );

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x0  = (n == 0) ? '1 : $urandom;
      x1  = (n == 0) ? '1 : $urandom;
      x2  = (n == 0) ? '1 : $urandom;
      x3  = (n == 0) ? '1 : $urandom;
      cin = (n == 0) ? 1'b1 : 1'($urandom);
      #1;
      want = x0 + x1 + x2 + x3 + 32'(cin);
      checks++;
      if (sum + carry !== want) begin
        failures++;
        $display("FAIL %h %h %h %h %b: %h+%h", x0, x1, x2, x3, cin, sum, carry);
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
