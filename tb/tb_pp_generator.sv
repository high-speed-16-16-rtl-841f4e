// tb_pp_generator: the eight vectors of stage 1 must add up to a*b modulo
// 2^32, and must leave empty the columns the later stages rely on (rows
// 4..7 below column 7, only row 0 in column 0, only rows 0 and 1 in column
// 1). Corner operands and 20000 random pairs.
module tb_pp_generator;
  import booth_pkg::*;

  logic [15:0] a, b;
  rowset_t rows;
  int checks = 0, failures = 0;
  logic [31:0] total, want;

  pp_generator dut (.a(a), .b(b), .rows(rows));

  task automatic check_pair(input logic [15:0] ta, input logic [15:0] tb_);
    a = ta;
    b = tb_;
    #1;
    total = '0;
    for (int i = 0; i < 8; i++) total += rows[i];
    want = 32'($signed(a) * $signed(b));
    checks++;
    if (total !== want) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%h expected %h", $signed(a), $signed(b), total, want);
    end
    checks++;
    if ((rows[4][6:0] | rows[5][6:0] | rows[6][6:0] | rows[7][6:0]) != 0 ||
        (rows[1][0] | rows[2][1:0] != 0) || (rows[3][1:0] != 0)) begin
      failures++;
      $display("FAIL layout a=%h b=%h", a, b);
    end
  endtask

  localparam logic [15:0] CORNER [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                         16'h8000, 16'h8001, 16'h0020, 16'hFFE0};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) check_pair(CORNER[i], CORNER[j]);
    for (int n = 0; n < 20000; n++) check_pair(16'($urandom), 16'($urandom));
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
