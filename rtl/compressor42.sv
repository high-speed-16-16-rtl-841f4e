// compressor42: 4:2 compressor cell.
//
// Adds the four bits x[3:0] of one column and the carry cin from the column
// to its right: x0+x1+x2+x3+cin = sum + 2*(carry + cout). It is built from two
// cascaded full adders; cout depends on x[2:0] only, so a row of these cells
// has no carry ripple from cin to cout.
//
// Interface: x, cin in; sum (weight 1), carry and cout (weight 2; cout goes
// to the cin of the next column's cell). Purely combinational.
//
// The published multiplier uses 4:2 compressors without detailing their
// insides; the full-adder pair is this design's choice.
module compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic s1;

  always_comb begin
    s1    = x[0] ^ x[1] ^ x[2];
    cout  = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    sum   = s1 ^ x[3] ^ cin;
    carry = (s1 & x[3]) | (s1 & cin) | (x[3] & cin);
  end

endmodule
