// compressor_4to2: exact 4:2 compressor, one bit slice.
//
// Adds four bits of one column and a carry-in from the next lower slice:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// Built from two full adders: the first adds x1, x2, x3 and gives cout,
// which therefore does not depend on cin, so a row of slices has no ripple;
// the second adds its sum, x4 and cin. This is the exact operating mode of a
// 4:2 compressor; no approximate mode is included. Purely combinational.
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  always_comb begin
    s1    = x1 ^ x2 ^ x3;
    cout  = (x1 & x2) | (x1 & x3) | (x2 & x3);
    sum   = s1 ^ x4 ^ cin;
    carry = (s1 & x4) | (s1 & cin) | (x4 & cin);
  end

endmodule
