// compressor_4to2_row: a row of W exact 4:2 compressor slices that turns
// four W-bit vectors into a sum vector and a carry vector.
//
// Slice j takes bit j of a, b, c, d and the cout of slice j-1 (0 for j = 0).
// The carry vector is the slices' carry outputs moved up one position.
// Carries out of bit W-1 are dropped, so a+b+c+d = s + cy modulo 2^W, which
// is all a 2W-bit product array needs. Purely combinational.
module compressor_4to2_row #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] carry;
  logic [W:0]   chain;   // chain[j] is the cin of slice j

  assign chain[0] = 1'b0;

  for (genvar j = 0; j < int'(W); j++) begin : g_slice
    compressor_4to2 u_c (
      .x1   (a[j]),
      .x2   (b[j]),
      .x3   (c[j]),
      .x4   (d[j]),
      .cin  (chain[j]),
      .sum  (s[j]),
      .carry(carry[j]),
      .cout (chain[j+1])
    );
  end

  assign cy = {carry[W-2:0], 1'b0};

endmodule
