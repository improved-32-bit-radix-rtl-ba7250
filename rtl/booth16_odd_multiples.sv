// booth16_odd_multiples: the three carry-propagate adders that precompute
// the odd multiples of the multiplicand needed by radix-16 Booth recoding.
//
//   x3 = X + 2X,   x5 = X + 4X,   x7 = 8X - X
//
// The even multiples (2X, 4X, 6X = 2*3X, 8X) are plain shifts and are
// formed where they are used, so only these three adders exist, shared by
// all partial products. The 7X adder is written as a subtraction of X from
// 8X (one adder) rather than as a three-input addition; that is a choice of
// this implementation. Purely combinational. Outputs are N+3 bits wide, the
// full range of 7X for an unsigned N-bit X.
module booth16_odd_multiples #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,
  output logic [N+2:0] x3,
  output logic [N+2:0] x5,
  output logic [N+2:0] x7
);

  logic [N+2:0] xe;
  assign xe = {3'b000, x};

  always_comb begin
    x3 = xe + (xe << 1);
    x5 = xe + (xe << 2);
    x7 = (xe << 3) - xe;
  end

endmodule
