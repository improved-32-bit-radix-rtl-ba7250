// booth16_recoder: radix-16 Booth recoder for one digit.
//
// Input is the 5-bit overlapping window w = {y(4i+3), y(4i+2), y(4i+1),
// y(4i), y(4i-1)} of the multiplier. The digit value is
// d = -8*w[4] + 4*w[3] + 2*w[2] + w[1] + w[0], in -8..+8. The output is a
// one-hot code of |d| (8 lines, one per nonzero magnitude, as the 8-line
// "hot one code" into the 8:1 multiplexer) and the sign bit neg, which
// drives the complementing XOR and becomes the hot-one bit of the partial
// product.
//
// neg is simply w[4]. For the window 11111 (d = -0) that gives neg = 1 with
// no magnitude selected: the complemented zero (all ones) plus the hot one
// is still zero, so no special case is needed. Purely combinational.
module booth16_recoder
  import booth16_pkg::*;
(
  input  logic [4:0]   w,
  output booth_digit_t digit
);

  logic [3:0] pos;   // 4*w3 + 2*w2 + w1 + w0, 0..8
  logic [3:0] mag;   // |d|, 0..8

  always_comb begin
    pos = {1'b0, w[3], w[2], w[1]} + {3'b000, w[0]};
    // negative digit: |d| = 8 - pos
    mag = w[4] ? (4'd8 - pos) : pos;
    digit.neg    = w[4];
    digit.onehot = '0;
    for (int k = 0; k < 8; k++) begin
      digit.onehot[k] = (mag == 4'(k + 1));
    end
  end

endmodule
