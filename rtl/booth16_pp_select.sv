// booth16_pp_select: partial product generation for one radix-16 digit.
//
// An 8:1 multiplexer controlled by the recoder's one-hot code picks one of
// the eight multiples 1X..8X; no select line set gives zero. The odd
// multiples 3X, 5X, 7X come from the shared adders, the even ones are
// shifts (6X is 3X shifted by one). An XOR row then complements the
// selected multiple when the digit is negative. The result is the N+4-bit
// one's-complement partial product; the digit's neg bit (hot one) must be
// added at its least significant position to make it a two's complement
// value, which the partial product array does. Purely combinational.
module booth16_pp_select
  import booth16_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]  x,
  input  logic [N+2:0]  x3,
  input  logic [N+2:0]  x5,
  input  logic [N+2:0]  x7,
  input  booth_digit_t  digit,
  output logic [N+3:0]  pp,
  output logic          hot_one
);

  logic [N+2:0] mult [8];
  logic [N+2:0] sel;

  always_comb begin
    mult[0] = {3'b000, x};          // 1X
    mult[1] = {2'b00, x, 1'b0};     // 2X
    mult[2] = x3;                   // 3X
    mult[3] = {1'b0, x, 2'b00};     // 4X
    mult[4] = x5;                   // 5X
    mult[5] = {x3[N+1:0], 1'b0};    // 6X = 2 * 3X (fits in N+3 bits)
    mult[6] = x7;                   // 7X
    mult[7] = {x, 3'b000};          // 8X
    // one-hot AND-OR multiplexer
    sel = '0;
    for (int k = 0; k < 8; k++) begin
      sel |= mult[k] & {(N+3){digit.onehot[k]}};
    end
    pp      = {1'b0, sel} ^ {(N+4){digit.neg}};
    hot_one = digit.neg;
  end

endmodule
