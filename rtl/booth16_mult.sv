// booth16_mult: unsigned N x N radix-16 Booth multiplier (N = 32).
//
// The multiplier y is recoded into N/4+1 radix-16 digits in -8..+8, each
// from the overlapping 5-bit window y(4i+3..4i-1) (y(-1) = 0 and bits above
// y(N-1) are 0, so the last digit is 0 or +1). This quarters the number of
// partial products against plain AND-array multiplication, at the price of
// precomputing the odd multiples 3X, 5X and 7X once with three adders.
//
// Datapath, all combinational:
//   1. booth16_odd_multiples   3X, 5X, 7X (shared by every digit)
//   2. per digit i = 0..N/4:   booth16_recoder gives a one-hot |d_i| and
//      the sign; booth16_pp_select picks the multiple with an 8:1 one-hot
//      multiplexer and complements it with an XOR row when d_i < 0
//   3. booth16_pp_array        aligns the partial products, inverted sign
//      bits, hot-one bits and the sign constant into N/4+2 rows
//   4. booth16_reduction_tree  4:2 compressor levels down to two rows
//   5. booth16_final_adder     carry-propagate addition into p = x*y
// The structure of steps 1-3 follows the multiplier's block diagram; the
// sign handling, the tree shape and the final adder are this design's own.
// There is no clock: p is valid one combinational delay after x and y.
module booth16_mult
  import booth16_pkg::*;
#(
  parameter int unsigned N = 32   // operand width, a multiple of 4
) (
  input  logic [N-1:0]   x,       // multiplicand, unsigned
  input  logic [N-1:0]   y,       // multiplier, unsigned
  output logic [2*N-1:0] p        // product
);

  localparam int unsigned NDIG = num_digits(N);
  localparam int unsigned PPW  = pp_width(N);
  localparam int unsigned W    = 2 * N;

  logic [N+2:0] x3, x5, x7;
  logic [N+4:0] ye;                // {0000, y, y(-1) = 0}
  booth_digit_t digit   [NDIG];
  logic [PPW-1:0] pp    [NDIG];
  logic           hot   [NDIG];
  logic [W-1:0]   rows  [NDIG+1];
  logic [W-1:0]   r_sum, r_carry;

  assign ye = {4'b0000, y, 1'b0};

  booth16_odd_multiples #(.N(N)) u_odd (
    .x (x),
    .x3(x3),
    .x5(x5),
    .x7(x7)
  );

  for (genvar i = 0; i < int'(NDIG); i++) begin : g_digit
    booth16_recoder u_rec (
      .w    (ye[4*i+4 -: 5]),
      .digit(digit[i])
    );
    booth16_pp_select #(.N(N)) u_sel (
      .x      (x),
      .x3     (x3),
      .x5     (x5),
      .x7     (x7),
      .digit  (digit[i]),
      .pp     (pp[i]),
      .hot_one(hot[i])
    );
  end

  booth16_pp_array #(.N(N)) u_array (
    .pp     (pp),
    .hot_one(hot),
    .rows   (rows)
  );

  booth16_reduction_tree #(.R(NDIG + 1), .W(W)) u_tree (
    .rows (rows),
    .sum  (r_sum),
    .carry(r_carry)
  );

  booth16_final_adder #(.W(W)) u_cpa (
    .a(r_sum),
    .b(r_carry),
    .y(p)
  );

endmodule
