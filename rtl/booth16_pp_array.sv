// booth16_pp_array: merges the partial products and their hot-one bits into
// the partial product array that the reduction tree sums.
//
// Inputs are the NDIG = N/4+1 one's-complement partial products (N+4 bits
// each, digit i weighted 2^(4i)) and their hot-one bits. Output is NDIG+1
// rows, each 2N bits wide and already aligned, whose sum modulo 2^(2N) is
// the product:
//   * row i (i < NDIG): partial product i shifted left by 4i, with its sign
//     bit inverted. Inverting the sign bit s turns its weight -s*2^(N+3)
//     into (1-s)*2^(N+3) - 2^(N+3), so no sign extension is needed.
//   * row NDIG: the hot-one bit of digit i at position 4i, together with the
//     constant -sum_i 2^(4i+N+3) mod 2^(2N) that collects the -2^(N+3)
//     terms. The constant's lowest one is at bit N+3 and the highest hot
//     one at bit N, so the two never share a column.
// Bits above 2N-1 are dropped: the unsigned product fits in 2N bits.
// This is the plain Booth array of one row per digit plus one hot-one row;
// it does not include the height-reducing merge of the z bits.
// Many output bits are constant by construction (the zeros below each
// shifted row, the bits of the constant row); synthesis folds them into the
// reduction tree. Purely combinational.
module booth16_pp_array
  import booth16_pkg::*;
#(
  parameter int unsigned N    = 32,
  localparam int unsigned NDIG = num_digits(N),
  localparam int unsigned PPW  = pp_width(N),
  localparam int unsigned W    = 2 * N
) (
  input  logic [PPW-1:0] pp      [NDIG],
  input  logic           hot_one [NDIG],
  output logic [W-1:0]   rows    [NDIG+1]
);

  // Constant that completes the inverted sign bits.
  function automatic logic [W-1:0] sign_constant();
    logic [W-1:0] s;
    s = '0;
    for (int i = 0; i < int'(NDIG); i++) begin
      if (4 * i + int'(N) + 3 < int'(W)) s += W'(1) << (4 * i + int'(N) + 3);
    end
    return -s;
  endfunction

  localparam logic [W-1:0] SIGN_K = sign_constant();

  always_comb begin
    for (int i = 0; i < int'(NDIG); i++) begin
      logic [W-1:0] r;
      r = W'({~pp[i][PPW-1], pp[i][PPW-2:0]});
      rows[i] = r << (4 * i);
    end
    rows[NDIG] = SIGN_K;
    for (int i = 0; i < int'(NDIG); i++) begin
      rows[NDIG][4*i] = hot_one[i];
    end
  end

endmodule
