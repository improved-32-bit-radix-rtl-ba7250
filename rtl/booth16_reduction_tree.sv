// booth16_reduction_tree: reduces the partial product array to two rows
// with levels of 4:2 compressors.
//
// At each level the rows are taken in groups of four, and each group goes
// through one row of 4:2 compressors (four rows in, two out). One or two
// rows left over pass to the next level unchanged; three left over get a
// zero fourth row and are compressed too. Levels repeat until two rows
// remain. For the 32-bit multiplier the array has 10 rows, reduced
// 10 -> 6 -> 4 -> 2 in three levels. The compressors are the exact kind.
// Row sums are kept modulo 2^W. Purely combinational.
module booth16_reduction_tree #(
  parameter int unsigned R = 10,   // rows in (at least 2)
  parameter int unsigned W = 64    // row width
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows after one level of compression.
  function automatic int unsigned next_rows(int unsigned r);
    if (r <= 2) return r;
    if (r % 4 == 3) return 2 * (r / 4) + 2;
    return 2 * (r / 4) + r % 4;
  endfunction

  // Rows at the input of level l.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r;
    r = R;
    for (int unsigned k = 0; k < l; k++) r = next_rows(r);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r, n;
    r = R;
    n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned L = num_levels();

  for (genvar l = 0; l < int'(L); l++) begin : g_lvl
    localparam int unsigned RC = rows_at(l);
    localparam int unsigned RN = rows_at(l + 1);
    localparam int unsigned G  = (RC % 4 == 3) ? RC / 4 + 1 : RC / 4;
    logic [W-1:0] vin  [RC];   // rows into this level
    logic [W-1:0] vout [RN];   // rows out of this level
    for (genvar j = 0; j < int'(RC); j++) begin : g_src
      if (l == 0) begin : g_first
        assign vin[j] = rows[j];
      end else begin : g_prev
        assign vin[j] = g_lvl[l-1].vout[j];
      end
    end
    for (genvar g = 0; g < int'(G); g++) begin : g_grp
      logic [W-1:0] d_in;
      if (4 * g + 3 < RC) begin : g_full
        assign d_in = vin[4*g+3];
      end else begin : g_three
        assign d_in = '0;
      end
      compressor_4to2_row #(.W(W)) u_row (
        .a (vin[4*g]),
        .b (vin[4*g+1]),
        .c (vin[4*g+2]),
        .d (d_in),
        .s (vout[2*g]),
        .cy(vout[2*g+1])
      );
    end
    for (genvar j = 4 * G; j < int'(RC); j++) begin : g_pass
      assign vout[2*G+j-4*G] = vin[j];
    end
  end

  if (L == 0) begin : g_none
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_last
    assign sum   = g_lvl[L-1].vout[0];
    assign carry = g_lvl[L-1].vout[1];
  end

endmodule
