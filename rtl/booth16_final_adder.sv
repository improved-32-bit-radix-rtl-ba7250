// booth16_final_adder: carry-propagate adder that adds the sum and carry
// rows left by the reduction tree into the product. W bits, result taken
// modulo 2^W. Written as a plain addition so that synthesis picks the adder
// architecture. Purely combinational.
module booth16_final_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  assign y = a + b;

endmodule
