// tb_booth16_pp_select: checks the partial product of every digit -8..+8
// for random multiplicands. The odd multiples are driven from integer
// arithmetic in the testbench; the partial product, read as an N+4-bit
// two's complement number plus its hot-one bit, must equal d*X.
module tb_booth16_pp_select;
  import booth16_pkg::*;
  localparam int unsigned N = 32;
  logic [N-1:0] x;
  logic [N+2:0] x3, x5, x7;
  booth_digit_t digit;
  logic [N+3:0] pp;
  logic hot_one;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth16_pp_select #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] xv, input int d);
    longint got, expv;
    int m;
    x  = xv;
    x3 = (N+3)'(3 * longint'(xv));
    x5 = (N+3)'(5 * longint'(xv));
    x7 = (N+3)'(7 * longint'(xv));
    m  = d < 0 ? -d : d;
    digit.neg    = (d < 0);
    digit.onehot = (m == 0) ? 8'h00 : 8'(1 << (m - 1));
    @(posedge clk);
    // sign-extend the N+4-bit partial product, add the hot one
    got  = longint'(signed'(pp)) + longint'(hot_one);
    expv = longint'(d) * longint'(xv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL x=%h d=%0d pp=%h hot=%b", xv, d, pp, hot_one);
    end
  endtask

  initial begin
    for (int d = -8; d <= 8; d++) begin
      check('1, d);
      check('0, d);
      for (int i = 0; i < 200; i++) check($urandom, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
