// tb_booth16_mult: end-to-end test of the radix-16 Booth multiplier at its
// default size (32 x 32 bits, no parameter override). The exhaustive test
// of a small instance is in tb_booth16_mult_small.
//
// Products are compared with integer multiplication. The testbench also
// recodes the multiplier itself and counts how often each mechanism of the
// datapath was used: every magnitude 1X..8X of the 8:1 multiplexer, each
// odd multiple from the adders, negative digits (complement plus hot one),
// the "minus zero" window 11111, and a last digit of +1 (y(N-1) set). A
// mechanism that never occurred counts as a failure.
module tb_booth16_mult;
  localparam int unsigned N  = 32;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0]    x, y;
  logic [2*N-1:0]  p;

  booth16_mult dut (.x(x), .y(y), .p(p));

  int mag_seen [9];
  int neg_seen, minus_zero_seen, top_one_seen;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the digit events of multiplier value yv.
  task automatic count_digits(input logic [N-1:0] yv);
    logic [N+4:0] ye;
    ye = {4'b0000, yv, 1'b0};
    for (int i = 0; i <= int'(N / 4); i++) begin
      logic [4:0] w;
      int d;
      w = ye[4*i+4 -: 5];
      d = -8 * int'(w[4]) + 4 * int'(w[3]) + 2 * int'(w[2]) + int'(w[1]) + int'(w[0]);
      mag_seen[d < 0 ? -d : d]++;
      if (d < 0) neg_seen++;
      if (w == 5'b11111) minus_zero_seen++;
      if (i == int'(N / 4) && d == 1) top_one_seen++;
    end
  endtask

  task automatic check(input logic [N-1:0] xv, input logic [N-1:0] yv);
    longint unsigned e;
    x = xv;
    y = yv;
    @(posedge clk);
    e = longint'(xv) * longint'(yv);
    count_digits(yv);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", xv, yv, p, e);
    end
  endtask

  initial begin
    // corners
    check('0, '0);
    check('1, '1);
    check('1, 32'h1);
    check(32'h1, '1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7FFF_FFFF, 32'hFFFF_FFFF);
    check(32'h8888_8888, 32'h8888_8888);
    check(32'h9ABC_DEF1, 32'h0F1E_2D3C);
    // every digit value in every position
    for (int v = 0; v < 32; v++) begin
      check($urandom, {8{4'(v)}});
      check($urandom, {8{4'(v)}} ^ 32'h8421_8421);
    end
    // random
    for (int k = 0; k < 20000; k++) check($urandom, $urandom);

    for (int m = 1; m <= 8; m++) begin
      $display("digit magnitude %0d selected %0d times", m, mag_seen[m]);
      if (mag_seen[m] == 0) begin failures++; $display("FAIL magnitude %0d never used", m); end
    end
    $display("odd multiples used: 3X %0d, 5X %0d, 7X %0d", mag_seen[3], mag_seen[5], mag_seen[7]);
    $display("negative digits %0d, minus-zero windows %0d, top digit +1 %0d",
             neg_seen, minus_zero_seen, top_one_seen);
    if (neg_seen == 0)        begin failures++; $display("FAIL no negative digit"); end
    if (minus_zero_seen == 0) begin failures++; $display("FAIL no minus-zero window"); end
    if (top_one_seen == 0)    begin failures++; $display("FAIL top digit never +1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
