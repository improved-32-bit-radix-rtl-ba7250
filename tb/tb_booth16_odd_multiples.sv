// tb_booth16_odd_multiples: checks 3X, 5X and 7X against integer
// multiplication for corner values and random 32-bit multiplicands.
module tb_booth16_odd_multiples;
  localparam int unsigned N = 32;
  logic [N-1:0] x;
  logic [N+2:0] x3, x5, x7;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth16_odd_multiples #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] v);
    longint unsigned xv;
    x = v;
    @(posedge clk);
    xv = longint'(v);
    checks += 3;
    if (longint'(x3) != 3 * xv) begin failures++; $display("FAIL 3X x=%h got %h", v, x3); end
    if (longint'(x5) != 5 * xv) begin failures++; $display("FAIL 5X x=%h got %h", v, x5); end
    if (longint'(x7) != 7 * xv) begin failures++; $display("FAIL 7X x=%h got %h", v, x7); end
  endtask

  initial begin
    check('0);
    check('1);
    check(32'h8000_0000);
    check(32'h0000_0001);
    check(32'h5555_5555);
    check(32'hAAAA_AAAA);
    for (int i = 0; i < 2000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
