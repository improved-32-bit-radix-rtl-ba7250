// tb_booth16_final_adder: checks the 64-bit carry-propagate adder against
// integer addition modulo 2^64 for corner and random operands.
module tb_booth16_final_adder;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth16_final_adder #(.W(W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] av, input logic [W-1:0] bv);
    longint unsigned e;
    a = av;
    b = bv;
    @(posedge clk);
    e = longint'(av) + longint'(bv);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL %h + %h = %h", av, bv, y);
    end
  endtask

  initial begin
    check('1, 64'd1);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001);
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
