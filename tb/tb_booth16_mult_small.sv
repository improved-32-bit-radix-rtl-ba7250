// tb_booth16_mult_small: exhaustive test of the radix-16 Booth multiplier
// at reduced sizes. The 8 x 8 instance (3 digits, 4-row array) is checked
// for all 65536 operand pairs, the 12 x 12 instance (4 digits, 5-row array,
// whose reduction tree takes the three-row path) for every multiplier value
// against a set of multiplicands, and the 16 x 16 instance at random.
module tb_booth16_mult_small;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  x8,  y8;
  logic [15:0] p8;
  logic [11:0] x12, y12;
  logic [23:0] p12;
  logic [15:0] x16, y16;
  logic [31:0] p16;

  booth16_mult #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  booth16_mult #(.N(12)) dut12 (.x(x12), .y(y12), .p(p12));
  booth16_mult #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string tag, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", tag, got, expv);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);
        y8 = 8'(b);
        #1;
        cmp("8x8", longint'(p8), longint'(a * b));
      end
    end
    for (int b = 0; b < 4096; b++) begin
      for (int k = 0; k < 8; k++) begin
        logic [11:0] a;
        a = (k == 0) ? 12'hFFF : (k == 1) ? 12'h800 : 12'($urandom);
        x12 = a;
        y12 = 12'(b);
        #1;
        cmp("12x12", longint'(p12), longint'(a) * longint'(b));
      end
    end
    for (int k = 0; k < 20000; k++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      #1;
      cmp("16x16", longint'(p16), longint'(x16) * longint'(y16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
