// tb_compressor_4to2: exhaustive self-checking test of the exact 4:2
// compressor slice. For all 32 input combinations it checks the column sum
// x1+x2+x3+x4+cin = sum + 2*(carry+cout), and that cout does not change
// when only cin changes (the property that keeps a row free of ripple).
module tb_compressor_4to2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  compressor_4to2 dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        @(posedge clk);
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL in=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
                   x1, x2, x3, x4, cin, sum, carry, cout);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL cout depends on cin for in=%b", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
