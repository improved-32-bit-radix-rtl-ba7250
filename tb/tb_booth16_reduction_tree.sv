// tb_booth16_reduction_tree: checks that the 4:2 compressor tree keeps the
// sum of its rows: sum + carry must equal the sum of all input rows modulo
// 2^W. Runs the 10-row, 64-bit tree of the 32-bit multiplier, plus smaller
// trees of 3, 5 and 7 rows that exercise the three-row and pass-through
// cases of the level builder.
module tb_booth16_reduction_tree;
  localparam int unsigned W = 64;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [W-1:0] r10 [10];
  logic [W-1:0] r3  [3];
  logic [W-1:0] r5  [5];
  logic [W-1:0] r7  [7];
  logic [W-1:0] s10, c10, s3, c3, s5, c5, s7, c7;

  booth16_reduction_tree #(.R(10), .W(W)) dut   (.rows(r10), .sum(s10), .carry(c10));
  booth16_reduction_tree #(.R(3),  .W(W)) dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  booth16_reduction_tree #(.R(5),  .W(W)) dut5  (.rows(r5),  .sum(s5),  .carry(c5));
  booth16_reduction_tree #(.R(7),  .W(W)) dut7  (.rows(r7),  .sum(s7),  .carry(c7));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd(input bit ones);
    return ones ? '1 : {$urandom, $urandom};
  endfunction

  task automatic cmp(input string tag, input logic [W-1:0] got, input logic [W-1:0] expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: %h expected %h", tag, got, expv);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [W-1:0] e10, e3, e5, e7;
      bit ones;
      ones = (k == 0);
      e10 = '0; e3 = '0; e5 = '0; e7 = '0;
      for (int j = 0; j < 10; j++) begin r10[j] = rnd(ones); e10 += r10[j]; end
      for (int j = 0; j < 3;  j++) begin r3[j]  = rnd(ones); e3  += r3[j];  end
      for (int j = 0; j < 5;  j++) begin r5[j]  = rnd(ones); e5  += r5[j];  end
      for (int j = 0; j < 7;  j++) begin r7[j]  = rnd(ones); e7  += r7[j];  end
      @(posedge clk);
      cmp("R=10", s10 + c10, e10);
      cmp("R=3",  s3 + c3,   e3);
      cmp("R=5",  s5 + c5,   e5);
      cmp("R=7",  s7 + c7,   e7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
