// tb_booth16_pp_array: checks that the rows of the partial product array sum
// (modulo 2^64) to the weighted sum of the partial products. Each partial
// product is random, read as an N+4-bit two's complement number, plus its
// hot-one bit, weighted by 2^(4i). Also checks that the array has a
// hot-one bit at position 4i of the last row when digit i is negative.
module tb_booth16_pp_array;
  localparam int unsigned N    = 32;
  localparam int unsigned NDIG = N / 4 + 1;
  localparam int unsigned PPW  = N + 4;
  localparam int unsigned W    = 2 * N;
  logic [PPW-1:0] pp      [NDIG];
  logic           hot_one [NDIG];
  logic [W-1:0]   rows    [NDIG+1];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth16_pp_array #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input bit all_ones);
    logic [W-1:0] expv, got, t;
    expv = '0;
    for (int i = 0; i < int'(NDIG); i++) begin
      pp[i]      = all_ones ? '1 : {4'($urandom), $urandom};
      hot_one[i] = all_ones ? 1'b1 : 1'($urandom);
      t = W'(signed'(pp[i]));            // sign-extend to W bits
      expv += (t << (4 * i)) + (W'(hot_one[i]) << (4 * i));
    end
    @(posedge clk);
    got = '0;
    for (int j = 0; j <= int'(NDIG); j++) got += rows[j];
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL array sum %h expected %h", got, expv);
    end
  endtask

  initial begin
    run_one(1'b1);
    for (int k = 0; k < 2000; k++) run_one(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
