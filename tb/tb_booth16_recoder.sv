// tb_booth16_recoder: exhaustive test of the radix-16 Booth recoder. For
// every 5-bit window it works out the digit -8*w4+4*w3+2*w2+w1+w0 and
// checks that exactly the line for |d| is set (none for d = 0) and that the
// sign bit equals w4.
module tb_booth16_recoder;
  import booth16_pkg::*;
  logic [4:0] w;
  booth_digit_t digit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth16_recoder dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int d, m;
      logic [7:0] exp_oh;
      w = 5'(v);
      @(posedge clk);
      d = -8 * ((v >> 4) & 1) + 4 * ((v >> 3) & 1) + 2 * ((v >> 2) & 1) + ((v >> 1) & 1) + (v & 1);
      m = d < 0 ? -d : d;
      exp_oh = (m == 0) ? 8'h00 : 8'(1 << (m - 1));
      checks += 2;
      if (digit.onehot !== exp_oh) begin
        failures++;
        $display("FAIL w=%b d=%0d onehot=%b expected %b", w, d, digit.onehot, exp_oh);
      end
      if (digit.neg !== w[4]) begin
        failures++;
        $display("FAIL w=%b neg=%b", w, digit.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
