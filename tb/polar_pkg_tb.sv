// polar_pkg_tb: checks the shared constants and helpers of polar_pkg: the
// information mask against its defining rule (top three index bits hold at
// least two ones) and K, and bitrev against an independent bit reversal.
module polar_pkg_tb;
  import polar_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    @(posedge clk);
    ones = 0;
    for (int i = 0; i < 32; i++) begin
      bit want;
      want = (((i >> 4) & 1) + ((i >> 3) & 1) + ((i >> 2) & 1)) >= 2;
      checks++;
      if (INFO_MASK[i] != want) begin
        failures++;
        $display("FAIL INFO_MASK[%0d]=%0d", i, INFO_MASK[i]);
      end
      if (INFO_MASK[i]) ones++;
    end
    checks++;
    if (ones != K || N != 32 || K != 16 || LLR_W != 9) begin
      failures++;
      $display("FAIL sizes: ones=%0d N=%0d K=%0d LLR_W=%0d", ones, N, K, LLR_W);
    end
    for (int nb = 1; nb <= 6; nb++) begin
      for (int i = 0; i < (1 << nb); i++) begin
        int r;
        r = 0;
        for (int b = 0; b < nb; b++) if ((i >> b) & 1) r += 1 << (nb - 1 - b);
        checks++;
        if (bitrev(i, nb) != r) begin
          failures++;
          $display("FAIL bitrev(%0d,%0d)=%0d want %0d", i, nb, bitrev(i, nb), r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
