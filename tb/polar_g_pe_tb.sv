// polar_g_pe_tb: exhaustive check of the g unit over all 9-bit operand
// pairs and both partial-sum values against b + (1-2s)a saturated to
// [-255, 255]. Counts how often each saturation limit was hit.
module polar_g_pe_tb;
  import polar_ref_pkg::*;

  logic       clk = 1'b0;
  logic [8:0] a, b, g;
  logic       s;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;

  polar_g_pe dut (.a_i(a), .b_i(b), .s_i(s), .g_o(g));

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 512; i++) begin
        for (int j = 0; j < 512; j++) begin
          int raw;
          @(negedge clk);
          a = i[8:0];
          b = j[8:0];
          s = k[0];
          @(posedge clk);
          checks++;
          raw = s ? sx(b) - sx(a) : sx(b) + sx(a);
          if (raw > 255) n_sat_hi++;
          if (raw < -255) n_sat_lo++;
          if (sx(g) != gsum(sx(a), sx(b), s)) begin
            failures++;
            if (failures < 10) $display("FAIL g(%0d,%0d,%0d)=%0d", sx(a), sx(b), s, sx(g));
          end
        end
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) failures++;
    $display("saturated high=%0d low=%0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
