// polar_f_pe_tb: exhaustive check of the min-sum f unit over all 9-bit
// operand pairs against sign(a)sign(b)min(|a|,|b|), magnitude limited to 255.
module polar_f_pe_tb;
  import polar_ref_pkg::*;

  logic       clk = 1'b0;
  logic [8:0] a, b, f;
  int checks = 0, failures = 0;

  polar_f_pe dut (.a_i(a), .b_i(b), .f_o(f));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        @(negedge clk);
        a = i[8:0];
        b = j[8:0];
        @(posedge clk);
        checks++;
        if (sx(f) != fmin(sx(a), sx(b))) begin
          failures++;
          if (failures < 10) $display("FAIL f(%0d,%0d)=%0d", sx(a), sx(b), sx(f));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
