// polar_channel_tb: checks the BPSK LLR mapping of polar_channel on the
// source design's worked example (codeword 32'h9600_9600 gives the 288-bit value
// ff80403f...) and on random codewords, field by field.
module polar_channel_tb;
  import polar_ref_pkg::*;

  localparam logic [287:0] EXAMPLE =
    288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201;

  logic         clk = 1'b0;
  logic [31:0]  code;
  logic [287:0] llr;
  int checks = 0, failures = 0;

  polar_channel dut (.code_i(code), .llr_o(llr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = 32'h9600_9600;
    @(posedge clk);
    checks++;
    if (llr !== EXAMPLE) begin
      failures++;
      $display("FAIL example: %h", llr);
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      code = $urandom;
      @(posedge clk);
      for (int j = 0; j < 32; j++) begin
        checks++;
        if ($signed(llr[j*9 +: 9]) != (code[j] ? -1 : 1)) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d of %h: %h", j, code, llr[j*9 +: 9]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
