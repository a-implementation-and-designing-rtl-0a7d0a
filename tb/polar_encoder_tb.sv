// polar_encoder_tb: checks polar_encoder for every one of the 2^16 messages
// against the generator-matrix reference, plus the source design's worked example
// (16'hAAAA -> 32'h9600_9600). The encoder is pure logic; the clock here only
// paces the vectors and drives the watchdog.
module polar_encoder_tb;
  import polar_ref_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] msg;
  logic [31:0] code;
  int checks = 0, failures = 0;

  polar_encoder dut (.msg_i(msg), .code_o(code));

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg = 16'hAAAA;
    @(posedge clk);
    checks++;
    if (code !== 32'h9600_9600) begin
      failures++;
      $display("FAIL example: %h -> %h, expected 96009600", msg, code);
    end
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      msg = v[15:0];
      @(posedge clk);
      checks++;
      if (code !== ref_encode(msg)) begin
        failures++;
        if (failures < 10) $display("FAIL msg=%h code=%h ref=%h", msg, code, ref_encode(msg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
