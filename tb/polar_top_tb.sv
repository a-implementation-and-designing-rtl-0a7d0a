// polar_top_tb: end-to-end test of the whole chain at its default sizes
// (N = 32, K = 16, 9-bit LLRs). Every one of the 2^16 messages is sent; for
// each, the codeword must equal the generator-matrix reference, the decoder
// input must be the BPSK LLR vector of that codeword, and the decoded message
// must equal the message. The source design's two worked examples are checked
// explicitly: 16'hAAAA (codeword 32'h9600_9600 and its 288-bit LLR vector) and
// 16'hCCCC. The chain is pure logic: the clock paces vectors and the watchdog.
//
// Coverage counters, each of which must be non-zero: messages round-tripped,
// frozen positions carrying 0 while information bits are 1, code bits sent as
// -1 and as +1, and the two worked examples.
module polar_top_tb;
  import polar_ref_pkg::*;

  localparam logic [287:0] EXAMPLE_LLR =
    288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201;

  logic         clk = 1'b0;
  logic [15:0]  msg_in, msg_out;
  logic [31:0]  code;
  logic [287:0] llr;
  int checks = 0, failures = 0;
  int n_roundtrip = 0, n_frozen_with_data = 0, n_minus = 0, n_plus = 0;
  int n_ex_aaaa = 0, n_ex_cccc = 0;

  polar_top dut (.msg_i(msg_in), .msg_o(msg_out), .code_o(code), .llr_o(llr));

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (msg=%h code=%h out=%h)", what, msg_in, code, msg_out);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      msg_in = v[15:0];
      @(posedge clk);
      check(code === ref_encode(msg_in), "codeword");
      check(llr === ref_channel(code), "channel LLRs");
      check(msg_out === msg_in, "round trip");
      if (msg_out === msg_in) n_roundtrip++;
      if (msg_in != 0) n_frozen_with_data++;
      for (int j = 0; j < 32; j++) if (code[j]) n_minus++; else n_plus++;
      if (msg_in == 16'hAAAA) begin
        check(code === 32'h9600_9600, "example AAAA codeword");
        check(llr === EXAMPLE_LLR, "example AAAA LLRs");
        check(msg_out === 16'hAAAA, "example AAAA output");
        n_ex_aaaa++;
      end
      if (msg_in == 16'hCCCC) begin
        check(msg_out === 16'hCCCC, "example CCCC output");
        n_ex_cccc++;
      end
    end
    $display("round trips=%0d frozen-with-data=%0d minus=%0d plus=%0d exAAAA=%0d exCCCC=%0d",
             n_roundtrip, n_frozen_with_data, n_minus, n_plus, n_ex_aaaa, n_ex_cccc);
    check(n_roundtrip > 0, "coverage: round trip");
    check(n_frozen_with_data > 0, "coverage: frozen bits beside data");
    check(n_minus > 0 && n_plus > 0, "coverage: both BPSK symbols");
    check(n_ex_aaaa == 1 && n_ex_cccc == 1, "coverage: worked examples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
