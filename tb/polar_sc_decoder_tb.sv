// polar_sc_decoder_tb: checks polar_sc_decoder against the iterative SC
// reference of polar_ref_pkg.
//  1. the source design's worked example: the 288-bit LLR vector decodes to 16'hAAAA;
//  2. noise-free LLRs of random codewords with random amplitudes decode to the
//     sent message;
//  3. noisy LLRs (random amplitude plus uniform noise, full 9-bit range
//     including -256): u_hat and the message must equal the reference
//     decoder's, bit for bit, including its decoding errors. The noise level
//     varies per frame; the test counts the frames decoded wrongly and fails
//     unless some frames were corrected and some were not, so both regimes
//     are known to be exercised.
module polar_sc_decoder_tb;
  import polar_ref_pkg::*;

  localparam logic [287:0] EXAMPLE =
    288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201;

  logic         clk = 1'b0;
  logic [287:0] llr;
  logic [15:0]  msg;
  logic [31:0]  u;
  int checks = 0, failures = 0;
  int frame_errors = 0;

  polar_sc_decoder dut (.llr_i(llr), .msg_o(msg), .u_o(u));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    if (v > 255) return 255;
    if (v < -256) return -256;
    return v;
  endfunction

  initial begin
    logic [15:0] m;
    logic [31:0] c;
    logic [31:0] uref;

    llr = EXAMPLE;
    @(posedge clk);
    checks++;
    if (msg !== 16'hAAAA) begin
      failures++;
      $display("FAIL example: %h", msg);
    end

    for (int n = 0; n < 3000; n++) begin
      int amp;
      @(negedge clk);
      m = 16'($urandom);
      c = ref_encode(m);
      amp = 1 + ($urandom % 255);
      for (int j = 0; j < 32; j++) llr[j*9 +: 9] = c[j] ? 9'(-amp) : 9'(amp);
      @(posedge clk);
      checks++;
      if (msg !== m) begin
        failures++;
        if (failures < 10) $display("FAIL clean msg=%h got=%h amp=%0d", m, msg, amp);
      end
    end

    for (int n = 0; n < 20000; n++) begin
      int amp, noise, spread;
      @(negedge clk);
      m = 16'($urandom);
      c = ref_encode(m);
      amp = 1 + ($urandom % 64);
      spread = $urandom % (2 * amp + 1);   // per-frame noise level 0 .. 2*amp
      for (int j = 0; j < 32; j++) begin
        noise = int'($urandom % (2 * spread + 1)) - spread;
        if (($urandom % 256) == 0) llr[j*9 +: 9] = 9'h100;   // most negative value
        else llr[j*9 +: 9] = 9'(clip((c[j] ? -amp : amp) + noise));
      end
      @(posedge clk);
      uref = ref_sc_decode(llr);
      checks++;
      if (u !== uref || msg !== ref_msg(uref)) begin
        failures++;
        if (failures < 10) $display("FAIL noisy u=%h ref=%h msg=%h", u, uref, msg);
      end
      if (msg !== m) frame_errors++;
    end

    $display("noisy frames decoded wrongly (matching the reference): %0d of 20000", frame_errors);
    checks++;
    if (frame_errors == 0 || frame_errors == 20000) begin
      failures++;
      $display("FAIL: noisy test did not produce both correct and wrong decodings");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
