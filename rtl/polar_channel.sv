// polar_channel: noise-free BPSK channel that turns each code bit into a
// signed LLR_W-bit log-likelihood ratio for the decoder.
//
// Code bit 0 becomes +1 and code bit 1 becomes -1 (two's complement), so with
// the default 9-bit LLRs the 32-bit codeword becomes the 288-bit decoder input
// of the source design: code bit j sits in llr_o[j*LLR_W +: LLR_W]. Positive LLR
// means "0 more likely". The mapping and field order follow the source design's
// worked example; no noise is added, as in the source design.
//
// Interface: code_o of the encoder in, llr_o out; pure logic, no clock.
module polar_channel #(
  parameter int unsigned N     = polar_pkg::N,
  parameter int unsigned LLR_W = polar_pkg::LLR_W
) (
  input  logic [N-1:0]       code_i,
  output logic [N*LLR_W-1:0] llr_o
);
  localparam logic signed [LLR_W-1:0] LLR_ZERO = LLR_W'(1);   // bit 0 -> +1
  localparam logic signed [LLR_W-1:0] LLR_ONE  = -LLR_W'(1);  // bit 1 -> -1

  for (genvar j = 0; j < N; j++) begin : g_map
    assign llr_o[j*LLR_W +: LLR_W] = code_i[j] ? LLR_ONE : LLR_ZERO;
  end

endmodule
