// polar_top: the complete polar coding chain of the design: a 16-bit message
// is encoded into a 32-bit polar codeword, sent through a noise-free BPSK
// channel that produces one 9-bit LLR per code bit (288 bits), and decoded by
// a successive-cancellation decoder back to 16 bits.
//
// Interface: msg_i in, msg_o out (equal to msg_i on the noise-free channel).
// code_o and llr_o expose the intermediate codeword and decoder input for
// observation; the source design's top has only the 16-bit input and output.
// Timing: pure logic from msg_i to msg_o, with no clock and no registers,
// matching the source design's flip-flop-free implementation.
module polar_top #(
  parameter int unsigned N     = polar_pkg::N,
  parameter int unsigned K     = polar_pkg::K,
  parameter int unsigned LLR_W = polar_pkg::LLR_W
) (
  input  logic [K-1:0]       msg_i,
  output logic [K-1:0]       msg_o,
  output logic [N-1:0]       code_o,
  output logic [N*LLR_W-1:0] llr_o
);
  polar_encoder #(.N(N), .K(K)) u_enc (
    .msg_i  (msg_i),
    .code_o (code_o)
  );

  polar_channel #(.N(N), .LLR_W(LLR_W)) u_chan (
    .code_i (code_o),
    .llr_o  (llr_o)
  );

  polar_sc_decoder #(.N(N), .K(K), .LLR_W(LLR_W)) u_dec (
    .llr_i (llr_o),
    .msg_o (msg_o),
    .u_o   ()
  );

endmodule
