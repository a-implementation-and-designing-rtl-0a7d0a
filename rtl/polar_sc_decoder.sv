// polar_sc_decoder: fully unrolled, combinational successive-cancellation
// decoder for the (N, K) polar code of polar_encoder.
//
// The channel LLRs arrive in codeword order (code bit j at
// llr_i[j*LLR_W +: LLR_W], positive = 0). Because the encoder reads x out in
// bit-reversed order, the decoder first undoes that permutation, then runs the
// unrolled SC tree (polar_sc_tree): log2(N) levels of N/2 min-sum f units and
// N/2 g units each (80 + 80 for N = 32) plus the partial-sum XORs. The K
// information bits are gathered from u_hat in ascending position order, the
// inverse of the encoder's placement.
//
// Interface: llr_i (N*LLR_W bits) in; msg_o (K bits) and u_o (all N decided
// bits, frozen ones 0) out. Pure logic, no clock, as in the source design.
// Arithmetic (min-sum, saturating 9-bit LLRs) and structure are this design's
// choices; sizes and the 288-bit input follow the source design.
module polar_sc_decoder #(
  parameter int unsigned  N         = polar_pkg::N,
  parameter int unsigned  K         = polar_pkg::K,
  parameter int unsigned  LLR_W     = polar_pkg::LLR_W,
  parameter logic [N-1:0] INFO_MASK = polar_pkg::INFO_MASK
) (
  input  logic [N*LLR_W-1:0] llr_i,
  output logic [K-1:0]       msg_o,
  output logic [N-1:0]       u_o
);
  localparam int unsigned LOG_N = $clog2(N);

  if ((1 << LOG_N) != N) begin : g_chk_n
    $error("polar_sc_decoder: N must be a power of two");
  end
  if ($countones(INFO_MASK) != K) begin : g_chk_k
    $error("polar_sc_decoder: INFO_MASK must hold K ones");
  end

  logic [N*LLR_W-1:0] llr_nat;   // LLR of x[i] at [i*LLR_W +: LLR_W]

  for (genvar i = 0; i < N; i++) begin : g_unperm
    assign llr_nat[i*LLR_W +: LLR_W] = llr_i[polar_pkg::bitrev(i, LOG_N)*LLR_W +: LLR_W];
  end

  polar_sc_tree #(.N(N), .W(LLR_W), .INFO(INFO_MASK)) u_tree (
    .llr_i (llr_nat),
    .u_o   (u_o)
  );

  // Extract the information bits in ascending position order.
  always_comb begin
    int unsigned k;
    k = 0;
    msg_o = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (INFO_MASK[i]) begin
        msg_o[k] = u_o[i];
        k++;
      end
    end
  end

endmodule
