// polar_encoder: combinational (N, K) polar encoder.
//
// The K message bits are spread over the information positions of the
// N-bit vector u (message bit k goes to the k-th set bit of INFO_MASK,
// counting from bit 0); frozen positions carry 0. A log2(N)-stage XOR
// butterfly network then forms x = u * F^(xn): in the stage of span s every
// position i with bit s clear takes x[i] ^ x[i+s]. The codeword is x in
// bit-reversed order, code_o[j] = x[bitrev(j)].
//
// Interface: msg_i (K bits) in, code_o (N bits) out. No clock: the encoder
// is pure logic, as in the source design, which uses no flip-flops.
// The XOR network structure, the bit order and the frozen set are this
// design's choices, the latter two fitted to the source design's worked example.
module polar_encoder #(
  parameter int unsigned    N         = polar_pkg::N,
  parameter int unsigned    K         = polar_pkg::K,
  parameter logic [N-1:0]   INFO_MASK = polar_pkg::INFO_MASK
) (
  input  logic [K-1:0] msg_i,
  output logic [N-1:0] code_o
);
  localparam int unsigned LOG_N = $clog2(N);

  if ((1 << LOG_N) != N) begin : g_chk_n
    $error("polar_encoder: N must be a power of two");
  end
  if ($countones(INFO_MASK) != K) begin : g_chk_k
    $error("polar_encoder: INFO_MASK must hold K ones");
  end

  logic [N-1:0] u;   // message bits on information positions, 0 elsewhere
  logic [N-1:0] x;   // u * F^(xn), natural order

  // Frozen-bit insertion: place message bits on the information positions.
  always_comb begin
    int unsigned k;
    k = 0;
    u = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (INFO_MASK[i]) begin
        u[i] = msg_i[k];
        k++;
      end
    end
  end

  // Butterfly stages of the polar transform, span 1, 2, 4, ... N/2.
  always_comb begin
    x = u;
    for (int unsigned s = 0; s < LOG_N; s++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (((i >> s) & 1) == 0) x[i] = x[i] ^ x[i + (1 << s)];
      end
    end
  end

  // Bit-reversed read-out.
  for (genvar j = 0; j < N; j++) begin : g_out
    assign code_o[j] = x[polar_pkg::bitrev(j, LOG_N)];
  end

endmodule
