// polar_sc_tree: the unrolled successive-cancellation decoding tree.
//
// The tree has log2(N)+1 depths; depth d holds 2^d nodes of size S = N >> d.
// Node (d, t) owns the S LLRs alpha of its sub-code and the S re-encoded
// partial sums beta of its decisions:
//   - the root's alpha is the decoder input (natural order);
//   - a left child (t even) takes alpha from its parent through S min-sum
//     f units, f(a[i], a[i+S]);
//   - a right child (t odd) takes alpha from its parent through S g units,
//     g(a[i], a[i+S], beta_left_sibling[i]), so it waits for the decisions of
//     its left sibling: this is the left-to-right order of SC decoding;
//   - a leaf (d = log2 N) decides 1 when its LLR is negative and the position
//     is an information bit, and 0 otherwise (frozen bits are always 0);
//   - an inner node's beta is {beta_right, beta_left ^ beta_right}.
// u_o[t] is the decision of leaf t. Every node lives in its own generate
// scope, so no signal feeds back into itself. Pure logic, no clock.
// For N = 32 there are 5 levels of 16 f and 16 g units (80 + 80); the
// source design names the successive-cancellation algorithm, and its
// synthesis report counts 80 comparators, one per f node. The tree layout
// and the arithmetic are this design's choices.
module polar_sc_tree #(
  parameter int unsigned  N    = polar_pkg::N,
  parameter int unsigned  W    = polar_pkg::LLR_W,
  parameter logic [N-1:0] INFO = polar_pkg::INFO_MASK
) (
  input  logic [N*W-1:0] llr_i,
  output logic [N-1:0]   u_o
);
  localparam int unsigned LOG_N = $clog2(N);

  for (genvar d = 0; d <= LOG_N; d++) begin : g_d
    localparam int unsigned S = N >> d;
    for (genvar t = 0; t < (1 << d); t++) begin : g_t
      logic [S*W-1:0] alpha;   // LLRs of this node's sub-code
      logic [S-1:0]   beta;    // partial sums of this node's decisions

      // LLRs from the parent
      if (d == 0) begin : g_root
        assign alpha = llr_i;
      end else begin : g_child
        for (genvar i = 0; i < S; i++) begin : g_pe
          if ((t % 2) == 0) begin : g_f
            polar_f_pe #(.W(W)) u_f (
              .a_i (g_d[d-1].g_t[t/2].alpha[i*W +: W]),
              .b_i (g_d[d-1].g_t[t/2].alpha[(i+S)*W +: W]),
              .f_o (alpha[i*W +: W])
            );
          end else begin : g_g
            polar_g_pe #(.W(W)) u_g (
              .a_i (g_d[d-1].g_t[t/2].alpha[i*W +: W]),
              .b_i (g_d[d-1].g_t[t/2].alpha[(i+S)*W +: W]),
              .s_i (g_d[d].g_t[t-1].beta[i]),
              .g_o (alpha[i*W +: W])
            );
          end
        end
      end

      // Decisions and partial sums
      if (d == LOG_N) begin : g_leaf
        if (INFO[t]) begin : g_info
          assign beta = alpha[W-1];   // negative LLR -> 1
        end else begin : g_frozen
          assign beta = 1'b0;
        end
        assign u_o[t] = beta[0];
      end else begin : g_inner
        assign beta = {g_d[d+1].g_t[2*t+1].beta,
                       g_d[d+1].g_t[2*t].beta ^ g_d[d+1].g_t[2*t+1].beta};
      end
    end
  end

endmodule
