// polar_ref_pkg: reference models used by the testbenches, written
// independently of the RTL structure.
//
// - info_positions: information set recomputed from its rule (positions whose
//   three top index bits hold at least two ones), not from the RTL mask.
// - ref_encode: codeword from the generator matrix G[i][m] = ((i & m) == m)
//   (rows of F^(x5)), read out in bit-reversed order.
// - ref_channel: BPSK LLRs, 0 -> +1, 1 -> -1.
// - ref_sc_decode: iterative (leaf by leaf) successive-cancellation decoder on
//   flat per-depth LLR and partial-sum arrays, using integer min-sum f and
//   saturating g with the same number ranges as the RTL.
package polar_ref_pkg;

  localparam int N     = 32;
  localparam int K     = 16;
  localparam int LOG_N = 5;
  localparam int W     = 9;
  localparam int LMAX  = (1 << (W-1)) - 1;

  function automatic int rev(input int i);
    int r = 0;
    for (int b = 0; b < LOG_N; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

  function automatic bit is_info(input int i);
    return (((i >> 4) & 1) + ((i >> 3) & 1) + ((i >> 2) & 1)) >= 2;
  endfunction

  function automatic logic [N-1:0] ref_u(input logic [K-1:0] msg);
    logic [N-1:0] u = '0;
    int k = 0;
    for (int i = 0; i < N; i++) if (is_info(i)) begin u[i] = msg[k]; k++; end
    return u;
  endfunction

  function automatic logic [N-1:0] ref_encode(input logic [K-1:0] msg);
    logic [N-1:0] u = ref_u(msg);
    logic [N-1:0] c = '0;
    for (int j = 0; j < N; j++) begin
      int m = rev(j);
      bit acc = 0;
      for (int i = 0; i < N; i++) if (((i & m) == m) && u[i]) acc = ~acc;
      c[j] = acc;
    end
    return c;
  endfunction

  function automatic logic [N*W-1:0] ref_channel(input logic [N-1:0] c);
    logic [N*W-1:0] l;
    for (int j = 0; j < N; j++) l[j*W +: W] = c[j] ? 9'h1FF : 9'h001;
    return l;
  endfunction

  function automatic int sx(input logic [W-1:0] v);
    return v[W-1] ? int'(v) - (1 << W) : int'(v);
  endfunction

  function automatic int fmin(input int a, input int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    int m  = (ma < mb) ? ma : mb;
    if (m > LMAX) m = LMAX;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int gsum(input int a, input int b, input bit s);
    int r = s ? b - a : b + a;
    if (r > LMAX) r = LMAX;
    if (r < -LMAX) r = -LMAX;
    return r;
  endfunction

  // Returns u_hat (all N decided bits); llr in codeword order.
  function automatic logic [N-1:0] ref_sc_decode(input logic [N*W-1:0] llr);
    int alpha [LOG_N+1][N];
    bit beta  [LOG_N+1][N];
    logic [N-1:0] u = '0;
    for (int i = 0; i < N; i++) begin
      alpha[0][i] = sx(llr[rev(i)*W +: W]);
      for (int d = 0; d <= LOG_N; d++) beta[d][i] = 0;
    end
    for (int phi = 0; phi < N; phi++) begin
      for (int d = 1; d <= LOG_N; d++) begin
        int s  = N >> d;
        int t  = phi >> (LOG_N - d);
        int p  = t >> 1;
        if ((phi % (1 << (LOG_N - d))) == 0) begin
          for (int i = 0; i < s; i++) begin
            int a = alpha[d-1][p*2*s + i];
            int b = alpha[d-1][p*2*s + s + i];
            if ((t & 1) == 0) alpha[d][t*s + i] = fmin(a, b);
            else              alpha[d][t*s + i] = gsum(a, b, beta[d][(t-1)*s + i]);
          end
        end
      end
      u[phi] = is_info(phi) && (alpha[LOG_N][phi] < 0);
      beta[LOG_N][phi] = u[phi];
      begin
        int d = LOG_N;
        int t = phi;
        while (d > 0 && (t & 1) == 1) begin
          int s = N >> d;
          for (int i = 0; i < s; i++) begin
            beta[d-1][(t>>1)*2*s + i]     = beta[d][(t-1)*s + i] ^ beta[d][t*s + i];
            beta[d-1][(t>>1)*2*s + s + i] = beta[d][t*s + i];
          end
          t = t >> 1;
          d--;
        end
      end
    end
    return u;
  endfunction

  function automatic logic [K-1:0] ref_msg(input logic [N-1:0] u);
    logic [K-1:0] m = '0;
    int k = 0;
    for (int i = 0; i < N; i++) if (is_info(i)) begin m[k] = u[i]; k++; end
    return m;
  endfunction

endpackage
