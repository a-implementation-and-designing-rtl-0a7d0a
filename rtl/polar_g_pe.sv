// polar_g_pe: variable-node unit ("g" function) of the SC decoder.
//
// g(a, b, s) = b + a when the partial sum s is 0 and b - a when s is 1,
// computed one bit wider and saturated to [-(2^(W-1)-1), 2^(W-1)-1]. Pure
// logic. The saturation range is this design's choice; the source design gives
// only the adder widths (8 and 9 bits), not the arithmetic.
module polar_g_pe #(
  parameter int unsigned W = polar_pkg::LLR_W
) (
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] b_i,
  input  logic                s_i,
  output logic signed [W-1:0] g_o
);
  localparam logic signed [W:0] SUM_MAX = (W+1)'((1 << (W-1)) - 1);
  localparam logic signed [W:0] SUM_MIN = -SUM_MAX;

  logic signed [W:0] sum;

  always_comb begin
    sum = s_i ? ((W+1)'(b_i) - (W+1)'(a_i)) : ((W+1)'(b_i) + (W+1)'(a_i));
    if (sum > SUM_MAX)      g_o = W'(SUM_MAX);
    else if (sum < SUM_MIN) g_o = W'(SUM_MIN);
    else                    g_o = W'(sum);
  end

endmodule
