// polar_f_pe: min-sum check-node unit ("f" function) of the SC decoder.
//
// f(a, b) = sign(a) * sign(b) * min(|a|, |b|). One magnitude comparator
// chooses the smaller operand; the result magnitude is limited to
// 2^(W-1)-1 so that the most negative input cannot overflow. Pure logic.
// The min-sum form is this design's choice: the source design names successive
// cancellation decoding and counts one comparator per f node, but gives no
// formula.
module polar_f_pe #(
  parameter int unsigned W = polar_pkg::LLR_W
) (
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] b_i,
  output logic signed [W-1:0] f_o
);
  localparam logic [W-1:0] MAG_MAX = {1'b0, {(W-1){1'b1}}};

  logic [W-1:0] mag_a, mag_b, mag_min;
  logic         neg;

  always_comb begin
    mag_a   = a_i[W-1] ? W'(-a_i) : W'(a_i);
    mag_b   = b_i[W-1] ? W'(-b_i) : W'(b_i);
    mag_min = (mag_a < mag_b) ? mag_a : mag_b;
    if (mag_min > MAG_MAX) mag_min = MAG_MAX;
    neg     = a_i[W-1] ^ b_i[W-1];
    f_o     = neg ? -$signed(mag_min) : $signed(mag_min);
  end

endmodule
