// polar_pkg: constants and helpers shared by the polar encoder, channel model
// and successive-cancellation (SC) decoder.
//
// The code is a (N=32, K=16) polar code. Message bit k is carried by the k-th
// information position u[i] (ascending i) where INFO_MASK[i] = 1; all other
// u positions are frozen to 0. The codeword is x = u * F^(x5), F = [1 0; 1 1],
// read out in bit-reversed order (Arikan's G_N = B_N F^(xn)), so code bit j is
// x[bitrev(j)]. Every bus has its bit 0 as the least significant bit.
//
// The code length, message length and the 9-bit LLR width follow the
// source design. The frozen set is not given there; INFO_MASK is the set that
// reproduces the source design's worked example (message 16'hAAAA encodes to
// 32'h9600_9600): the positions whose three top index bits hold at least two
// ones, i.e. {12..15, 20..31}.
package polar_pkg;

  localparam int unsigned N     = 32;   // code length
  localparam int unsigned K     = 16;   // message length
  localparam int unsigned LLR_W = 9;    // channel / internal LLR width

  localparam logic [N-1:0] INFO_MASK = 32'hFFF0_F000;

  typedef logic signed [LLR_W-1:0] llr_t;

  // Reverse the low nbits bits of i.
  function automatic int unsigned bitrev(input int unsigned i, input int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < nbits; b++) begin
      r = (r << 1) | ((i >> b) & 1);
    end
    return r;
  endfunction

endpackage
