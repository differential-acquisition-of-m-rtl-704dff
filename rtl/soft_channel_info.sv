// soft_channel_info: intrinsic information of a differential chip.
//
// Computes L(b_i | U_i) = L_c * U_i + L(b_i): the channel reliability L_c
// times the differential output, plus the a-priori LLR of the chip (zero
// when nothing is known in advance). L_c is a run-time input so that either
// L_c = 2 E_c/N_0 (no channel knowledge, AWGN) or a per-chip
// 2 alpha_i^2 E_c / (Omega N_0) (known fading) can be supplied.
//
// Fixed point (this design's): lc has LC_FRAC fraction bits, u is scaled by
// NOMINAL_AMP**2, the product is shifted down by LC_SHIFT to LLR units with
// LLR_FRAC fraction bits, rounded towards minus infinity, and the sum is
// saturated to +/-LLR_MAX. Purely combinational.
module soft_channel_info
  import drsse_pkg::*;
(
  input  diff_t u,
  input  lc_t   lc,
  input  llr_t  la,
  output llr_t  intrinsic
);

  logic signed [39:0] prod;
  logic signed [39:0] sum;

  always_comb begin
    prod      = 40'(u) * $signed({1'b0, lc});
    sum       = (prod >>> LC_SHIFT) + 40'(la);
    intrinsic = sat_llr(sum);
  end

endmodule
