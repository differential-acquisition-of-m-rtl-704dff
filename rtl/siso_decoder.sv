// siso_decoder: recursive soft-in/soft-out decoder of the DRSSE scheme.
//
// For the chip b_i now arriving it combines
//  * the intrinsic LLR L(b_i|U_i) from the soft channel information, and
//  * the extrinsic LLR from the soft-chip register taps with g_k = 1:
//      L_e(b_i) = [prod_k sign L(y_{i-k})] * min_k |L(y_{i-k})|,
//    the usual sign/min approximation of a parity check, here the
//    recursion b_i = prod_k b_{i-k},
// into the soft output L(y_i) = L(b_i|U_i) + L_e(b_i), saturated to
// +/-LLR_MAX. A zero LLR counts as positive; its magnitude is zero anyway,
// which gives L_e = 0 while the register still holds its initial zeros.
//
// It also raises the loading command: load_cmd is high while the register
// holds S soft outputs whose magnitudes are all at least llr_thresh and at
// least min_chips chips have been decoded since clr. The published scheme asks for
// magnitudes "sufficiently high" and evaluates the scheme after a given
// number of chips L; taking both conditions, as two run-time thresholds, is
// this design's choice.
//
// Timing: soft_out is combinational from intrinsic and scdu (one chip per
// clock at most); the chip counter counts valid cycles and saturates; load_cmd
// is combinational from the counter and the register contents.
module siso_decoder
  import drsse_pkg::*;
#(
  parameter int               S      = 13,
  parameter logic [MAX_S-1:0] TAPS   = TAPS_S13,
  parameter int               CNT_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             valid,
  input  llr_t             intrinsic,
  input  llr_t             scdu [S],
  input  logic [LLR_W-1:0] llr_thresh,
  input  logic [CNT_W-1:0] min_chips,
  output llr_t             extrinsic,
  output llr_t             soft_out,
  output logic             load_cmd,
  output logic [CNT_W-1:0] chip_count
);

  logic             ext_neg;
  logic [LLR_W-1:0] ext_mag;
  logic             all_reliable;

  always_comb begin
    ext_neg = 1'b0;
    ext_mag = LLR_W'(LLR_MAX);
    for (int k = 0; k < S; k++) begin
      if (TAPS[k]) begin
        ext_neg = ext_neg ^ scdu[k][LLR_W-1];
        if (llr_abs(scdu[k]) < ext_mag) ext_mag = llr_abs(scdu[k]);
      end
    end
    extrinsic = ext_neg ? -llr_t'(ext_mag) : llr_t'(ext_mag);
    soft_out  = sat_llr(40'(intrinsic) + 40'(extrinsic));
  end

  always_comb begin
    all_reliable = 1'b1;
    for (int k = 0; k < S; k++)
      if (llr_abs(scdu[k]) < llr_thresh) all_reliable = 1'b0;
    load_cmd = all_reliable && (chip_count >= min_chips);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          chip_count <= '0;
    else if (clr)                        chip_count <= '0;
    else if (valid && chip_count != '1)  chip_count <= chip_count + 1'b1;
  end

endmodule
