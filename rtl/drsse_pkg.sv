// drsse_pkg: types, widths and helper functions shared by the DRSSE
// (differential recursive soft sequential estimation) m-sequence acquisition
// blocks.
//
// Chip encoding: a +1/-1 chip is carried as one bit, 0 meaning +1 and 1
// meaning -1 (a logical zero is sent as +1). The product of +1/-1 chips is
// then the XOR of their bits.
//
// Fixed point (this design's choice; the equations are given in real
// numbers):
//  * complex chip samples are SAMPLE_W-bit two's complement per rail, scaled
//    so that a noiseless chip of unit amplitude reads +/-NOMINAL_AMP;
//  * the differential output U is 2*SAMPLE_W+1 bits, so a noiseless U reads
//    +/-NOMINAL_AMP**2;
//  * log-likelihood ratios (LLRs) are LLR_W-bit two's complement with
//    LLR_FRAC fraction bits, saturated symmetrically to +/-LLR_MAX;
//  * the channel reliability L_c is an unsigned LC_W-bit code with LC_FRAC
//    fraction bits.
package drsse_pkg;

  localparam int MAX_S      = 32;  // longest generator supported by TAPS
  localparam int SAMPLE_W   = 8;
  localparam int NOMINAL_AMP = 32;
  localparam int U_W        = 2 * SAMPLE_W + 1;
  localparam int LLR_W      = 16;
  localparam int LLR_FRAC   = 4;
  localparam int LC_W       = 10;
  localparam int LC_FRAC    = 4;
  // L_c * U has LC_FRAC + 2*log2(NOMINAL_AMP) fraction bits in LLR units of
  // one; shift it down to LLR_FRAC fraction bits.
  localparam int LC_SHIFT   = LC_FRAC + 2 * $clog2(NOMINAL_AMP) - LLR_FRAC;
  localparam int LLR_MAX    = (1 << (LLR_W - 1)) - 1;

  // Feedback tap masks: bit k-1 set <=> coefficient g_k = 1, i.e. the term
  // D^k of g(D).
  // g(D) = 1 + D + D^3 + D^4 + D^13  (S = 13, period 8191)
  localparam logic [MAX_S-1:0] TAPS_S13 = 32'h0000_100D;
  // g(D) = 1 + D^2 + D^5             (S = 5, period 31)
  localparam logic [MAX_S-1:0] TAPS_S5  = 32'h0000_0012;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [U_W-1:0]      diff_t;
  typedef logic signed [LLR_W-1:0]    llr_t;
  typedef logic [LC_W-1:0]            lc_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Saturate a wide signed value to the symmetric LLR range.
  function automatic llr_t sat_llr(input logic signed [39:0] v);
    logic signed [39:0] lim;
    lim = 40'(LLR_MAX);
    if (v > lim)       return llr_t'(lim);
    else if (v < -lim) return llr_t'(-lim);
    else               return llr_t'(v);
  endfunction

  // Magnitude of a saturated LLR (never the most negative code).
  function automatic logic [LLR_W-1:0] llr_abs(input llr_t v);
    return v[LLR_W-1] ? LLR_W'(-v) : LLR_W'(v);
  endfunction

endpackage
