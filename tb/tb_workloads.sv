// tb_workloads: erroneous-loading probability of the DRSSE loop in the
// configurations the scheme is evaluated in, estimated over repeated
// acquisitions. The loop is told to load after exactly L decoded chips
// (min_chips = L, llr_thresh = 0); a trial is erroneous if any of the S loaded
// chips differs from the true b chips.
//  W1  S = 5, g(D) = 1 + D^2 + D^5, AWGN, E_c/N_0 = 0 dB, L = 1xS and 40xS;
//      and -1.7 dB with L = 200xS (the further gain of a longer recursion)
//  W2  S = 13, g(D) = 1 + D + D^3 + D^4 + D^13, AWGN, 2 dB, L = 20xS = 260
//  W3  S = 13, AWGN, 1.7 dB, L = 40xS = 520, and 1 dB, L = 200xS = 2600
//  W4  S = 13, flat Rayleigh fading (amplitude constant over blocks of S
//      chips, independent between blocks; carrier phase random per trial and
//      the same on adjacent chips), 2 dB, L = 200xS = 2600,
//      with L_c from the known fading amplitude (per chip) and with the fixed
//      L_c = 2 E_c/N_0.
// Checks (bounds with margin above the rates measured with the default seed):
// recursion lowers the error rate against L = 1xS; the 0 dB S = 5 point stays
// below 2 % and the other AWGN points below 10 %, except the two low-SNR
// 200xS points (15 % and 40 %); with fading, the per-chip
// L_c (maximal-ratio weighting) stays below 2 % and does better than the fixed
// L_c (equal-gain weighting), which stays below 50 %. A floating-point model
// of the same equations and channel gives rates of the same size (about 5 %
// for W2 and W3, a few tenths of a percent for W1 at 40xS, 6 % and 26 % for
// the two 200xS points). The measured rates are printed.
module tb_workloads;
  import drsse_pkg::*;
  import tb_chan_pkg::*;
  localparam int ACC_W = U_W + $clog2(64) + 1;

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  cplx_t z = '0;
  lc_t lc = '0;
  logic [15:0] min_chips = '0;
  logic signed [ACC_W-1:0] lock_thresh = ACC_W'(64 * NOMINAL_AMP * NOMINAL_AMP / 2);
  logic load5, first5, load13, first13;
  logic [4:0] state5;
  logic [12:0] state13;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  drsse_acquisition #(.S(5), .TAPS(TAPS_S5)) dut5 (
    .clk, .rst_n, .clr, .valid, .z, .lc, .la('0), .llr_thresh('0), .min_chips, .lock_thresh,
    .u(), .soft_out(), .scdu(), .chip_count(), .load(load5), .first_load(first5), .load_state(state5),
    .n_loads(), .active(), .b_chip(), .b_state(), .lpf_y(), .lpf_valid(), .locked(), .lock_pulse(),
    .reload(), .n_reloads());

  drsse_acquisition dut13 (
    .clk, .rst_n, .clr, .valid, .z, .lc, .la('0), .llr_thresh('0), .min_chips, .lock_thresh,
    .u(), .soft_out(), .scdu(), .chip_count(), .load(load13), .first_load(first13), .load_state(state13),
    .n_loads(), .active(), .b_chip(), .b_state(), .lpf_y(), .lpf_valid(), .locked(), .lock_pulse(),
    .reload(), .n_reloads());

  initial begin : watchdog
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One acquisition; returns 1 if the first load holds a wrong chip.
  // fading: 0 AWGN, 1 Rayleigh with per-chip L_c, 2 Rayleigh with fixed L_c
  task automatic trial(input int s_len, input int ecn0_x10, input int len, input int fading,
                       output bit wrong);
    mseq_src src;
    int first_i;
    real ecn0, sigma, phi, alpha, lc_real;
    bit loaded;
    if (s_len == 5) src = new(5, '{2, 5});
    else            src = new(13, '{1, 3, 4, 13});
    first_i = $urandom_range(100, 8000);
    ecn0 = 10.0 ** (ecn0_x10 / 100.0);
    sigma = NOMINAL_AMP / $sqrt(2.0 * ecn0);
    phi = $urandom_range(0, 628) / 100.0;
    alpha = 1.0;
    @(negedge clk);
    clr = 1; min_chips = 16'(len);
    @(negedge clk);
    clr = 0;
    wrong = 0; loaded = 0;
    for (int i = 0; i <= len && !loaded; i++) begin
      int n, re, im;
      n = first_i + i;
      if (fading != 0 && (i % s_len) == 0) begin
        real gx, gy;
        gx = gauss(7071) / 1000.0;
        gy = gauss(7071) / 1000.0;
        alpha = $sqrt(gx * gx + gy * gy);
      end
      re = clip8($rtoi((src.chip(n) ? -1.0 : 1.0) * alpha * NOMINAL_AMP * $cos(phi)) + gauss($rtoi(sigma * 10.0)));
      im = clip8($rtoi((src.chip(n) ? -1.0 : 1.0) * alpha * NOMINAL_AMP * $sin(phi)) + gauss($rtoi(sigma * 10.0)));
      lc_real = (fading == 1) ? 2.0 * alpha * alpha * ecn0 : 2.0 * ecn0;
      if (lc_real > 63.9) lc_real = 63.9;
      lc = lc_t'($rtoi(lc_real * 16.0 + 0.5));
      z.re = sample_t'(re); z.im = sample_t'(im);
      valid = 1;
      #1;
      if (s_len == 5 && first5) begin
        loaded = 1;
        for (int k = 0; k < 5; k++) if (state5[k] != src.bchip(n - 1 - k)) wrong = 1;
      end
      if (s_len == 13 && first13) begin
        loaded = 1;
        for (int k = 0; k < 13; k++) if (state13[k] != src.bchip(n - 1 - k)) wrong = 1;
      end
      @(negedge clk);
      valid = 0;
    end
    check(loaded, "load at L chips");
  endtask

  task automatic point(input string name, input int s_len, input int ecn0_x10, input int len,
                       input int fading, input int trials, output real pe);
    int errs = 0;
    for (int t = 0; t < trials; t++) begin
      bit w;
      trial(s_len, ecn0_x10, len, fading, w);
      errs += w;
    end
    pe = real'(errs) / trials;
    $display("%-44s L = %4d: %0d of %0d loads wrong (Pe ~ %f)", name, len, errs, trials, pe);
  endtask

  initial begin
    real p1, p40, pa2, pa17, pm, pe;
    repeat (2) @(posedge clk);
    rst_n = 1;
    point("W1 S=5 AWGN 0 dB, no recursion", 5, 0, 5, 0, 2000, p1);
    point("W1 S=5 AWGN 0 dB", 5, 0, 200, 0, 2000, p40);
    check(p40 < p1, "W1: recursion lowers the erroneous-loading rate");
    check(p40 <= 0.02, "W1: Pe at 40xS below 2 %");
    point("W1 S=5 AWGN -1.7 dB", 5, -17, 1000, 0, 1000, pe);
    check(pe <= 0.15, "W1: Pe at 200xS and -1.7 dB below 15 %");
    point("W2 S=13 AWGN 2 dB", 13, 20, 260, 0, 2000, pa2);
    check(pa2 <= 0.10, "W2: Pe below 10 %");
    point("W3 S=13 AWGN 1.7 dB", 13, 17, 520, 0, 2000, pa17);
    check(pa17 <= 0.10, "W3: Pe below 10 %");
    point("W3 S=13 AWGN 1 dB", 13, 10, 2600, 0, 1000, pe);
    check(pe <= 0.40, "W3: Pe at 200xS and 1 dB below 40 %");
    point("W4 S=13 Rayleigh 2 dB, L_c from channel", 13, 20, 2600, 1, 600, pm);
    check(pm <= 0.02, "W4: Pe with channel knowledge below 2 %");
    point("W4 S=13 Rayleigh 2 dB, fixed L_c", 13, 20, 2600, 2, 600, pe);
    check(pe <= 0.5, "W4: Pe without channel knowledge below 50 %");
    check(pm < pe, "W4: channel knowledge lowers the error rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
