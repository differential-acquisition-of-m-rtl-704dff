// tb_drsse_acquisition: end-to-end test of the DRSSE loop for
// g(D) = 1 + D + D^3 + D^4 + D^13 at the default sizes.
//
// A channel model sends c_i with a drifting carrier phase. A bit-exact
// reference model of the loop in the testbench (differential product,
// L_c U + L(b), sign/min extrinsic over taps 1, 3, 4, 13, saturation, shift)
// is compared with the decoder's soft output on every chip. Scenarios:
//  A  noiseless: the first load gives the true b state, no reload, lock.
//  B  one weak, inverted sample among the first chips and a loading rule
//     that fires early: the first load is wrong, the tracking loop asks for
//     a reload, the reload is right, lock follows.
//  C  AWGN at E_c/N_0 = 2 dB, loading after L = 20 S = 260 chips: lock.
//  D  noiseless with the largest L_c: soft outputs saturate, lock.
// After every lock the generator's replica must equal b_i chip by chip.
// Counted mechanisms: first loads, reloads, locks, wrong loads,
// saturated soft outputs; each must occur.
module tb_drsse_acquisition;
  import drsse_pkg::*;
  import tb_chan_pkg::*;
  localparam int S = 13;
  localparam int LPF_WIN = 64;
  localparam int ACC_W = U_W + $clog2(LPF_WIN) + 1;
  localparam int TAP_IDX [4] = '{0, 2, 3, 12};

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  cplx_t z = '0;
  lc_t lc = '0;
  llr_t la = '0;
  logic [LLR_W-1:0] llr_thresh = '0;
  logic [15:0] min_chips = '0;
  logic signed [ACC_W-1:0] lock_thresh = ACC_W'(LPF_WIN * NOMINAL_AMP * NOMINAL_AMP / 2);
  diff_t u;
  llr_t soft_out;
  llr_t scdu [S];
  logic [15:0] chip_count;
  logic load, first_load, active, b_chip, lpf_valid, locked, lock_pulse, reload;
  logic [S-1:0] load_state, b_state;
  logic [7:0] n_loads, n_reloads;
  logic signed [ACC_W-1:0] lpf_y;

  int checks = 0, failures = 0;
  int cnt_first = 0, cnt_reload = 0, cnt_lock = 0, cnt_wrong = 0, cnt_sat = 0;

  always #5 clk = ~clk;

  drsse_acquisition dut (
    .clk, .rst_n, .clr, .valid, .z, .lc, .la, .llr_thresh, .min_chips, .lock_thresh,
    .u, .soft_out, .scdu, .chip_count, .load, .first_load, .load_state, .n_loads,
    .active, .b_chip, .b_state, .lpf_y, .lpf_valid, .locked, .lock_pulse, .reload, .n_reloads);

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference model state
  int m_pre, m_pim;
  int m_scdu [S];

  function automatic int sat(longint v);
    if (v > LLR_MAX) return LLR_MAX;
    if (v < -LLR_MAX) return -LLR_MAX;
    return int'(v);
  endfunction

  function automatic longint floor_shift(longint p, int sh);
    return (p >= 0) ? (p >> sh) : -((-p + (longint'(1) << sh) - 1) >> sh);
  endfunction

  // Runs one acquisition. weak_at: index of a weak inverted sample (-1: none)
  task automatic scenario(input string name, input int sigma_x10, input int lc_code,
                          input int thr, input int minc, input int weak_at,
                          input int max_chips, input bit expect_wrong_first);
    mseq_src src;
    int first_i;
    real phi, dphi;
    int i;
    bit seen_lock, first_wrong;
    int locks_here;
    src = new(S, '{1, 3, 4, 13});
    first_i = $urandom_range(100, 8000);
    phi = $urandom_range(0, 628) / 100.0;
    dphi = 0.01;
    @(negedge clk);
    clr = 1; lc = lc_t'(lc_code); llr_thresh = LLR_W'(thr); min_chips = 16'(minc);
    @(negedge clk);
    clr = 0;
    m_pre = NOMINAL_AMP; m_pim = 0;
    foreach (m_scdu[k]) m_scdu[k] = 0;
    seen_lock = 0; first_wrong = 0; locks_here = 0;
    for (i = 0; i < max_chips; i++) begin
      int n, amp, re, im, uu, intr, sgn, mn, ext, so;
      bit truth_b;
      n = first_i + i;
      amp = (i == weak_at) ? -4 : NOMINAL_AMP;
      re = clip8(int'($rtoi((src.chip(n) ? -amp : amp) * $cos(phi))) + gauss(sigma_x10));
      im = clip8(int'($rtoi((src.chip(n) ? -amp : amp) * $sin(phi))) + gauss(sigma_x10));
      phi += dphi;
      z.re = sample_t'(re); z.im = sample_t'(im);
      valid = 1;
      #1;
      // ---- reference model of this chip ----
      uu = re * m_pre + im * m_pim;
      intr = sat(floor_shift(longint'(uu) * lc_code, LC_SHIFT));
      sgn = 1; mn = LLR_MAX;
      foreach (TAP_IDX[t]) begin
        int v;
        v = m_scdu[TAP_IDX[t]];
        if (v < 0) sgn = -sgn;
        if ((v < 0 ? -v : v) < mn) mn = (v < 0 ? -v : v);
      end
      ext = sgn * mn;
      so = sat(longint'(intr) + ext);
      if (so == LLR_MAX || so == -LLR_MAX) cnt_sat++;
      check(int'(u) == uu, "differential output");
      check(int'(soft_out) == so, "soft output");
      // ---- load ----
      truth_b = src.bchip(n);
      if (load) begin
        bit right;
        right = 1;
        for (int k = 0; k < S; k++) begin
          check(load_state[k] == (m_scdu[k] < 0), "load_state = hard decisions");
          if (load_state[k] != src.bchip(n - 1 - k)) right = 0;
        end
        if (first_load) begin
          cnt_first++;
          if (!right) begin first_wrong = 1; cnt_wrong++; end
        end else begin
          cnt_reload++;
          if (!right) cnt_wrong++;
        end
      end
      if (locked) check(b_chip == truth_b, "replica after lock");
      if (lock_pulse) begin cnt_lock++; seen_lock = 1; locks_here++; end
      // ---- advance model ----
      for (int k = S - 1; k > 0; k--) m_scdu[k] = m_scdu[k-1];
      m_scdu[0] = so;
      m_pre = re; m_pim = im;
      @(negedge clk);
      valid = 0;
      if (seen_lock && locked && i > 1000 && !expect_wrong_first) break;
      if (seen_lock && locked && n_reloads > 0 && expect_wrong_first && i > 600) break;
    end
    check(seen_lock, {name, ": lock reached"});
    check(first_wrong == expect_wrong_first, {name, ": first load right/wrong as intended"});
    if (!expect_wrong_first) check(n_reloads == 0, {name, ": no reload"});
    else check(n_reloads > 0, {name, ": reload issued"});
    $display("%s: %0d chips, loads %0d, reloads %0d, locked %0d, first load wrong %0d",
             name, i, n_loads, n_reloads, locked, first_wrong);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A: noiseless, L_c = 2 (4.0 in lc code with 4 fraction bits = 32)
    scenario("A noiseless", 0, 32, 256, 2 * S, -1, 3000, 0);
    // B: weak inverted sample at chip 5, load as soon as 13 chips are nonzero
    scenario("B reload", 0, 64, 1, S, 5, 3000, 1);
    // C: AWGN, E_c/N_0 = 2 dB: sigma per rail = 32/sqrt(2*1.585) = 18.0,
    //    L_c = 2*1.585 = 3.17 -> 51
    scenario("C AWGN 2 dB", 180, 51, 32, 20 * S, -1, 6000, 0);
    // D: largest L_c code, noiseless: the soft outputs reach +/-LLR_MAX
    scenario("D saturation", 0, 1023, 256, 2 * S, -1, 3000, 0);
    check(cnt_first >= 4, "first loads");
    check(cnt_reload >= 1, "reloads");
    check(cnt_lock >= 3, "locks");
    check(cnt_wrong >= 1, "wrong load detected");
    check(cnt_sat >= 1, "LLR saturation");
    $display("first loads %0d, reloads %0d, locks %0d, wrong loads %0d, saturated outputs %0d",
             cnt_first, cnt_reload, cnt_lock, cnt_wrong, cnt_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
