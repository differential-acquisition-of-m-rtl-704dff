// tb_drsse_receiver: end-to-end test of the receiver at its default sizes
// (S = 13, g(D) = 1 + D + D^3 + D^4 + D^13, period 8191).
//
// Each run starts a new acquisition (clr) at a random point of the
// transmitted m-sequence, with a random drifting carrier phase on the
// acquisition samples z and AWGN on both z and the coherent sample r_coh.
// The first run plants a weak inverted sample and loads early, so its first
// load is wrong and must be repaired by a reload. Checked in every run:
//  * lock is reached and acquisition completes (local PN generator loaded);
//  * the phase resolver picked the candidate matching the true c_{G-1};
//  * while acquired, the local replica c_chip equals c_i on every chip and
//    the generator state equals the true last S chips;
//  * every Z[n] equals the testbench's sum of r_coh * c_i over SF chips.
// Counted mechanisms (each must occur): first load, reload, lock, resolver
// choosing candidate A and choosing B, symbols out. Runs repeat (up to 12)
// until both resolver outcomes have been seen, with at least 4 runs.
module tb_drsse_receiver;
  import drsse_pkg::*;
  import tb_chan_pkg::*;
  localparam int S = 13;
  localparam int SF = 64;
  localparam int ACC_W = U_W + $clog2(64) + 1;
  localparam int SYM_W = SAMPLE_W + $clog2(SF) + 1;

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  cplx_t z = '0;
  sample_t r_coh = '0;
  lc_t lc = '0;
  llr_t la = '0;
  logic [LLR_W-1:0] llr_thresh = '0;
  logic [15:0] min_chips = '0;
  logic signed [ACC_W-1:0] lock_thresh = ACC_W'(64 * NOMINAL_AMP * NOMINAL_AMP / 2);
  llr_t soft_out;
  logic [15:0] chip_count;
  logic load, first_load, reload, locked, lock_pulse, b_chip;
  logic [7:0] n_loads, n_reloads;
  logic [S-1:0] b_state, c_state;
  logic resolve_done, resolve_pick_b, acquired, c_chip, sym_valid;
  logic signed [SYM_W-1:0] z_sym;

  int checks = 0, failures = 0;
  int cnt_first = 0, cnt_reload = 0, cnt_lock = 0, cnt_pick_a = 0, cnt_pick_b = 0, cnt_sym = 0;

  always #5 clk = ~clk;

  drsse_receiver dut (
    .clk, .rst_n, .clr, .valid, .z, .r_coh, .lc, .la, .llr_thresh, .min_chips, .lock_thresh,
    .soft_out, .chip_count, .load, .first_load, .n_loads, .reload, .n_reloads, .locked,
    .lock_pulse, .b_chip, .b_state, .resolve_done, .resolve_pick_b, .acquired, .c_chip,
    .c_state, .z_sym, .sym_valid);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  task automatic run(input int idx, input int sigma_x10, input int lc_code, input int thr,
                     input int minc, input int weak_at);
    mseq_src src;
    int first_i, i, lock_chip, g_minus_1;
    real phi;
    bit done_seen, sym_on;
    int sym_sum, sym_cnt, exp_q[$], syms_here, acq_chips;
    src = new(S, '{1, 3, 4, 13});
    first_i = $urandom_range(100, 8000);
    phi = $urandom_range(0, 628) / 100.0;
    @(negedge clk);
    clr = 1; lc = lc_t'(lc_code); llr_thresh = LLR_W'(thr); min_chips = 16'(minc);
    @(negedge clk);
    clr = 0;
    done_seen = 0; sym_on = 0; sym_sum = 0; sym_cnt = 0; syms_here = 0; acq_chips = 0;
    lock_chip = -1; g_minus_1 = -1;
    for (i = 0; i < 8000; i++) begin
      int n, amp, re, im, rc;
      n = first_i + i;
      amp = (i == weak_at) ? -4 : NOMINAL_AMP;
      re = clip8(int'($rtoi((src.chip(n) ? -amp : amp) * $cos(phi))) + gauss(sigma_x10));
      im = clip8(int'($rtoi((src.chip(n) ? -amp : amp) * $sin(phi))) + gauss(sigma_x10));
      rc = clip8((src.chip(n) ? -NOMINAL_AMP : NOMINAL_AMP) + gauss(sigma_x10));
      phi += 0.01;
      z.re = sample_t'(re); z.im = sample_t'(im); r_coh = sample_t'(rc);
      valid = 1;
      #1;
      if (first_load) cnt_first++;
      if (load && !first_load) cnt_reload++;
      if (lock_pulse) begin
        cnt_lock++;
        lock_chip = n;
        // the resolver starts from the b state aligned to this chip: G = n - S
        g_minus_1 = n - S - 1;
      end
      if (resolve_done) begin
        done_seen = 1;
        check(g_minus_1 >= 0 && resolve_pick_b == src.chip(g_minus_1), "resolver candidate");
        if (resolve_pick_b) cnt_pick_b++; else cnt_pick_a++;
        sym_on = 1; sym_sum = 0; sym_cnt = 0;
      end
      if (sym_valid) begin
        cnt_sym++; syms_here++;
        check(exp_q.size() > 0 && int'(z_sym) == exp_q[0], "symbol value");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      if (acquired || resolve_done) begin
        acq_chips++;
        check(c_chip == src.chip(n), "local replica chip");
        if (!resolve_done) for (int k = 0; k < S; k++)
          check(c_state[k] == src.chip(n - 1 - k), "local generator state");
      end
      if (sym_on) begin
        sym_sum += src.chip(n) ? -rc : rc;
        sym_cnt++;
        if (sym_cnt == SF) begin exp_q.push_back(sym_sum); sym_sum = 0; sym_cnt = 0; end
      end
      @(negedge clk);
      valid = 0;
      if (syms_here >= 4) break;
    end
    check(done_seen && acquired, "acquisition completed");
    check(syms_here >= 4, "symbols produced");
    $display("run %0d: noise sigma %0d.%0d per rail, %0d chips, loads %0d, reloads %0d, lock at chip %0d, pick %s, %0d chips acquired",
             idx, sigma_x10 / 10, sigma_x10 % 10, i, n_loads, n_reloads, lock_chip - first_i,
             resolve_pick_b ? "B" : "A", acq_chips);
  endtask

  initial begin
    int runs;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run 0: early, wrong first load repaired by a reload (noiseless)
    run(0, 0, 64, 1, S, 5);
    check(n_reloads > 0, "reload in run 0");
    // further runs: AWGN at E_c/N_0 = 3 dB (sigma 16 per rail, L_c = 4 -> 64),
    // load after L = 20 S chips
    runs = 1;
    while (runs < 4 || ((cnt_pick_a == 0 || cnt_pick_b == 0) && runs < 12)) begin
      run(runs, 160, 64, 32, 20 * S, -1);
      runs++;
    end
    check(cnt_first > 0, "first loads happened");
    check(cnt_reload > 0, "reloads happened");
    check(cnt_lock > 0, "locks happened");
    check(cnt_pick_a > 0, "resolver chose candidate A");
    check(cnt_pick_b > 0, "resolver chose candidate B");
    check(cnt_sym > 0, "symbols produced");
    $display("first loads %0d, reloads %0d, locks %0d, resolver A %0d B %0d, symbols %0d",
             cnt_first, cnt_reload, cnt_lock, cnt_pick_a, cnt_pick_b, cnt_sym);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
