// tb_phase_resolver: for g(D) = 1 + D + D^3 + D^4 + D^13, generates the
// transmitted chips c_i with a reference recursion in the testbench, forms
// b_i = c_i c_{i-1}, hands the resolver S consecutive b chips, then sends
// the following complex samples with a random carrier phase (and noise in
// half of the trials). Checks that, WIN chips later, done comes on time, the
// resolver picked the candidate matching the true c_{G-1}, and c_state
// equals the true c chips aligned to the next chip. Both candidates must win
// at least once over the trials.
module tb_phase_resolver;
  import drsse_pkg::*;
  localparam int S = 13;
  localparam int WIN = 64;
  localparam int N = 8191;
  localparam int TAP_K [4] = '{1, 3, 4, 13};

  logic clk = 0, rst_n = 0, clr = 0, start = 0, valid = 0;
  logic [S-1:0] b_state = '0, c_state;
  cplx_t z = '0;
  logic busy, done, pick_b;
  int checks = 0, failures = 0, n_a = 0, n_b = 0;
  bit c [3 * N];

  always #5 clk = ~clk;

  phase_resolver #(.S(S), .TAPS(TAPS_S13), .WIN(WIN)) dut (
    .clk, .rst_n, .clr, .start, .b_state, .valid, .z, .busy, .done, .pick_b, .c_state);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int noise(input int amp);
    int s = 0;
    for (int k = 0; k < 4; k++) s += $urandom_range(0, 2 * amp) - amp;
    return s / 2;
  endfunction

  function automatic sample_t clip(input int v);
    if (v > 127) return 8'sd127;
    if (v < -128) return -8'sd128;
    return sample_t'(v);
  endfunction

  initial begin
    // reference m-sequence, random nonzero start
    for (int i = 0; i < S; i++) c[i] = $urandom_range(0, 1);
    c[0] = 1;
    for (int i = S; i < 3 * N; i++) begin
      bit v;
      v = 0;
      foreach (TAP_K[t]) v ^= c[i - TAP_K[t]];
      c[i] = v;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int g, n, cr, ci;
      bit noisy;
      // carrier phase as a rotation (cos, sin) * NOMINAL_AMP
      int rot [8][2] = '{'{32,0}, '{0,32}, '{-32,0}, '{0,-32}, '{23,23}, '{-23,23}, '{23,-23}, '{-23,-23}};
      int r;
      g = $urandom_range(S + 2, 2 * N);
      noisy = trial[0];
      r = $urandom_range(0, 7);
      @(negedge clk);
      // b_state[k] = b_{G+S-1-k}
      for (int k = 0; k < S; k++) b_state[k] = c[g + S - 1 - k] ^ c[g + S - 2 - k];
      start = 1;
      n = g + S;
      for (int t = 0; t < 2 * WIN + 40; t++) begin
        valid = (t < 3) ? 1'b1 : ($urandom_range(0, 4) != 0);
        cr = c[n] ? -rot[r][0] : rot[r][0];
        ci = c[n] ? -rot[r][1] : rot[r][1];
        if (noisy) begin cr += noise(30); ci += noise(30); end
        z.re = clip(cr); z.im = clip(ci);
        @(negedge clk);
        start = 0;
        if (valid) n++;
        if (done) break;
      end
      valid = 0;
      check(done, "done");
      check(n == g + S + WIN, "WIN chips consumed");
      check(pick_b == c[g - 1], "candidate choice");
      for (int k = 0; k < S; k++) check(c_state[k] == c[n - 1 - k], "c_state");
      if (pick_b) n_b++; else n_a++;
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(n_a > 0 && n_b > 0, "both candidates won");
    $display("candidate A %0d times, B %0d times", n_a, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
