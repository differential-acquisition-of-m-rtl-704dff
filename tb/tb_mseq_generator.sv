// tb_mseq_generator: checks the m-sequence generator for both generator
// polynomials, g(D) = 1 + D + D^3 + D^4 + D^13 (S = 13) and
// g(D) = 1 + D^2 + D^5 (S = 5).
// * Each output chip obeys c_i = prod c_{i-s_m}, checked on the output
//   stream itself against a history kept by the testbench.
// * The state first returns to its start after exactly 2^S - 1 chips, and
//   the period holds 2^(S-1) chips of -1 (balance property).
// * A load takes effect in the same cycle: chip is the feedback of the
//   loaded state, alone and together with adv.
module tb_mseq_generator;
  import drsse_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  logic adv13 = 0, load13 = 0, adv5 = 0, load5 = 0;
  logic [12:0] ls13 = '0, st13;
  logic [4:0]  ls5 = '0, st5;
  logic chip13, chip5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mseq_generator #(.S(13), .TAPS(TAPS_S13)) dut13 (
    .clk, .rst_n, .clr, .adv(adv13), .load(load13), .load_state(ls13), .chip(chip13), .state(st13));
  mseq_generator #(.S(5), .TAPS(TAPS_S5)) dut5 (
    .clk, .rst_n, .clr, .adv(adv5), .load(load5), .load_state(ls5), .chip(chip5), .state(st5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one generator for a full period; s_taps lists the exponents of g(D).
  bit hist[$];
  initial begin
    int ones, first_return, n;
    logic [12:0] start13;
    logic [4:0]  start5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- S = 13 ----
    start13 = st13;
    hist.delete(); ones = 0; first_return = 0;
    adv13 = 1;
    for (int i = 0; i < 8191; i++) begin
      // the register holds the 13 chips before the first output
      if (i == 0) for (int k = 12; k >= 0; k--) hist.push_back(st13[k]);
      hist.push_back(chip13);
      ones += chip13;
      n = hist.size() - 1;
      check(hist[n] == (hist[n-1] ^ hist[n-3] ^ hist[n-4] ^ hist[n-13]), "S13 recursion");
      @(negedge clk);
      if (st13 == start13 && first_return == 0) first_return = i + 1;
    end
    adv13 = 0;
    check(first_return == 8191, "S13 period");
    check(ones == 4096, "S13 balance");
    $display("S=13: period %0d, %0d chips of -1", first_return, ones);

    // ---- S = 5 ----
    start5 = st5;
    hist.delete(); ones = 0; first_return = 0;
    for (int k = 4; k >= 0; k--) hist.push_back(st5[k]);
    adv5 = 1;
    for (int i = 0; i < 31; i++) begin
      hist.push_back(chip5);
      ones += chip5;
      n = hist.size() - 1;
      check(hist[n] == (hist[n-2] ^ hist[n-5]), "S5 recursion");
      @(negedge clk);
      if (st5 == start5 && first_return == 0) first_return = i + 1;
    end
    adv5 = 0;
    check(first_return == 31, "S5 period");
    check(ones == 16, "S5 balance");

    // ---- load without adv, load with adv ----
    for (int t = 0; t < 50; t++) begin
      logic [12:0] v;
      logic [12:0] nxt;
      bit fb;
      v = 13'($urandom()) | 13'd1;
      fb = v[0] ^ v[2] ^ v[3] ^ v[12];
      ls13 = v; load13 = 1; adv13 = t[0];
      #1;
      check(chip13 == fb, "chip from loaded state");
      @(negedge clk);
      nxt = t[0] ? {v[11:0], fb} : v;
      check(st13 == nxt, "state after load");
      load13 = 0; adv13 = 0;
    end

    // ---- clr ----
    clr = 1; @(negedge clk); clr = 0;
    check(st13 == 13'd1 && st5 == 5'd1, "clr to INIT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
