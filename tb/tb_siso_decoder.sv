// tb_siso_decoder: checks the SISO decoder for g(D) = 1 + D + D^3 + D^4 +
// D^13, whose taps read L(y_{i-1}), L(y_{i-3}), L(y_{i-4}), L(y_{i-13}):
// * extrinsic = (product of the tap signs) * (smallest tap magnitude),
// * soft_out = intrinsic + extrinsic, saturated to +/-LLR_MAX,
// * the chip counter counts valid cycles and clears on clr,
// * load_cmd = all 13 magnitudes >= llr_thresh and count >= min_chips.
// Register contents and intrinsic values are random, with small values mixed
// in so that the minimum and the threshold test are exercised.
module tb_siso_decoder;
  import drsse_pkg::*;
  localparam int S = 13;
  localparam int TAP_IDX [4] = '{0, 2, 3, 12};

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  llr_t intrinsic = '0, extrinsic, soft_out;
  llr_t scdu [S];
  logic [LLR_W-1:0] llr_thresh = '0;
  logic [15:0] min_chips = '0, chip_count;
  logic load_cmd;
  int checks = 0, failures = 0;
  int count_model = 0;
  int n_load_cmd = 0, n_sat = 0;

  always #5 clk = ~clk;

  siso_decoder #(.S(S), .TAPS(TAPS_S13)) dut (
    .clk, .rst_n, .clr, .valid, .intrinsic, .scdu, .llr_thresh, .min_chips,
    .extrinsic, .soft_out, .load_cmd, .chip_count);

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

  function automatic int rand_llr(input int mode);
    case (mode)
      0: return $urandom_range(0, 20) - 10;
      1: return $urandom_range(0, 2000) - 1000;
      default: return $urandom_range(0, 2 * LLR_MAX) - LLR_MAX;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int mode, sgn, mn, e, so, all_ok;
      @(negedge clk);
      mode = $urandom_range(0, 2);
      for (int k = 0; k < S; k++) scdu[k] = llr_t'(rand_llr(mode));
      if (i % 7 == 0) for (int k = 0; k < S; k++) scdu[k] = llr_t'(($urandom_range(0,1) ? 1 : -1) * $urandom_range(20, 60));
      intrinsic  = llr_t'(rand_llr($urandom_range(0, 2)));
      llr_thresh = LLR_W'($urandom_range(0, 40));
      min_chips  = 16'($urandom_range(0, 200));
      valid      = $urandom_range(0, 1);
      clr        = (i == 2500);
      #1;
      sgn = 1; mn = LLR_MAX;
      foreach (TAP_IDX[j]) begin
        int v;
        v = int'(scdu[TAP_IDX[j]]);
        if (v < 0) sgn = -sgn;
        if ((v < 0 ? -v : v) < mn) mn = (v < 0 ? -v : v);
      end
      e = sgn * mn;
      so = int'(intrinsic) + e;
      if (so > LLR_MAX) begin so = LLR_MAX; n_sat++; end
      if (so < -LLR_MAX) begin so = -LLR_MAX; n_sat++; end
      check(int'(extrinsic) == e, "extrinsic");
      check(int'(soft_out) == so, "soft_out");
      all_ok = 1;
      for (int k = 0; k < S; k++) begin
        int v;
        v = int'(scdu[k]);
        if ((v < 0 ? -v : v) < int'(llr_thresh)) all_ok = 0;
      end
      check(load_cmd == (all_ok && count_model >= int'(min_chips)), "load_cmd");
      check(int'(chip_count) == count_model, "chip_count");
      if (load_cmd) n_load_cmd++;
      if (clr) count_model = 0;
      else if (valid) count_model++;
    end
    check(n_load_cmd > 0, "load_cmd seen");
    check(n_sat > 0, "saturation seen");
    $display("load_cmd cycles %0d, saturations %0d", n_load_cmd, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
