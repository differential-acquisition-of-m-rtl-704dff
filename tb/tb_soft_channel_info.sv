// tb_soft_channel_info: checks L = L_c * U + L(b) with the fixed-point
// scaling of the package (floor of the product's shift, then saturation to
// +/-LLR_MAX), on random and on extreme operands.
module tb_soft_channel_info;
  import drsse_pkg::*;

  diff_t u;
  lc_t   lc;
  llr_t  la, intrinsic;
  int checks = 0, failures = 0;

  soft_channel_info dut (.u, .lc, .la, .intrinsic);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint uu, input longint ll, input longint aa);
    longint p, e;
    u = diff_t'(uu); lc = lc_t'(ll); la = llr_t'(aa);
    #1;
    p = (uu * ll);
    // floor division by 2^LC_SHIFT
    e = (p >= 0) ? (p >> LC_SHIFT) : -((-p + (1 << LC_SHIFT) - 1) >> LC_SHIFT);
    e = e + aa;
    if (e > LLR_MAX) e = LLR_MAX;
    if (e < -LLR_MAX) e = -LLR_MAX;
    checks++;
    if (longint'(intrinsic) != e) begin
      failures++;
      if (failures < 10) $display("FAIL u=%0d lc=%0d la=%0d -> %0d expected %0d", uu, ll, aa, intrinsic, e);
    end
  endtask

  initial begin
    // L_c = 2 (E_c/N_0 = 0 dB) on a noiseless +1 and -1: +/-2.0 in LLR units
    one(NOMINAL_AMP * NOMINAL_AMP, 2 << LC_FRAC, 0);
    one(-NOMINAL_AMP * NOMINAL_AMP, 2 << LC_FRAC, 0);
    checks++;
    if (intrinsic != -llr_t'(2 << LLR_FRAC)) failures++;
    for (int i = 0; i < 3000; i++)
      one(longint'($urandom_range(0, 65535)) - 32768, $urandom_range(0, 1023),
          longint'($urandom_range(0, 4095)) - 2048);
    one(32768, 1023, 30000);
    one(-32768, 1023, -30000);
    one(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
