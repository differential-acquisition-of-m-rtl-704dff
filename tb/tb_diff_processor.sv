// tb_diff_processor: drives random complex samples, with gaps in valid, and
// checks U_i = Re(Z_i conj(Z_{i-1})) computed in integers by the testbench,
// including the first chip after reset and after clr, where Z_{-1} = one
// (NOMINAL_AMP + 0j).
module tb_diff_processor;
  import drsse_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  cplx_t z = '0;
  diff_t u;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  diff_processor dut (.clk, .rst_n, .clr, .valid, .z, .u);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pre, pim, cre, cim, expect_u;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      pre = NOMINAL_AMP; pim = 0;
      for (int i = 0; i < 1000; i++) begin
        @(negedge clk);
        valid = ($urandom_range(0, 3) != 0);
        cre = $urandom_range(0, 255) - 128;
        cim = $urandom_range(0, 255) - 128;
        z.re = sample_t'(cre); z.im = sample_t'(cim);
        #1;
        if (valid) begin
          expect_u = cre * pre + cim * pim;
          checks++;
          if (int'(u) != expect_u) begin
            failures++;
            if (failures < 10) $display("FAIL u=%0d expected %0d", u, expect_u);
          end
          pre = cre; pim = cim;
        end
      end
      @(negedge clk);
      valid = 0; clr = 1;
      @(negedge clk);
      clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
