// tb_despreader: checks d = U * b (b = +1 for bit 0, -1 for bit 1) on random
// and extreme values of U.
module tb_despreader;
  import drsse_pkg::*;

  diff_t u, d;
  logic chip;
  int checks = 0, failures = 0;

  despreader dut (.u, .chip, .d);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int uu, input bit c);
    u = diff_t'(uu); chip = c;
    #1;
    checks++;
    if (int'(d) != (c ? -uu : uu)) begin
      failures++;
      if (failures < 10) $display("FAIL u=%0d chip=%0d d=%0d", uu, c, d);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) one($urandom_range(0, 65536) - 32768, 1'($urandom()));
    one(32768, 1); one(-32768, 1); one(32768, 0); one(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
