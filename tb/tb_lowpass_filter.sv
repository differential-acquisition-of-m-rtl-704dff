// tb_lowpass_filter: integrate-and-dump over WIN = 16 chips with random
// input, random gaps in valid and a clr in mid-window. Each output must be
// the sum of exactly the last 16 valid inputs since the window began, and
// must appear one cycle after the 16th chip.
module tb_lowpass_filter;
  import drsse_pkg::*;
  localparam int WIN = 16;
  localparam int ACC_W = U_W + $clog2(WIN) + 1;

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  diff_t d = '0;
  logic signed [ACC_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, n_out = 0;

  always #5 clk = ~clk;

  lowpass_filter #(.WIN(WIN)) dut (.clk, .rst_n, .clr, .valid, .d, .y, .y_valid);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum = 0;
    int cnt = 0;
    bit expect_out = 0;
    longint expect_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // output of the previous cycle's window end
      checks++;
      if (y_valid != expect_out || (expect_out && longint'(y) != expect_y)) begin
        failures++;
        if (failures < 10) $display("FAIL y_valid=%0d y=%0d expected %0d/%0d", y_valid, y, expect_out, expect_y);
      end
      if (y_valid) n_out++;
      valid = ($urandom_range(0, 3) != 0);
      d = diff_t'($urandom_range(0, 65535) - 32768);
      clr = (i == 777);
      expect_out = 0;
      if (clr) begin
        sum = 0; cnt = 0;
      end else if (valid) begin
        sum += longint'(d); cnt++;
        if (cnt == WIN) begin
          expect_out = 1; expect_y = sum; sum = 0; cnt = 0;
        end
      end
    end
    checks++;
    if (n_out < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
