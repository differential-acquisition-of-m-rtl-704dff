// tb_symbol_correlator: SF = 16 chips per symbol. Random samples and chips
// with gaps in valid; each Z[n] must equal the testbench's sum of r * c
// over exactly SF valid chips, the first symbol starting with the chip of
// the start cycle; a restart in mid-symbol begins a new symbol.
module tb_symbol_correlator;
  import drsse_pkg::*;
  localparam int SF = 16;
  localparam int ACC_W = SAMPLE_W + $clog2(SF) + 1;

  logic clk = 0, rst_n = 0, clr = 0, start = 0, valid = 0, chip = 0;
  sample_t r = '0;
  logic signed [ACC_W-1:0] z_sym;
  logic sym_valid, running;
  int checks = 0, failures = 0, n_sym = 0;

  always #5 clk = ~clk;

  symbol_correlator #(.SF(SF)) dut (.clk, .rst_n, .clr, .start, .valid, .r, .chip,
    .z_sym, .sym_valid, .running);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit run = 0, exp_v = 0;
    int sum = 0, cnt = 0, exp_z = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (sym_valid != exp_v || (exp_v && int'(z_sym) != exp_z)) begin
        failures++;
        if (failures < 10) $display("FAIL sym_valid %0d/%0d z %0d/%0d", sym_valid, exp_v, z_sym, exp_z);
      end
      if (sym_valid) n_sym++;
      start = (i == 10) || (i == 1000);
      valid = ($urandom_range(0, 3) != 0);
      r = sample_t'($urandom_range(0, 255) - 128);
      chip = 1'($urandom());
      exp_v = 0;
      if (start) begin run = 1; sum = 0; cnt = 0; end
      if (run && valid) begin
        sum += chip ? -int'(r) : int'(r);
        cnt++;
        if (cnt == SF) begin exp_v = 1; exp_z = sum; sum = 0; cnt = 0; end
      end
    end
    checks++;
    if (n_sym < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
