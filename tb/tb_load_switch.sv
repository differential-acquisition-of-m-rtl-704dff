// tb_load_switch: checks the hard decisions (LLR >= 0 -> bit 0, i.e. +1;
// LLR < 0 -> bit 1, i.e. -1), that the loading command loads only once per
// acquisition (until clr re-arms the switches), that the reloading command
// loads every time, and the load counter.
module tb_load_switch;
  import drsse_pkg::*;
  localparam int S = 13;

  logic clk = 0, rst_n = 0, clr = 0, load_cmd = 0, reload_cmd = 0;
  llr_t scdu [S];
  logic load, first_load;
  logic [S-1:0] load_state;
  logic [7:0] n_loads;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  load_switch #(.S(S)) dut (.clk, .rst_n, .clr, .scdu, .load_cmd, .reload_cmd,
    .load, .first_load, .load_state, .n_loads);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    bit armed_model = 1;
    int loads_model = 0;
    for (int k = 0; k < S; k++) scdu[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit exp_load;
      @(negedge clk);
      for (int k = 0; k < S; k++) begin
        scdu[k] = llr_t'($urandom_range(0, 200) - 100);
        if ($urandom_range(0, 9) == 0) scdu[k] = '0;
      end
      load_cmd   = ($urandom_range(0, 9) == 0);
      reload_cmd = ($urandom_range(0, 19) == 0);
      clr        = (i % 500 == 499);
      #1;
      for (int k = 0; k < S; k++)
        check(load_state[k] == (int'(scdu[k]) < 0), "hard decision");
      exp_load = (armed_model && load_cmd) || reload_cmd;
      check(load == exp_load, "load strobe");
      check(first_load == (armed_model && load_cmd), "first load");
      check(int'(n_loads) == loads_model, "load count");
      if (clr) begin
        armed_model = 1; loads_model = 0;
      end else begin
        if (armed_model && load_cmd) armed_model = 0;
        if (exp_load) loads_model++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
