// tb_soft_chip_register: shifts random LLRs (with idle cycles) into the
// register and checks that q[k] always equals the k-th most recent value
// shifted in, that the initial contents and the contents after clr are zero.
module tb_soft_chip_register;
  import drsse_pkg::*;
  localparam int S = 13;

  logic clk = 0, rst_n = 0, clr = 0, shift = 0;
  llr_t din = '0;
  llr_t q [S];
  llr_t model [S];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  soft_chip_register #(.S(S)) dut (.clk, .rst_n, .clr, .shift, .din, .q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < S; k++) begin
      checks++;
      if (q[k] != model[k]) begin
        failures++;
        if (failures < 10) $display("FAIL q[%0d]=%0d expected %0d", k, q[k], model[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < S; k++) model[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 500; i++) begin
      shift = ($urandom_range(0, 2) != 0);
      din = llr_t'($urandom());
      if (i == 300) clr = 1;
      @(negedge clk);
      if (clr) for (int k = 0; k < S; k++) model[k] = '0;
      else if (shift) begin
        for (int k = S - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
      clr = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
