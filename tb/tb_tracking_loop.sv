// tb_tracking_loop: feeds window results above and below the threshold and
// checks, against a reference state machine in the testbench, that CONFIRM
// = 2 passing windows in a row declare lock (with a one-cycle lock_pulse),
// that any failing window raises reload for one cycle and drops lock, that a
// new load restarts the count, and the reload counter.
module tb_tracking_loop;
  localparam int ACC_W = 24;

  logic clk = 0, rst_n = 0, clr = 0, new_load = 0, y_valid = 0;
  logic signed [ACC_W-1:0] y = '0, lock_thresh = 24'sd1000;
  logic locked, lock_pulse, reload;
  logic [7:0] n_reloads;
  int checks = 0, failures = 0, n_locks = 0, n_rel = 0, n_losses = 0;

  always #5 clk = ~clk;

  tracking_loop #(.ACC_W(ACC_W), .CONFIRM(2)) dut (
    .clk, .rst_n, .clr, .new_load, .y, .y_valid, .lock_thresh,
    .locked, .lock_pulse, .reload, .n_reloads);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_locked = 0, m_pulse = 0, m_reload = 0;
    int m_good = 0, m_rel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (locked != m_locked || lock_pulse != m_pulse || reload != m_reload || int'(n_reloads) != m_rel) begin
        failures++;
        if (failures < 10) $display("FAIL %0t locked %0d/%0d pulse %0d/%0d reload %0d/%0d", $time,
          locked, m_locked, lock_pulse, m_pulse, reload, m_reload);
      end
      if (lock_pulse) n_locks++;
      if (reload) n_rel++;
      new_load = ($urandom_range(0, 40) == 0);
      y_valid  = ($urandom_range(0, 3) == 0);
      y        = ($urandom_range(0, 3) != 0) ? ACC_W'($urandom_range(1000, 5000)) : ACC_W'(-$urandom_range(0, 5000));
      if ($urandom_range(0, 20) == 0) y = lock_thresh;
      m_pulse = 0; m_reload = 0;
      if (new_load) begin
        m_good = 0; m_locked = 0;
      end else if (y_valid) begin
        if (y >= lock_thresh) begin
          if (!m_locked) begin
            if (m_good == 1) begin m_locked = 1; m_pulse = 1; end
            else m_good++;
          end
        end else begin
          if (m_locked) n_losses++;
          m_good = 0; m_locked = 0; m_reload = 1;
          if (m_rel < 255) m_rel++;
        end
      end
    end
    checks += 3;
    if (n_locks == 0) failures++;
    if (n_rel == 0) failures++;
    if (n_losses == 0) failures++;
    $display("locks %0d reloads %0d losses %0d", n_locks, n_rel, n_losses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
