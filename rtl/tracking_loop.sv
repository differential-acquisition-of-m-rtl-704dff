// tracking_loop: verification part of the code tracking loop.
//
// After each load of the m-sequence generator, every low-pass filter output
// (one per window of despread chips) is compared with lock_thresh. A window
// at or above it counts as tracked; CONFIRM tracked windows in a row declare
// the code phase acquired (locked goes high, lock_pulse for one cycle). A
// window below it means the loop cannot track the loaded phase: it asserts
// the reloading command (reload, one cycle), which loads the next S chips of
// the soft-chip register, and it drops lock if it had it.
//
// The published scheme gives this behaviour (track, or ask for a reload until
// tracking succeeds) but not the loop's insides. A fine timing loop
// (early/late correlation at sub-chip resolution) is not built: this design
// works on one sample per chip and checks only whether the loaded phase is
// right. The threshold test, CONFIRM and the loss-of-lock rule are this
// design's choices. Outputs are registered.
module tracking_loop #(
  parameter int ACC_W   = 24,
  parameter int CONFIRM = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    new_load,
  input  logic signed [ACC_W-1:0] y,
  input  logic                    y_valid,
  input  logic signed [ACC_W-1:0] lock_thresh,
  output logic                    locked,
  output logic                    lock_pulse,
  output logic                    reload,
  output logic [7:0]              n_reloads
);

  logic [$clog2(CONFIRM+1)-1:0] good;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0; lock_pulse <= 1'b0; reload <= 1'b0; good <= '0; n_reloads <= '0;
    end else if (clr) begin
      locked <= 1'b0; lock_pulse <= 1'b0; reload <= 1'b0; good <= '0; n_reloads <= '0;
    end else begin
      lock_pulse <= 1'b0;
      reload     <= 1'b0;
      if (new_load) begin
        good   <= '0;
        locked <= 1'b0;
      end else if (y_valid) begin
        if (y >= lock_thresh) begin
          if (!locked) begin
            if (good == ($clog2(CONFIRM+1))'(CONFIRM - 1)) begin
              locked     <= 1'b1;
              lock_pulse <= 1'b1;
            end else begin
              good <= good + 1'b1;
            end
          end
        end else begin
          good   <= '0;
          locked <= 1'b0;
          reload <= 1'b1;
          if (n_reloads != '1) n_reloads <= n_reloads + 1'b1;
        end
      end
    end
  end

endmodule
