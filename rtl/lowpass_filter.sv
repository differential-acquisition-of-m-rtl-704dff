// lowpass_filter: low-pass filter of the despread differential signal,
// realised as an integrate-and-dump over WIN chips.
//
// The published scheme names a low-pass filter between the despreader and the
// tracking loop without giving its form; integrate-and-dump, the simplest
// low-pass filter whose output is a per-window correlation, is this design's
// choice, as is the window length.
//
// Timing: the accumulator adds d on every valid cycle. On the WIN-th valid
// chip of a window, y takes the window's full sum and y_valid is high for the
// following cycle; the accumulator restarts at zero. clr (also used at every
// generator load) discards a partial window.
module lowpass_filter
  import drsse_pkg::*;
#(
  parameter int WIN   = 64,
  parameter int ACC_W = U_W + $clog2(WIN) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    valid,
  input  diff_t                   d,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);

  logic signed [ACC_W-1:0]    acc;
  logic [$clog2(WIN+1)-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; y <= '0; y_valid <= 1'b0;
    end else if (clr) begin
      acc <= '0; cnt <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (valid) begin
        if (cnt == ($clog2(WIN+1))'(WIN - 1)) begin
          y       <= acc + ACC_W'(d);
          y_valid <= 1'b1;
          acc     <= '0;
          cnt     <= '0;
        end else begin
          acc <= acc + ACC_W'(d);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
