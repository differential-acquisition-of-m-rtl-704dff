// symbol_correlator: despreading correlator of the coherent receiver.
//
// Multiplies each coherently demodulated chip sample r_i by the chip
// c(t - tau) of the local m-sequence replica and integrates over SF chips,
// one data symbol, giving the decision variable Z[n]. The structure
// (multiply by the replica, integrate over a symbol) follows the published scheme; the
// spreading factor SF, the sample format and the symbol boundary (the first
// symbol starts with the chip of the start cycle) are this design's.
//
// Timing: start (one cycle) begins the first symbol, and a sample in that
// cycle is already counted. After each SF-th valid chip, z_sym holds the
// symbol's sum and sym_valid is high for one cycle. clr stops it.
module symbol_correlator
  import drsse_pkg::*;
#(
  parameter int SF    = 64,
  parameter int ACC_W = SAMPLE_W + $clog2(SF) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    start,
  input  logic                    valid,
  input  sample_t                 r,
  input  logic                    chip,
  output logic signed [ACC_W-1:0] z_sym,
  output logic                    sym_valid,
  output logic                    running
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t                    acc;
  acc_t                    prod;
  logic [$clog2(SF+1)-1:0] cnt;

  always_comb prod = chip ? -acc_t'(r) : acc_t'(r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; acc <= '0; cnt <= '0; z_sym <= '0; sym_valid <= 1'b0;
    end else if (clr) begin
      running <= 1'b0; acc <= '0; cnt <= '0; sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (start) begin
        running <= 1'b1;
        acc     <= '0;
        cnt     <= '0;
      end
      if ((start || running) && valid) begin
        if ((start ? '0 : cnt) == ($clog2(SF+1))'(SF - 1)) begin
          z_sym     <= (start ? '0 : acc) + prod;
          sym_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= (start ? '0 : acc) + prod;
          cnt <= (start ? '0 : cnt) + 1'b1;
        end
      end
    end
  end

endmodule
