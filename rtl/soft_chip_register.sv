// soft_chip_register: the S soft-chip delay units (SCDUs).
//
// A shift register of S LLRs. On shift the decoder's soft output enters the
// left-most unit q[0] and every unit moves one place right; the value in
// q[S-1] is dropped. After chip i has been shifted in, q[k] holds L(y_{i-k}),
// so the register always holds the latest S soft outputs. All units are
// cleared to zero by reset and by clr, which is how a new acquisition
// starts. Structure, order and initial value follow the published scheme.
module soft_chip_register
  import drsse_pkg::*;
#(
  parameter int S = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic shift,
  input  llr_t din,
  output llr_t q [S]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '{default: '0};
    end else if (clr) begin
      q <= '{default: '0};
    end else if (shift) begin
      q[0] <= din;
      for (int k = 1; k < S; k++) q[k] <= q[k-1];
    end
  end

endmodule
