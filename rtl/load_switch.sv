// load_switch: hard decisions and the switch bank between the soft-chip
// register and the m-sequence generator.
//
// Each SCDU drives a ">= 0" decision: an LLR >= 0 gives chip +1 (bit 0), a
// negative LLR gives -1 (bit 1). The switches close, and the generator is
// loaded with the S decisions, on
//  * the loading command of the SISO decoder, once per acquisition attempt
//    (the switch bank is armed by reset and clr and disarmed by the load), or
//  * the reloading command of the tracking loop, at any time.
// load is a one-cycle strobe whenever a command is present; load_state is
// combinational from the register (state[k] is the decision on q[k], the
// same order as the generator's delay units). n_loads counts loads since clr.
// The decisions and the two commands follow the published scheme; the arming rule and
// the immediate reload are this design's reading of them.
module load_switch
  import drsse_pkg::*;
#(
  parameter int S = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  llr_t         scdu [S],
  input  logic         load_cmd,
  input  logic         reload_cmd,
  output logic         load,
  output logic         first_load,
  output logic [S-1:0] load_state,
  output logic [7:0]   n_loads
);

  logic armed;

  always_comb begin
    for (int k = 0; k < S; k++) load_state[k] = scdu[k][LLR_W-1];
    first_load = armed && load_cmd;
    load       = first_load || reload_cmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b1;
      n_loads <= '0;
    end else if (clr) begin
      armed   <= 1'b1;
      n_loads <= '0;
    end else begin
      if (first_load) armed <= 1'b0;
      if (load && n_loads != '1) n_loads <= n_loads + 1'b1;
    end
  end

endmodule
