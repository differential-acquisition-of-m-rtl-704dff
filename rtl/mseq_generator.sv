// mseq_generator: S-stage m-sequence generator in the +1/-1 domain, with a
// parallel load of S chips.
//
// The chips obey c_i = prod_{g_k = 1} c_{i-k}: the output chip is the product
// of the delay units whose feedback coefficient g_k is 1, and it is also what
// is shifted into the first delay unit. With chips carried as bits (0 = +1,
// 1 = -1) the product is the XOR of the tapped bits. state[k-1] holds
// c_{i-k}, so state[0] is the newest chip.
//
// Interface and timing:
//  * chip is combinational from the current state: the chip of this cycle.
//  * adv shifts the register by one chip at the clock edge.
//  * load replaces the state with load_state in the same cycle: chip is then
//    computed from load_state, and with adv the register takes load_state
//    shifted by one chip. This lets a load and a chip arrive together.
//  * clr or reset puts INIT in the register (INIT must not be all zero, the
//    all-+1 state that never leaves itself).
// The generator structure follows the published scheme; the load semantics are
// this design's own.
module mseq_generator
  import drsse_pkg::*;
#(
  parameter int               S    = 13,
  parameter logic [MAX_S-1:0] TAPS = TAPS_S13,
  parameter logic [S-1:0]     INIT = S'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         adv,
  input  logic         load,
  input  logic [S-1:0] load_state,
  output logic         chip,
  output logic [S-1:0] state
);

  logic [S-1:0] eff;

  always_comb begin
    eff  = load ? load_state : state;
    chip = ^(eff & TAPS[S-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= INIT;
    else if (clr)    state <= INIT;
    else if (adv)    state <= {eff[S-2:0], chip};
    else if (load)   state <= load_state;
  end

  initial begin
    assert (S >= 2 && TAPS[S-1] == 1'b1) else $error("need S >= 2 and g_S = 1");
    assert (INIT != '0) else $error("INIT must not be the all +1 state");
  end

endmodule
