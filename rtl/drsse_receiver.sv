// drsse_receiver: m-sequence acquisition front end of a direct-sequence
// spread-spectrum correlation receiver, built around DRSSE acquisition.
//
// Two sample streams arrive one chip per valid cycle:
//  * z: complex chip samples taken without carrier-phase knowledge, used for
//    acquisition. The DRSSE loop (drsse_acquisition) acquires the
//    differential m-sequence b_i = c_i c_{i-1} and confirms it by tracking.
//  * r_coh: the coherently demodulated real chip sample, used for
//    despreading the data.
// When the DRSSE loop declares lock, the phase resolver turns the S
// confirmed b chips into S chips of the transmitted sequence c_i, resolving
// the unknown chip c_{G-1} by correlating both candidates with z. The
// chosen state is loaded into the local PN generator, whose replica
// c(t - tau) drives the symbol correlator: Z[n] = sum over SF chips of
// r_coh * c.
//
// Outputs: acquired is high once the local PN generator has been loaded
// after the latest lock and the DRSSE loop is still locked; c_chip is the
// replica chip for the current cycle. The carrier mixers and the carrier
// phase estimate of the analog front end are outside this design. All
// run-time settings are inputs; see drsse_acquisition.
module drsse_receiver
  import drsse_pkg::*;
#(
  parameter int               S       = 13,
  parameter logic [MAX_S-1:0] TAPS    = TAPS_S13,
  parameter int               LPF_WIN = 64,
  parameter int               CONFIRM = 2,
  parameter int               RES_WIN = 64,
  parameter int               SF      = 64,
  parameter int               CNT_W   = 16,
  parameter int               ACC_W   = U_W + $clog2(LPF_WIN) + 1,
  parameter int               SYM_W   = SAMPLE_W + $clog2(SF) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    valid,
  input  cplx_t                   z,
  input  sample_t                 r_coh,
  input  lc_t                     lc,
  input  llr_t                    la,
  input  logic [LLR_W-1:0]        llr_thresh,
  input  logic [CNT_W-1:0]        min_chips,
  input  logic signed [ACC_W-1:0] lock_thresh,
  // DRSSE loop observation
  output llr_t                    soft_out,
  output logic [CNT_W-1:0]        chip_count,
  output logic                    load,
  output logic                    first_load,
  output logic [7:0]              n_loads,
  output logic                    reload,
  output logic [7:0]              n_reloads,
  output logic                    locked,
  output logic                    lock_pulse,
  output logic                    b_chip,
  output logic [S-1:0]            b_state,
  // coherent path
  output logic                    resolve_done,
  output logic                    resolve_pick_b,
  output logic                    acquired,
  output logic                    c_chip,
  output logic [S-1:0]            c_state,
  output logic signed [SYM_W-1:0] z_sym,
  output logic                    sym_valid
);

  diff_t               u;
  llr_t                scdu [S];
  logic [S-1:0]        load_state;
  logic                active, lpf_valid;
  logic signed [ACC_W-1:0] lpf_y;
  logic                res_busy;
  logic [S-1:0]        res_state;
  logic                c_loaded, sym_running;

  drsse_acquisition #(
    .S(S), .TAPS(TAPS), .LPF_WIN(LPF_WIN), .CONFIRM(CONFIRM), .CNT_W(CNT_W), .ACC_W(ACC_W)
  ) u_acq (
    .clk, .rst_n, .clr, .valid, .z, .lc, .la, .llr_thresh, .min_chips, .lock_thresh,
    .u, .soft_out, .scdu, .chip_count, .load, .first_load, .load_state, .n_loads,
    .active, .b_chip, .b_state, .lpf_y, .lpf_valid, .locked, .lock_pulse, .reload,
    .n_reloads
  );

  phase_resolver #(.S(S), .TAPS(TAPS), .WIN(RES_WIN)) u_res (
    .clk, .rst_n, .clr, .start(lock_pulse), .b_state, .valid, .z,
    .busy(res_busy), .done(resolve_done), .pick_b(resolve_pick_b), .c_state(res_state)
  );

  mseq_generator #(.S(S), .TAPS(TAPS)) u_local_pn (
    .clk, .rst_n, .clr, .adv(valid), .load(resolve_done), .load_state(res_state),
    .chip(c_chip), .state(c_state)
  );

  symbol_correlator #(.SF(SF), .ACC_W(SYM_W)) u_corr (
    .clk, .rst_n, .clr(clr || lock_pulse), .start(resolve_done), .valid, .r(r_coh),
    .chip(c_chip), .z_sym, .sym_valid, .running(sym_running)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             c_loaded <= 1'b0;
    else if (clr)           c_loaded <= 1'b0;
    else if (lock_pulse)    c_loaded <= 1'b0;
    else if (resolve_done)  c_loaded <= 1'b1;
  end

  assign acquired = c_loaded && locked;

endmodule
