// drsse_acquisition: the DRSSE acquisition loop for the differential
// m-sequence {b_i}.
//
// Complex chip samples Z_i pass the differential processor, giving
// U_i = Re(Z_i conj(Z_{i-1})), whose sign carries b_i = c_i c_{i-1}. The soft
// channel information turns U_i into the intrinsic LLR L_c U_i + L(b_i); the
// SISO decoder adds the extrinsic LLR from the soft-chip register taps
// (sign product times minimum magnitude, over the taps with g_k = 1) and the
// soft output is shifted into the register. When all S soft chips are
// reliable enough, the loading command closes the switch bank and the signs
// of the S LLRs are loaded into the local m-sequence generator. From then
// on the generator's chips despread U_i; the low-pass filter integrates the
// product and the tracking loop either confirms the phase (locked) or asks
// for a reload of the S chips the soft register then holds. The soft
// register keeps decoding all the time.
//
// Interface: one chip per valid cycle, any clock rate at or above the chip
// rate. lc (L_c, LC_FRAC fraction bits), la (a-priori LLR), llr_thresh,
// min_chips and lock_thresh are run-time settings. clr starts a new
// acquisition: soft register to zero, differential delay to one, counters
// and lock cleared. b_chip is the generator's replica of the chip of the
// current cycle; b_state its state aligned to the next chip.
module drsse_acquisition
  import drsse_pkg::*;
#(
  parameter int               S       = 13,
  parameter logic [MAX_S-1:0] TAPS    = TAPS_S13,
  parameter int               LPF_WIN = 64,
  parameter int               CONFIRM = 2,
  parameter int               CNT_W   = 16,
  parameter int               ACC_W   = U_W + $clog2(LPF_WIN) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    valid,
  input  cplx_t                   z,
  input  lc_t                     lc,
  input  llr_t                    la,
  input  logic [LLR_W-1:0]        llr_thresh,
  input  logic [CNT_W-1:0]        min_chips,
  input  logic signed [ACC_W-1:0] lock_thresh,
  output diff_t                   u,
  output llr_t                    soft_out,
  output llr_t                    scdu [S],
  output logic [CNT_W-1:0]        chip_count,
  output logic                    load,
  output logic                    first_load,
  output logic [S-1:0]            load_state,
  output logic [7:0]              n_loads,
  output logic                    active,
  output logic                    b_chip,
  output logic [S-1:0]            b_state,
  output logic signed [ACC_W-1:0] lpf_y,
  output logic                    lpf_valid,
  output logic                    locked,
  output logic                    lock_pulse,
  output logic                    reload,
  output logic [7:0]              n_reloads
);

  llr_t  intrinsic, extrinsic;
  logic  load_cmd;
  diff_t desp;

  diff_processor u_diff (
    .clk, .rst_n, .clr, .valid, .z, .u
  );

  soft_channel_info u_sci (
    .u, .lc, .la, .intrinsic
  );

  siso_decoder #(.S(S), .TAPS(TAPS), .CNT_W(CNT_W)) u_siso (
    .clk, .rst_n, .clr, .valid, .intrinsic, .scdu, .llr_thresh, .min_chips,
    .extrinsic, .soft_out, .load_cmd, .chip_count
  );

  soft_chip_register #(.S(S)) u_scr (
    .clk, .rst_n, .clr, .shift(valid), .din(soft_out), .q(scdu)
  );

  load_switch #(.S(S)) u_sw (
    .clk, .rst_n, .clr, .scdu, .load_cmd, .reload_cmd(reload),
    .load, .first_load, .load_state, .n_loads
  );

  mseq_generator #(.S(S), .TAPS(TAPS)) u_gen (
    .clk, .rst_n, .clr, .adv(valid), .load, .load_state,
    .chip(b_chip), .state(b_state)
  );

  despreader u_desp (
    .u, .chip(b_chip), .d(desp)
  );

  lowpass_filter #(.WIN(LPF_WIN), .ACC_W(ACC_W)) u_lpf (
    .clk, .rst_n, .clr(clr || load), .valid(valid && active), .d(desp),
    .y(lpf_y), .y_valid(lpf_valid)
  );

  tracking_loop #(.ACC_W(ACC_W), .CONFIRM(CONFIRM)) u_trk (
    .clk, .rst_n, .clr, .new_load(load), .y(lpf_y), .y_valid(lpf_valid),
    .lock_thresh, .locked, .lock_pulse, .reload, .n_reloads
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    active <= 1'b0;
    else if (clr)  active <= 1'b0;
    else if (load) active <= 1'b1;
  end

endmodule
