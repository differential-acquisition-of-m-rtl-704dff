// phase_resolver: recovers S consecutive chips of the transmitted
// m-sequence {c_i} from S consecutive chips of the differential m-sequence
// {b_i}, for receivers that despread {c_i} coherently.
//
// Since b_j = c_j c_{j-1}, the chips c_G..c_{G+S-1} follow from
// b_G..b_{G+S-1} once c_{G-1} is known: c_j = b_j c_{j-1}. Both choices,
// c_{G-1} = +1 and -1, are tried. Candidate A (c_{G-1} = +1) is the running
// product of the b chips from the oldest; candidate B is its complement
// (every chip negated). Each candidate is loaded into its own m-sequence
// generator, both replicas are correlated with the next WIN complex chip
// samples, and the candidate with the larger correlation magnitude
// (|sum re| + |sum im|, so the carrier phase does not matter) is chosen.
// The method is the third one the published scheme offers; the window, the magnitude measure
// and the timing are this design's.
//
// Interface and timing: start (one cycle) takes b_state, in generator order
// (b_state[0] newest chip b_{G+S-1}, b_state[S-1] oldest b_G). A sample
// arriving in the start cycle is already correlated. After WIN valid chips,
// done is high for one cycle with c_state, the chosen generator's state
// aligned to the next chip, ready to be loaded into the local generator in
// that same cycle; pick_b tells which candidate won.
module phase_resolver
  import drsse_pkg::*;
#(
  parameter int               S     = 13,
  parameter logic [MAX_S-1:0] TAPS  = TAPS_S13,
  parameter int               WIN   = 64,
  parameter int               ACC_W = SAMPLE_W + $clog2(WIN) + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         start,
  input  logic [S-1:0] b_state,
  input  logic         valid,
  input  cplx_t        z,
  output logic         busy,
  output logic         done,
  output logic         pick_b,
  output logic [S-1:0] c_state
);

  typedef logic signed [ACC_W-1:0] acc_t;

  logic [S-1:0] cand_a, cand_b, state_a, state_b;
  logic         chip_a, chip_b;
  logic         run, adv, deciding;
  logic [$clog2(WIN+1)-1:0] cnt;
  acc_t a_re, a_im, b_re, b_im;
  acc_t mag_a, mag_b;

  // c_{G+S-1-k} = b_{G+S-1-k} * ... * b_G * c_{G-1}: prefix product from the
  // oldest chip, with c_{G-1} = +1 for candidate A.
  always_comb begin
    cand_a[S-1] = b_state[S-1];
    for (int k = S - 2; k >= 0; k--) cand_a[k] = cand_a[k+1] ^ b_state[k];
    cand_b = ~cand_a;
  end

  assign adv = valid && (start || run);

  mseq_generator #(.S(S), .TAPS(TAPS)) u_gen_a (
    .clk, .rst_n, .clr, .adv, .load(start), .load_state(cand_a),
    .chip(chip_a), .state(state_a)
  );

  mseq_generator #(.S(S), .TAPS(TAPS)) u_gen_b (
    .clk, .rst_n, .clr, .adv, .load(start), .load_state(cand_b),
    .chip(chip_b), .state(state_b)
  );

  function automatic acc_t mul_chip(input sample_t s, input logic chip);
    return chip ? -acc_t'(s) : acc_t'(s);
  endfunction

  function automatic acc_t abs_acc(input acc_t v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    mag_a = abs_acc(a_re) + abs_acc(a_im);
    mag_b = abs_acc(b_re) + abs_acc(b_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; deciding <= 1'b0; cnt <= '0;
      a_re <= '0; a_im <= '0; b_re <= '0; b_im <= '0;
    end else if (clr) begin
      run <= 1'b0; deciding <= 1'b0; cnt <= '0;
      a_re <= '0; a_im <= '0; b_re <= '0; b_im <= '0;
    end else begin
      deciding <= 1'b0;
      if (start) begin
        run  <= 1'b1;
        cnt  <= valid ? ($clog2(WIN+1))'(1) : '0;
        a_re <= valid ? mul_chip(z.re, chip_a) : '0;
        a_im <= valid ? mul_chip(z.im, chip_a) : '0;
        b_re <= valid ? mul_chip(z.re, chip_b) : '0;
        b_im <= valid ? mul_chip(z.im, chip_b) : '0;
        if (valid && WIN == 1) begin
          run      <= 1'b0;
          deciding <= 1'b1;
        end
      end else if (run && valid) begin
        a_re <= a_re + mul_chip(z.re, chip_a);
        a_im <= a_im + mul_chip(z.im, chip_a);
        b_re <= b_re + mul_chip(z.re, chip_b);
        b_im <= b_im + mul_chip(z.im, chip_b);
        cnt  <= cnt + 1'b1;
        if (cnt == ($clog2(WIN+1))'(WIN - 1)) begin
          run      <= 1'b0;
          deciding <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    busy    = run || deciding;
    done    = deciding;
    pick_b  = mag_b > mag_a;
    c_state = pick_b ? state_b : state_a;
  end

endmodule
