// diff_processor: chip-based differential processor.
//
// For each complex chip sample Z_i it forms U_i = Re(Z_i * conj(Z_{i-1}))
// = Re(Z_i)Re(Z_{i-1}) + Im(Z_i)Im(Z_{i-1}). Multiplying adjacent chips
// removes a carrier phase that is constant over two chips, and turns the
// transmitted m-sequence c_i into the m-sequence b_i = c_i * c_{i-1}, which
// obeys the same recursion. The delay unit T_c starts at "one", here the
// noiseless unit-amplitude sample (NOMINAL_AMP, 0); both the product and the
// initial value follow the published scheme; the fixed-point scale is this design's.
//
// Timing: u is combinational from z and the delay register, valid in the
// cycle where valid is high; the delay register takes z at that clock edge.
// clr (or reset) returns the delay unit to one.
module diff_processor
  import drsse_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  valid,
  input  cplx_t z,
  output diff_t u
);

  cplx_t z_prev;

  always_comb begin
    u = diff_t'(z.re) * diff_t'(z_prev.re) + diff_t'(z.im) * diff_t'(z_prev.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     z_prev <= '{re: sample_t'(NOMINAL_AMP), im: '0};
    else if (clr)   z_prev <= '{re: sample_t'(NOMINAL_AMP), im: '0};
    else if (valid) z_prev <= z;
  end

endmodule
