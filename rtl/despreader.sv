// despreader: multiplies the differential output U_i by the chip b_i of the
// local m-sequence replica (the multiplier between U_i and the low-pass
// filter). With the replica in step, every product is +|alpha_i|^2 plus
// noise; out of step, the products average to about zero. A chip bit of 0
// (+1) passes U_i, a bit of 1 (-1) negates it; |U_i| never exceeds
// 2*128*128, so the negation cannot overflow diff_t. Combinational.
module despreader
  import drsse_pkg::*;
(
  input  diff_t u,
  input  logic  chip,
  output diff_t d
);

  always_comb d = chip ? -u : u;

endmodule
