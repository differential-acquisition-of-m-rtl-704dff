// tb_chan_pkg: testbench models shared by the end-to-end testbenches.
// * mseq_src: the transmitted m-sequence c_i, generated from the recursion
//   c_i = prod_m c_{i-s_m} (bits: XOR) with a random nonzero start, and kept
//   in full so that b_i = c_i c_{i-1} and past chips can be looked up.
// * gauss: approximately Gaussian integer noise (sum of 12 uniforms).
// * chip_sample: one complex chip sample amp*e^{j phi}*c_i + noise, scaled
//   so that unit amplitude reads NOMINAL_AMP, clipped to 8 bits.
package tb_chan_pkg;

  class mseq_src;
    int  s_len;
    int  tap_k[$];
    bit  c[$];

    function new(int s_len_i, int tap_k_i[$]);
      s_len = s_len_i;
      tap_k = tap_k_i;
      for (int i = 0; i < s_len; i++) c.push_back(1'($urandom()));
      c[0] = 1'b1;
    endfunction

    // chip i (generated on demand)
    function bit chip(int i);
      while (c.size() <= i) begin
        bit v;
        int n;
        v = 1'b0;
        n = c.size();
        foreach (tap_k[t]) v ^= c[n - tap_k[t]];
        c.push_back(v);
      end
      return c[i];
    endfunction

    function bit bchip(int i);
      return chip(i) ^ chip(i - 1);
    endfunction
  endclass

  // zero-mean, standard deviation sigma_x10 / 10
  function automatic int gauss(int sigma_x10);
    longint s;
    s = 0;
    for (int k = 0; k < 12; k++) s += longint'($urandom_range(0, 1000));
    return int'((s - 6000) * sigma_x10 / 10000);
  endfunction

  function automatic int clip8(int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

endpackage
