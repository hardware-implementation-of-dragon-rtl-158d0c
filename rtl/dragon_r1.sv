// R1: forms Dragon's starting state from a 128-bit key K and IV.
//
// The eight 128-bit words are
//   W0..W7 = K | K'^IV' | IV | K^IV' | K' | K^IV | IV' | K'^IV
// where x' swaps the upper and lower 64-bit halves of x, and the counter M
// starts at 0x0000447261676F6E ("Dragon"). Purely combinational; the key
// setup block registers the result when a setup starts.
module dragon_r1
  import dragon_pkg::*;
(
  input  qword_t  key,
  input  qword_t  iv,
  output wstate_t w,
  output dword_t  m
);

  qword_t ks, ivs;

  always_comb begin
    ks   = swap_halves(key);
    ivs  = swap_halves(iv);
    w[0] = key;
    w[1] = ks ^ ivs;
    w[2] = iv;
    w[3] = key ^ ivs;
    w[4] = ks;
    w[5] = key ^ iv;
    w[6] = ivs;
    w[7] = ks ^ iv;
    m    = M_INIT;
  end

endmodule
