// R2: selects the F-function inputs of keystream generation from the state.
//
// With M = M1||M2 (M1 the upper 32 bits):
//   a = B0, b = B9, c = B16, d = B19, e = B30 ^ M1, f = B31 ^ M2
// The tap positions 0, 9, 16, 19, 30, 31 follow the cipher. Purely
// combinational.
module dragon_r2
  import dragon_pkg::*;
(
  input  bstate_t b_st,
  input  dword_t  m,
  output word_t   a, b, c, d, e, f
);

  always_comb begin
    a = b_st[0];
    b = b_st[9];
    c = b_st[16];
    d = b_st[19];
    e = b_st[30] ^ m[63:32];
    f = b_st[31] ^ m[31:0];
  end

endmodule
