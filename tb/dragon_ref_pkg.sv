// Behavioural reference model of the Dragon core for the testbenches.
//
// Written independently of the RTL: plain functions on unpacked arrays with
// explicit index arithmetic. It models the stand-in S-box fill (the same
// integer hash as the RTL's default tables), G1..H3, F, the R1 state layout,
// one key-setup iteration and one keystream iteration.
package dragon_ref_pkg;

  typedef int unsigned u32;
  typedef longint unsigned u64;

  // Stand-in S-box fill: lowbias32-style hash of (x xor seed).
  function automatic u32 ref_sbox(int which, int x);
    u64 h;
    h = u64'(x) ^ ((which == 1) ? 64'h9E3779B9 : 64'h85EBCA6B);
    h = h ^ (h >> 16);
    h = (h * 64'h7FEB352D) & 64'hFFFF_FFFF;
    h = h ^ (h >> 15);
    h = (h * 64'h846CA68B) & 64'hFFFF_FFFF;
    h = h ^ (h >> 16);
    return u32'(h);
  endfunction

  // kind: 0 = G, 1 = H; k = 1..3. Byte 0 is bits 31:24.
  function automatic u32 ref_gh(int kind, int k, u32 x);
    u32 r = 0;
    for (int p = 0; p < 4; p++) begin
      int   byte_v = int'((x >> (24 - 8 * p)) & 32'hFF);
      int   which  = (p == 4 - k) ? 2 : 1;     // G: S1 except one S2
      if (kind == 1) which = 3 - which;        // H: mirror
      r ^= ref_sbox(which, byte_v);
    end
    return r;
  endfunction

  // F on v[0..5] = a..f, in place.
  function automatic void ref_f(ref u32 v [6]);
    u32 a, b, c, d, e, f;
    a = v[0]; b = v[1]; c = v[2]; d = v[3]; e = v[4]; f = v[5];
    b = a ^ b;  d = c ^ d;  f = e ^ f;
    c = c + b;  e = e + d;  a = a + f;
    d = d ^ ref_gh(0, 1, a);
    f = f ^ ref_gh(0, 2, c);
    b = b ^ ref_gh(0, 3, e);
    a = a ^ ref_gh(1, 1, b);
    c = c ^ ref_gh(1, 2, d);
    e = e ^ ref_gh(1, 3, f);
    d = d + a;  f = f + c;  b = b + e;
    c = c ^ b;  e = e ^ d;  a = a ^ f;
    v[0] = a; v[1] = b; v[2] = c; v[3] = d; v[4] = e; v[5] = f;
  endfunction

  // State as 32 words st[0..31] (st[0] = B0 = top word of W0). key/iv as
  // 4 words each, word 0 most significant.
  function automatic void ref_r1(input u32 k [4], input u32 iv [4], ref u32 st [32],
                                 ref u64 m);
    u32 ks [4], ivs [4];
    ks  = '{k[2], k[3], k[0], k[1]};
    ivs = '{iv[2], iv[3], iv[0], iv[1]};
    for (int j = 0; j < 4; j++) begin
      st[0*4+j] = k[j];
      st[1*4+j] = ks[j] ^ ivs[j];
      st[2*4+j] = iv[j];
      st[3*4+j] = k[j] ^ ivs[j];
      st[4*4+j] = ks[j];
      st[5*4+j] = k[j] ^ iv[j];
      st[6*4+j] = ivs[j];
      st[7*4+j] = ks[j] ^ iv[j];
    end
    m = 64'h0000447261676F6E;
  endfunction

  function automatic void ref_init_round(ref u32 st [32], ref u64 m);
    u32 v [6];
    u32 nw [4];
    for (int j = 0; j < 4; j++) v[j] = st[j] ^ st[24+j] ^ st[28+j];
    v[4] = u32'(m >> 32);
    v[5] = u32'(m);
    ref_f(v);
    for (int j = 0; j < 4; j++) nw[j] = v[j] ^ st[16+j];
    for (int i = 31; i >= 4; i--) st[i] = st[i-4];
    for (int j = 0; j < 4; j++) st[j] = nw[j];
    m = {v[4], v[5]};
  endfunction

  // Returns the keystream word of the current state, then steps the state.
  function automatic u64 ref_gen_step(ref u32 st [32], ref u64 m);
    u32 v [6];
    v = '{st[0], st[9], st[16], st[19], st[30] ^ u32'(m >> 32), st[31] ^ u32'(m)};
    ref_f(v);
    for (int i = 31; i >= 2; i--) st[i] = st[i-2];
    st[0] = v[1];
    st[1] = v[2];
    m = m + 1;
    return {v[0], v[4]};
  endfunction

endpackage
