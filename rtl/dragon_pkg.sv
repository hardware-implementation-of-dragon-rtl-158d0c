// Shared types, constants and helper functions of the Dragon stream cipher core.
//
// Dragon keeps a 1024-bit internal state. During key/IV setup it is seen as
// eight 128-bit words W0..W7; during keystream generation as thirty-two 32-bit
// words B0..B31, where B0 is the most significant 32 bits of W0 and B31 the
// least significant 32 bits of W7. A 64-bit counter M runs alongside the state.
// Concatenation x||y puts x in the more significant bits throughout.
//
// The S-box contents: Dragon's filter uses two 8x32-bit S-boxes S1 and S2.
// Their published contents are not reproduced here. sbox_value() fills them
// from a fixed 32-bit integer hash (a bijective xorshift-multiply mix) so the
// core is complete and testable; the S-box module can load the published
// tables from hex files instead (see dragon_sbox). Until it does, the
// keystream is Dragon-structured but is not the standard Dragon keystream.
package dragon_pkg;

  typedef logic [31:0]  word_t;   // B-word and F-function operand
  typedef logic [63:0]  dword_t;  // counter M, keystream output k
  typedef logic [127:0] qword_t;  // W-word, key, IV

  // The 1024-bit state in its two views. Both are packed with an ascending
  // index so that element 0 (W0 or B0) is the most significant part and the
  // two views are the same 1024 bits: bstate_t'(w) turns W0..W7 into B0..B31.
  typedef qword_t [0:7]  wstate_t;
  typedef word_t  [0:31] bstate_t;

  // Number of key/IV setup iterations (steps 3-8 repeated sixteen times).
  localparam int unsigned INIT_ROUNDS = 16;

  // Initial value of the counter M for key setup: the ASCII text "Dragon".
  localparam dword_t M_INIT = 64'h0000_4472_6167_6F6E;

  // Which S-box a G/H lookup uses.
  typedef enum logic { SBOX_S1 = 1'b0, SBOX_S2 = 1'b1 } sbox_sel_e;

  // The six 32x32 functions built from S1 and S2.
  typedef enum logic [2:0] { FN_G1, FN_G2, FN_G3, FN_H1, FN_H2, FN_H3 } gh_fn_e;

  // Which S-box serves byte position p (0 = most significant byte) of fn.
  // G_k uses S1 on three bytes and S2 on byte 4-k; H_k is the mirror image.
  function automatic sbox_sel_e gh_sbox(gh_fn_e fn, int unsigned p);
    int unsigned odd_pos;
    logic        is_g;
    unique case (fn)
      FN_G1: begin odd_pos = 3; is_g = 1'b1; end
      FN_G2: begin odd_pos = 2; is_g = 1'b1; end
      FN_G3: begin odd_pos = 1; is_g = 1'b1; end
      FN_H1: begin odd_pos = 3; is_g = 1'b0; end
      FN_H2: begin odd_pos = 2; is_g = 1'b0; end
      default: begin odd_pos = 1; is_g = 1'b0; end
    endcase
    if (is_g) return (p == odd_pos) ? SBOX_S2 : SBOX_S1;
    else      return (p == odd_pos) ? SBOX_S1 : SBOX_S2;
  endfunction

  // Fill value of entry x of S-box sel (see the note at the top).
  function automatic word_t sbox_value(sbox_sel_e sel, logic [7:0] x);
    word_t h;
    h = {24'h0, x} ^ ((sel == SBOX_S1) ? 32'h9E37_79B9 : 32'h85EB_CA6B);
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // x' : exchange the upper and lower 64-bit halves of a 128-bit word.
  function automatic qword_t swap_halves(qword_t x);
    return {x[63:0], x[127:64]};
  endfunction

endpackage
