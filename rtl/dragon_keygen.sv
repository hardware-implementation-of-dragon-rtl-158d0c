// Dragon keystream generator: one 64-bit keystream word per iteration.
//
// load copies the final setup state (B0..B31 = W0..W7) and counter M into the
// 1024-bit state register and marks the keystream valid; clear invalidates it
// (used when a new key setup begins). While valid, ks shows the current word
//   (a',b',c',d',e',f') = F(R2(B, M)),   ks = a'||e'
// combinationally, and advance performs the iteration:
//   B0 <= b', B1 <= c', Bi <= B(i-2) for 2<=i<=31,  M <= M + 1
// so a new word is available every clock while advance is held.
// The iteration follows the cipher; producing the word combinationally from
// the registered state and the load/clear/advance control are this design's
// choices.
module dragon_keygen
  import dragon_pkg::*;
#(
  parameter string S1_FILE = "",
  parameter string S2_FILE = ""
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic    clear,
  input  bstate_t b_in,
  input  dword_t  m_in,
  input  logic    advance,
  output logic    ks_valid,
  output dword_t  ks,
  output dword_t  m_out
);

  bstate_t b_q;
  dword_t  m_q;
  word_t   a, b, c, d, e, f;
  word_t   a_o, b_o, c_o, d_o, e_o, f_o;

  dragon_r2 u_r2 (.b_st(b_q), .m(m_q), .a(a), .b(b), .c(c), .d(d), .e(e), .f(f));

  dragon_f #(.S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_f (
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f),
    .a_o(a_o), .b_o(b_o), .c_o(c_o), .d_o(d_o), .e_o(e_o), .f_o(f_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_q      <= '0;
      m_q      <= '0;
      ks_valid <= 1'b0;
    end else if (load) begin
      b_q      <= b_in;
      m_q      <= m_in;
      ks_valid <= 1'b1;
    end else if (clear) begin
      ks_valid <= 1'b0;
    end else if (advance && ks_valid) begin
      b_q <= {b_o, c_o, b_q[0:29]};
      m_q <= m_q + 64'd1;
    end
  end

  assign ks    = {a_o, e_o};
  assign m_out = m_q;

  // c' and d', f' are not used by keystream generation.
  logic unused;
  assign unused = ^{d_o, f_o};

endmodule
