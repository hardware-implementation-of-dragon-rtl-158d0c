// Dragon F-function: the cipher's update and filter function.
//
// Six 32-bit words a..f pass through three layers in one combinational path
// (all additions modulo 2^32):
//   pre-mixing   b1=a^b   d1=c^d   f1=e^f   c1=c+b1  e1=e+d1  a1=a+f1
//   S-box layer  d2=d1^G1(a1)  f2=f1^G2(c1)  b2=b1^G3(e1)
//                a2=a1^H1(b2)  c2=c1^H2(d2)  e2=e1^H3(f2)
//   post-mixing  d'=d2+a2  f'=f2+c2  b'=b2+e2  c'=c2^b'  e'=e2^d'  a'=a2^f'
// The layer structure and the placement of the G/H boxes follow the cipher's
// definition; producing all three layers within a single clock cycle (no
// pipeline registers) follows the described hardware.
module dragon_f
  import dragon_pkg::*;
#(
  parameter string S1_FILE = "",
  parameter string S2_FILE = ""
) (
  input  word_t a, b, c, d, e, f,
  output word_t a_o, b_o, c_o, d_o, e_o, f_o
);

  word_t a1, b1, c1, d1, e1, f1;
  word_t a2, b2, c2, d2, e2, f2;
  word_t g1, g2, g3, h1, h2, h3;

  // Pre-mixing
  always_comb begin
    b1 = a ^ b;
    d1 = c ^ d;
    f1 = e ^ f;
    c1 = c + b1;
    e1 = e + d1;
    a1 = a + f1;
  end

  dragon_gh #(.FN(FN_G1), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_g1 (.x(a1), .y(g1));
  dragon_gh #(.FN(FN_G2), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_g2 (.x(c1), .y(g2));
  dragon_gh #(.FN(FN_G3), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_g3 (.x(e1), .y(g3));
  dragon_gh #(.FN(FN_H1), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_h1 (.x(b2), .y(h1));
  dragon_gh #(.FN(FN_H2), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_h2 (.x(d2), .y(h2));
  dragon_gh #(.FN(FN_H3), .S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_h3 (.x(f2), .y(h3));

  // S-box layer
  always_comb begin
    d2 = d1 ^ g1;
    f2 = f1 ^ g2;
    b2 = b1 ^ g3;
    a2 = a1 ^ h1;
    c2 = c1 ^ h2;
    e2 = e1 ^ h3;
  end

  // Post-mixing
  always_comb begin
    d_o = d2 + a2;
    f_o = f2 + c2;
    b_o = b2 + e2;
    c_o = c2 ^ b_o;
    e_o = e2 ^ d_o;
    a_o = a2 ^ f_o;
  end

endmodule
