// One of Dragon's six nonlinear 32x32 functions G1, G2, G3, H1, H2, H3.
//
// The 32-bit input is split into bytes x0 (bits 31:24) .. x3 (bits 7:0). Each
// byte indexes an 8x32 S-box and the four 32-bit results are XORed:
//   G1 = S1(x0)^S1(x1)^S1(x2)^S2(x3)   H1 = S2(x0)^S2(x1)^S2(x2)^S1(x3)
//   G2 = S1(x0)^S1(x1)^S2(x2)^S1(x3)   H2 = S2(x0)^S2(x1)^S1(x2)^S2(x3)
//   G3 = S1(x0)^S2(x1)^S1(x2)^S1(x3)   H3 = S2(x0)^S1(x1)^S2(x2)^S2(x3)
// Purely combinational. FN chooses the function; S1_FILE/S2_FILE are passed
// to the S-boxes (empty: built-in fill, see dragon_pkg).
// Taking x0 as the most significant byte is this design's reading of the
// byte numbering.
module dragon_gh
  import dragon_pkg::*;
#(
  parameter gh_fn_e FN      = FN_G1,
  parameter string  S1_FILE = "",
  parameter string  S2_FILE = ""
) (
  input  word_t x,
  output word_t y
);

  word_t part [4];

  for (genvar p = 0; p < 4; p++) begin : g_byte
    localparam sbox_sel_e SEL = gh_sbox(FN, p);
    dragon_sbox #(
      .SEL      (SEL),
      .INIT_FILE((SEL == SBOX_S1) ? S1_FILE : S2_FILE)
    ) u_sbox (
      .addr(x[31-8*p -: 8]),
      .data(part[p])
    );
  end

  assign y = part[0] ^ part[1] ^ part[2] ^ part[3];

endmodule
