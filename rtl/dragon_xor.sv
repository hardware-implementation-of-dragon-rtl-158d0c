// Keystream combiner: encrypts or decrypts 64-bit data words.
//
// A word on in_data is accepted when in_valid and ks_valid are both high
// (in_ready = ks_valid); it is XORed with the current keystream word and the
// result appears on out_data with out_valid one clock later. Accepting a word
// pulses ks_advance so the generator moves to the next keystream word.
// Encryption and decryption are the same operation. Throughput is one 64-bit
// word per clock; the output has no back-pressure. The XOR with the keystream
// follows the cipher's use; the handshake is this design's choice.
module dragon_xor
  import dragon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  dword_t in_data,
  input  logic   ks_valid,
  input  dword_t ks,
  output logic   ks_advance,
  output logic   out_valid,
  output dword_t out_data
);

  assign in_ready   = ks_valid;
  assign ks_advance = in_valid && ks_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= ks_advance;
      if (ks_advance) out_data <= in_data ^ ks;
    end
  end

  a_advance_needs_keystream: assert property (@(posedge clk) disable iff (!rst_n)
    ks_advance |-> ks_valid);

endmodule
