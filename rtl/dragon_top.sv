// Dragon stream cipher core: key/IV setup, keystream generation and the
// XOR combiner that encrypts or decrypts data with the keystream.
//
// Operation: pulse init_start with key and iv stable. The setup block loads
// the R1 state and runs sixteen F-function iterations (init_busy is high); on
// completion its final W0..W7 and M are copied into the keystream generator,
// and ks_ready rises 18 cycles after the init_start edge. From then on every
// data word accepted (data_in_valid && data_in_ready) is XORed with the next
// 64-bit keystream word and leaves on data_out one clock later with
// data_out_valid: one word per clock, and the generator only advances on an
// accepted word, so pauses in the input stall it without losing keystream.
// A new init_start at any time discards the running keystream and re-keys.
// keystream shows the word the next accepted data word will be XORed with.
// The same core serves as sender (plaintext in) and receiver (ciphertext in).
//
// Two separate F-function instances, one in the setup block and one in the
// generator, follow the two-block structure of the described hardware. The
// data handshake and the reset are this design's choices.
module dragon_top
  import dragon_pkg::*;
#(
  parameter string S1_FILE = "",
  parameter string S2_FILE = ""
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init_start,
  input  qword_t key,
  input  qword_t iv,
  output logic   init_busy,
  output logic   ks_ready,
  output dword_t keystream,
  input  logic   data_in_valid,
  output logic   data_in_ready,
  input  dword_t data_in,
  output logic   data_out_valid,
  output dword_t data_out
);

  wstate_t w_final;
  dword_t  m_final;
  logic    init_done;
  logic    ks_valid, ks_advance;
  dword_t  ks, m_gen;

  dragon_keyinit #(.S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_keyinit (
    .clk(clk), .rst_n(rst_n), .start(init_start), .key(key), .iv(iv),
    .busy(init_busy), .done(init_done), .w_out(w_final), .m_out(m_final)
  );

  dragon_keygen #(.S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_keygen (
    .clk(clk), .rst_n(rst_n),
    .load(init_done && !init_start), .clear(init_start),
    .b_in(bstate_t'(w_final)), .m_in(m_final),
    .advance(ks_advance), .ks_valid(ks_valid), .ks(ks), .m_out(m_gen)
  );

  dragon_xor u_xor (
    .clk(clk), .rst_n(rst_n),
    .in_valid(data_in_valid), .in_ready(data_in_ready), .in_data(data_in),
    .ks_valid(ks_valid), .ks(ks), .ks_advance(ks_advance),
    .out_valid(data_out_valid), .out_data(data_out)
  );

  assign ks_ready  = ks_valid;
  assign keystream = ks;

  logic unused;
  assign unused = ^m_gen;

  // No keystream is offered while a setup is running.
  a_no_keystream_during_setup: assert property (@(posedge clk) disable iff (!rst_n)
    init_busy |-> !ks_ready);

endmodule
