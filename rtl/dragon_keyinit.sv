// Dragon key/IV setup: sixteen iterations of the F-function over W0..W7.
//
// On start the block loads the state formed by R1 from key and iv and sets M
// to its initial constant. Each following clock performs one iteration:
//   a||b||c||d = W0 ^ W6 ^ W7,   e||f = M
//   (a',b',c',d',e',f') = F(a,b,c,d,e,f)
//   W0..W7 <= ((a'||b'||c'||d') ^ W4) | W0..W6     (state shifts by one word)
//   M <= e'||f'
// A 5-bit counter loaded with 16 counts the iterations down; when it reaches
// zero, done pulses for one cycle and w_out/m_out hold the final state.
//
// Timing: start is sampled at a rising edge (load), the sixteen iterations
// take the next sixteen edges, and done is high in the cycle after the last
// one: 17 clock cycles from start to done. busy is high from the load until
// the last iteration. A start while busy restarts the setup.
// The iteration itself follows the cipher; one iteration per clock, the
// start/busy/done handshake and the synchronous active-low reset are this
// design's choices.
module dragon_keyinit
  import dragon_pkg::*;
#(
  parameter string S1_FILE = "",
  parameter string S2_FILE = ""
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  qword_t  key,
  input  qword_t  iv,
  output logic    busy,
  output logic    done,
  output wstate_t w_out,
  output dword_t  m_out
);

  wstate_t    w_q, w_r1;
  dword_t     m_q, m_r1;
  logic [4:0] cnt_q;

  qword_t abcd;
  word_t  a_o, b_o, c_o, d_o, e_o, f_o;

  dragon_r1 u_r1 (.key(key), .iv(iv), .w(w_r1), .m(m_r1));

  assign abcd = w_q[0] ^ w_q[6] ^ w_q[7];

  dragon_f #(.S1_FILE(S1_FILE), .S2_FILE(S2_FILE)) u_f (
    .a(abcd[127:96]), .b(abcd[95:64]), .c(abcd[63:32]), .d(abcd[31:0]),
    .e(m_q[63:32]),   .f(m_q[31:0]),
    .a_o(a_o), .b_o(b_o), .c_o(c_o), .d_o(d_o), .e_o(e_o), .f_o(f_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_q   <= '0;
      m_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        w_q   <= w_r1;
        m_q   <= m_r1;
        cnt_q <= 5'(INIT_ROUNDS);
        busy  <= 1'b1;
      end else if (busy) begin
        w_q   <= {({a_o, b_o, c_o, d_o} ^ w_q[4]), w_q[0:6]};
        m_q   <= {e_o, f_o};
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign w_out = w_q;
  assign m_out = m_q;

  a_done_ends_setup: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy);
  a_count_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (cnt_q != 5'd0));

endmodule
