// End-to-end testbench for dragon_top at its default parameters.
//
// Two cores share a key and IV: the sender encrypts, the receiver decrypts
// the ciphertext it gets from the sender. Every ciphertext word is compared
// with a reference computation of the whole cipher (R1, sixteen setup
// iterations, keystream iterations); every recovered word with the original
// plaintext. Scenarios: the 128-bit key/IV 0x00001111...7777 for both; a
// 48-byte message (six words) sent back to back, checking one word per clock;
// long messages with random input gaps (generator stalls); data offered
// before the keystream is ready (blocked); and a re-key in the middle of a
// stream. The latency from init_start to ks_ready is checked (17 cycles).
// Each mechanism is counted and a failure is counted for any that never
// occurred.
module tb_dragon_top;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // sender
  logic   s_start = 0, s_busy, s_ready, s_in_valid = 0, s_in_ready, s_out_valid;
  qword_t s_key = '0, s_iv = '0;
  dword_t s_ks, s_in = '0, s_out;
  // receiver
  logic   r_start = 0, r_busy, r_ready, r_in_valid = 0, r_in_ready, r_out_valid;
  qword_t r_key = '0, r_iv = '0;
  dword_t r_ks, r_in = '0, r_out;

  dragon_top u_tx (.clk(clk), .rst_n(rst_n), .init_start(s_start), .key(s_key), .iv(s_iv),
                   .init_busy(s_busy), .ks_ready(s_ready), .keystream(s_ks),
                   .data_in_valid(s_in_valid), .data_in_ready(s_in_ready), .data_in(s_in),
                   .data_out_valid(s_out_valid), .data_out(s_out));

  dragon_top u_rx (.clk(clk), .rst_n(rst_n), .init_start(r_start), .key(r_key), .iv(r_iv),
                   .init_busy(r_busy), .ks_ready(r_ready), .keystream(r_ks),
                   .data_in_valid(r_in_valid), .data_in_ready(r_in_ready), .data_in(r_in),
                   .data_out_valid(r_out_valid), .data_out(r_out));

  int checks = 0, failures = 0;
  int n_setup = 0, n_rounds = 0, n_enc = 0, n_dec = 0, n_stall = 0, n_blocked = 0;
  int n_rekey = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (s_busy) n_rounds++;
    if (s_ready && !s_in_valid) n_stall++;
    if (!s_ready && s_in_valid) n_blocked++;
  end

  // reference keystream for a key/IV: first n words
  task automatic ref_stream(qword_t k_v, qword_t iv_v, int n, ref u64 ks_q [$]);
    u32 k [4], ivw [4], st [32];
    u64 m;
    for (int j = 0; j < 4; j++) begin
      k[j]   = k_v[127-32*j -: 32];
      ivw[j] = iv_v[127-32*j -: 32];
    end
    ref_r1(k, ivw, st, m);
    for (int r = 0; r < 16; r++) ref_init_round(st, m);
    ks_q.delete();
    for (int i = 0; i < n; i++) ks_q.push_back(ref_gen_step(st, m));
  endtask

  // key setup on the sender; returns the cycles from the start edge to ks_ready
  task automatic setup_tx(qword_t k_v, qword_t iv_v, output int lat);
    s_key = k_v; s_iv = iv_v; s_start = 1;
    @(posedge clk); #1 s_start = 0;
    n_setup++;
    lat = 0;
    while (!s_ready) begin
      @(posedge clk); #1;
      lat++;
    end
  endtask

  task automatic setup_rx(qword_t k_v, qword_t iv_v);
    r_key = k_v; r_iv = iv_v; r_start = 1;
    @(posedge clk); #1 r_start = 0;
    while (!r_ready) begin
      @(posedge clk); #1;
    end
  endtask

  // sender: encrypt n words; max_gap = 0 sends back to back
  task automatic encrypt(input u64 pt [$], input u64 ks_q [$], input int max_gap,
                         ref u64 ct [$], output int cycles);
    int sent = 0;
    u64 exp_q [$];
    ct.delete();
    cycles = 0;
    while (ct.size() < pt.size()) begin
      if (sent < pt.size() && ($urandom_range(0, max_gap) == 0)) begin
        s_in_valid = 1; s_in = pt[sent];
      end else s_in_valid = 0;
      #1;
      if (s_in_valid && s_in_ready) begin
        expect_eq(s_ks === ks_q[sent],
                  $sformatf("keystream word %0d %h expected %h", sent, s_ks, ks_q[sent]));
        exp_q.push_back(pt[sent] ^ ks_q[sent]);
        sent++;
      end
      @(posedge clk); #1;
      cycles++;
      s_in_valid = 0;
      if (s_out_valid) begin
        u64 e = exp_q.pop_front();
        expect_eq(s_out === e, $sformatf("ciphertext %h expected %h", s_out, e));
        ct.push_back(s_out);
        n_enc++;
      end
    end
  endtask

  // receiver: decrypt and compare with the plaintext
  task automatic decrypt(input u64 ct [$], input u64 pt [$], input int max_gap);
    int sent = 0, got = 0;
    while (got < ct.size()) begin
      if (sent < ct.size() && ($urandom_range(0, max_gap) == 0)) begin
        r_in_valid = 1; r_in = ct[sent];
      end else r_in_valid = 0;
      #1;
      if (r_in_valid && r_in_ready) sent++;
      @(posedge clk); #1;
      r_in_valid = 0;
      if (r_out_valid) begin
        expect_eq(r_out === pt[got], $sformatf("plaintext %0d %h expected %h", got, r_out, pt[got]));
        got++;
        n_dec++;
      end
    end
  endtask

  initial begin
    u64 ks_q [$], pt [$], ct [$];
    qword_t k_v, iv_v;
    int lat, cyc;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // data offered before any key setup must be held off
    s_in_valid = 1; s_in = 64'h1234;
    repeat (3) @(posedge clk);
    #1 expect_eq(s_out_valid === 1'b0, "nothing accepted before setup");
    s_in_valid = 0;

    // 1) the key/IV 0x00001111222233334444555566667777, 48-byte message
    k_v  = 128'h0000_1111_2222_3333_4444_5555_6666_7777;
    iv_v = 128'h0000_1111_2222_3333_4444_5555_6666_7777;
    ref_stream(k_v, iv_v, 6, ks_q);
    pt.delete();
    for (int i = 0; i < 6; i++) pt.push_back({$urandom, $urandom});
    setup_tx(k_v, iv_v, lat);
    expect_eq(lat == 17, $sformatf("setup latency %0d cycles, expected 17", lat));
    encrypt(pt, ks_q, 0, ct, cyc);
    expect_eq(cyc == 6, $sformatf("48 bytes took %0d cycles, expected 6", cyc));
    setup_rx(k_v, iv_v);
    decrypt(ct, pt, 0);

    // 2) random keys, longer messages with gaps on both sides
    for (int t = 0; t < 4; t++) begin
      k_v  = {$urandom, $urandom, $urandom, $urandom};
      iv_v = {$urandom, $urandom, $urandom, $urandom};
      ref_stream(k_v, iv_v, 100, ks_q);
      pt.delete();
      for (int i = 0; i < 100; i++) pt.push_back({$urandom, $urandom});
      setup_tx(k_v, iv_v, lat);
      expect_eq(lat == 17, $sformatf("setup latency %0d", lat));
      encrypt(pt, ks_q, 2, ct, cyc);
      setup_rx(k_v, iv_v);
      decrypt(ct, pt, 3);
    end

    // 3) re-key in the middle of a stream: start a new setup while the
    //    sender still holds keystream, then use the new key
    k_v  = {$urandom, $urandom, $urandom, $urandom};
    iv_v = {$urandom, $urandom, $urandom, $urandom};
    s_key = ~k_v; s_iv = iv_v; s_start = 1;        // a setup that is abandoned
    @(posedge clk); #1 s_start = 0;
    repeat (7) @(posedge clk);
    #1;
    expect_eq(s_busy === 1'b1 && s_ready === 1'b0, "busy, no keystream during setup");
    n_rekey++;
    ref_stream(k_v, iv_v, 20, ks_q);
    pt.delete();
    for (int i = 0; i < 20; i++) pt.push_back({$urandom, $urandom});
    setup_tx(k_v, iv_v, lat);
    encrypt(pt, ks_q, 1, ct, cyc);
    setup_rx(k_v, iv_v);
    decrypt(ct, pt, 1);
    // re-key while ready and streaming
    s_in_valid = 1; s_in = 64'h0;
    #1;
    s_key = k_v ^ 128'h1; s_start = 1;
    @(posedge clk); #1 s_start = 0; s_in_valid = 0;
    @(posedge clk); #1;
    expect_eq(s_ready === 1'b0, "ks_ready drops on re-key");
    n_rekey++;
    while (!s_ready) begin
      @(posedge clk); #1;
    end
    n_setup++;
    ref_stream(k_v ^ 128'h1, iv_v, 10, ks_q);
    pt.delete();
    for (int i = 0; i < 10; i++) pt.push_back({$urandom, $urandom});
    encrypt(pt, ks_q, 0, ct, cyc);

    $display("mechanisms: setups=%0d setup_cycles=%0d encrypted=%0d decrypted=%0d stalls=%0d blocked=%0d rekeys=%0d",
             n_setup, n_rounds, n_enc, n_dec, n_stall, n_blocked, n_rekey);
    expect_eq(n_setup > 0,   "key setup happened");
    expect_eq(n_rounds >= 16, "setup iterations happened");
    expect_eq(n_enc > 0,     "encryption happened");
    expect_eq(n_dec > 0,     "decryption happened");
    expect_eq(n_stall > 0,   "generator stall happened");
    expect_eq(n_blocked > 0, "data blocked before keystream ready happened");
    expect_eq(n_rekey > 0,   "re-key happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
