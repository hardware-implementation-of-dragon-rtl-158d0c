// Testbench for dragon_keygen: loads random states and counters, advances the
// generator with random gaps and compares every keystream word, the counter
// and the valid flag with the reference model; checks clear and reload.
module tb_dragon_keygen;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  logic    clk = 0, rst_n = 0, load = 0, clear = 0, advance = 0;
  bstate_t b_in;
  dword_t  m_in;
  logic    ks_valid;
  dword_t  ks, m_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dragon_keygen u_dut (.clk(clk), .rst_n(rst_n), .load(load), .clear(clear),
                       .b_in(b_in), .m_in(m_in), .advance(advance),
                       .ks_valid(ks_valid), .ks(ks), .m_out(m_out));

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic run_stream(int words);
    u32 st [32];
    u64 m;
    u64 k_exp;
    logic [1023:0] flat;
    foreach (st[i]) st[i] = $urandom;
    m = {$urandom, $urandom};
    if (words % 2 == 0) m = 64'hFFFF_FFFF_FFFF_FFFE;   // carry across 32 and 64 bits
    for (int i = 0; i < 32; i++) flat[1023-32*i -: 32] = st[i];
    b_in = flat; m_in = m; load = 1;
    @(posedge clk); #1 load = 0;
    expect_eq(ks_valid === 1'b1, "valid after load");
    for (int n = 0; n < words; n++) begin
      // hold off advance for a random number of cycles: output must not move
      int gap = $urandom_range(0, 2);
      advance = 0;
      repeat (gap) begin
        @(posedge clk); #1;
      end
      k_exp = ref_gen_step(st, m);
      expect_eq(ks === k_exp, $sformatf("word %0d got %h expected %h", n, ks, k_exp));
      advance = 1;
      @(posedge clk); #1;
      expect_eq(m_out === m, $sformatf("M got %h expected %h", m_out, m));
    end
    advance = 0;
    clear = 1;
    @(posedge clk); #1 clear = 0;
    expect_eq(ks_valid === 1'b0, "clear drops valid");
    advance = 1;
    @(posedge clk); #1 advance = 0;
    expect_eq(m_out === m, "no advance while invalid");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_eq(ks_valid === 1'b0, "invalid after reset");
    for (int r = 0; r < 8; r++) run_stream(40 + r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
