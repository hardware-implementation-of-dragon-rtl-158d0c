// Testbench for dragon_keyinit: runs complete key/IV setups and compares the
// final W0..W7 and M with the reference model after sixteen iterations.
// Checks the latency (done exactly 17 cycles after the start edge), that
// done is a single-cycle pulse, busy, and that a start during a setup
// restarts it.
module tb_dragon_keyinit;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  logic    clk = 0, rst_n = 0, start = 0;
  qword_t  key, iv;
  logic    busy, done;
  wstate_t w_out;
  dword_t  m_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dragon_keyinit u_dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .iv(iv),
                        .busy(busy), .done(done), .w_out(w_out), .m_out(m_out));

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run_setup(qword_t k_v, qword_t iv_v, int abort_after);
    u32 k [4], ivw [4], st [32];
    u64 m_exp;
    logic [1023:0] flat;
    int cyc;
    for (int j = 0; j < 4; j++) begin
      k[j]   = k_v[127-32*j -: 32];
      ivw[j] = iv_v[127-32*j -: 32];
    end
    ref_r1(k, ivw, st, m_exp);
    for (int r = 0; r < 16; r++) ref_init_round(st, m_exp);
    if (abort_after > 0) begin
      // start a setup with a different key and abandon it part way
      key = ~k_v; iv = iv_v; start = 1;
      @(posedge clk); #1 start = 0;
      repeat (abort_after) @(posedge clk);
      #1;
    end
    key = k_v; iv = iv_v; start = 1;
    @(posedge clk); #1 start = 0;
    expect_eq(busy === 1'b1, "busy after start");
    cyc = 0;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    expect_eq(cyc == 16, $sformatf("done %0d cycles after the load edge, expected 16", cyc));
    expect_eq(busy === 1'b0, "busy low at done");
    flat = w_out;
    for (int i = 0; i < 32; i++)
      expect_eq(flat[1023-32*i -: 32] === st[i],
                $sformatf("B%0d got %h expected %h", i, flat[1023-32*i -: 32], st[i]));
    expect_eq(m_out === m_exp, $sformatf("M got %h expected %h", m_out, m_exp));
    @(posedge clk); #1;
    expect_eq(done === 1'b0, "done is a single pulse");
    expect_eq(w_out === flat, "state held after done");
  endtask

  initial begin
    key = '0; iv = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_eq(busy === 1'b0 && done === 1'b0, "idle after reset");
    run_setup(128'h0000_1111_2222_3333_4444_5555_6666_7777,
              128'h0000_1111_2222_3333_4444_5555_6666_7777, 0);
    run_setup(128'h0, 128'h0, 0);
    run_setup({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom}, 5);
    repeat (10) run_setup({$urandom, $urandom, $urandom, $urandom},
                          {$urandom, $urandom, $urandom, $urandom}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
