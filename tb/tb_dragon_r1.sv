// Testbench for dragon_r1: checks the starting state W0..W7 and counter M
// formed from key and IV against the reference layout.
module tb_dragon_r1;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  qword_t  key, iv;
  wstate_t w;
  dword_t  m;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dragon_r1 u_dut (.key(key), .iv(iv), .w(w), .m(m));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(qword_t k_v, qword_t iv_v);
    u32 k [4], ivw [4], st [32];
    u64 m_exp;
    logic [1023:0] flat;
    for (int j = 0; j < 4; j++) begin
      k[j]   = k_v[127-32*j -: 32];
      ivw[j] = iv_v[127-32*j -: 32];
    end
    ref_r1(k, ivw, st, m_exp);
    key = k_v;
    iv  = iv_v;
    @(posedge clk);
    flat = w;
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (flat[1023-32*i -: 32] !== st[i]) begin
        failures++;
        $display("B%0d: got %h expected %h", i, flat[1023-32*i -: 32], st[i]);
      end
    end
    checks++;
    if (m !== m_exp) begin
      failures++;
      $display("M: got %h expected %h", m, m_exp);
    end
  endtask

  initial begin
    check_one(128'h0000_1111_2222_3333_4444_5555_6666_7777,
              128'h0000_1111_2222_3333_4444_5555_6666_7777);
    check_one(128'h0, 128'hFFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF);
    repeat (200) check_one({$urandom, $urandom, $urandom, $urandom},
                           {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
