// Testbench for dragon_xor: feeds data words against a keystream source
// modelled in the testbench (a counter-driven pattern that only steps on
// ks_advance), with random input gaps and keystream-not-ready periods.
// Checks data_out = data_in ^ keystream, the one-cycle latency, in_ready and
// that no word is accepted while the keystream is not valid.
module tb_dragon_xor;
  import dragon_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0, in_ready, ks_valid = 0, ks_advance, out_valid;
  dword_t in_data = '0, ks, out_data;
  dword_t ks_idx = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // keystream source model
  assign ks = {ks_idx[31:0] * 32'h9E37_79B9, ~ks_idx[31:0]};
  always_ff @(posedge clk) if (ks_advance) ks_idx <= ks_idx + 1;

  dragon_xor u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                    .in_data(in_data), .ks_valid(ks_valid), .ks(ks),
                    .ks_advance(ks_advance), .out_valid(out_valid), .out_data(out_data));

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

  initial begin
    dword_t exp_q [$];
    dword_t idx_model = 0;
    dword_t k, e;
    int accepted = 0, blocked = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      ks_valid = ($urandom_range(0, 4) != 0);
      in_data  = {$urandom, $urandom};
      #1;
      expect_eq(in_ready === ks_valid, "in_ready follows ks_valid");
      if (in_valid && ks_valid) begin
        k = {idx_model[31:0] * 32'h9E37_79B9, ~idx_model[31:0]};
        exp_q.push_back(in_data ^ k);
        idx_model++;
        accepted++;
      end else if (in_valid) blocked++;
      @(posedge clk); #1;
      if (exp_q.size() > 0 && out_valid) begin
        e = exp_q.pop_front();
        expect_eq(out_data === e, $sformatf("out %h expected %h", out_data, e));
      end
      expect_eq(exp_q.size() == 0, "output one cycle after acceptance");
    end
    expect_eq(accepted > 100 && blocked > 10, "both accept and block seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
