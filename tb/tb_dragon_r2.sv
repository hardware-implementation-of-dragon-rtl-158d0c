// Testbench for dragon_r2: checks the six F-function inputs taken from the
// 32-word state and the counter.
module tb_dragon_r2;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  bstate_t st;
  dword_t  m;
  word_t   o [6];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dragon_r2 u_dut (.b_st(st), .m(m), .a(o[0]), .b(o[1]), .c(o[2]), .d(o[3]),
                   .e(o[4]), .f(o[5]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u32 w [32];
    u32 e [6];
    logic [1023:0] flat;
    repeat (500) begin
      foreach (w[i]) w[i] = $urandom;
      for (int i = 0; i < 32; i++) flat[1023-32*i -: 32] = w[i];
      st = flat;
      m  = {$urandom, $urandom};
      e  = '{w[0], w[9], w[16], w[19], w[30] ^ m[63:32], w[31] ^ m[31:0]};
      @(posedge clk);
      for (int n = 0; n < 6; n++) begin
        checks++;
        if (o[n] !== e[n]) begin
          failures++;
          $display("tap %0d: got %h expected %h", n, o[n], e[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
