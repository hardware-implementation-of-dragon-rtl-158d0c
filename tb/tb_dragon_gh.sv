// Testbench for dragon_gh: instantiates all six functions G1..G3, H1..H3 and
// compares each with the reference model on directed and random inputs.
module tb_dragon_gh;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  word_t x;
  word_t y [6];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dragon_gh #(.FN(FN_G1)) u_g1 (.x(x), .y(y[0]));
  dragon_gh #(.FN(FN_G2)) u_g2 (.x(x), .y(y[1]));
  dragon_gh #(.FN(FN_G3)) u_g3 (.x(x), .y(y[2]));
  dragon_gh #(.FN(FN_H1)) u_h1 (.x(x), .y(y[3]));
  dragon_gh #(.FN(FN_H2)) u_h2 (.x(x), .y(y[4]));
  dragon_gh #(.FN(FN_H3)) u_h3 (.x(x), .y(y[5]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(word_t v);
    x = v;
    @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      u32 exp_v = ref_gh(n / 3, n % 3 + 1, v);
      checks++;
      if (y[n] !== exp_v) begin
        failures++;
        $display("fn %0d x=%h: got %h expected %h", n, v, y[n], exp_v);
      end
    end
  endtask

  initial begin
    check_one(32'h0000_0000);
    check_one(32'hFFFF_FFFF);
    check_one(32'h0102_0304);
    check_one(32'h8000_0001);
    repeat (2000) check_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
