// Testbench for dragon_sbox: reads all 256 entries of S1 and of S2 and
// compares them with the reference fill; also checks that the two tables
// differ. Self-checking, ends with a TB_RESULT line.
module tb_dragon_sbox;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  logic [7:0] addr;
  word_t      d1, d2;
  int checks = 0, failures = 0, same = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dragon_sbox #(.SEL(SBOX_S1)) u_s1 (.addr(addr), .data(d1));
  dragon_sbox #(.SEL(SBOX_S2)) u_s2 (.addr(addr), .data(d2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      @(posedge clk);
      checks += 2;
      if (d1 !== ref_sbox(1, i)) begin
        failures++;
        $display("S1[%0d] = %h, expected %h", i, d1, ref_sbox(1, i));
      end
      if (d2 !== ref_sbox(2, i)) begin
        failures++;
        $display("S2[%0d] = %h, expected %h", i, d2, ref_sbox(2, i));
      end
      if (d1 == d2) same++;
    end
    checks++;
    if (same > 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
