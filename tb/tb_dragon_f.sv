// Testbench for dragon_f: compares all six outputs of the F-function with the
// reference model for directed and random inputs.
module tb_dragon_f;
  import dragon_pkg::*;
  import dragon_ref_pkg::*;

  word_t in_v [6];
  word_t out_v [6];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dragon_f u_dut (
    .a(in_v[0]), .b(in_v[1]), .c(in_v[2]), .d(in_v[3]), .e(in_v[4]), .f(in_v[5]),
    .a_o(out_v[0]), .b_o(out_v[1]), .c_o(out_v[2]), .d_o(out_v[3]), .e_o(out_v[4]),
    .f_o(out_v[5])
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(u32 v [6]);
    u32 r [6];
    r = v;
    ref_f(r);
    for (int n = 0; n < 6; n++) in_v[n] = v[n];
    @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      checks++;
      if (out_v[n] !== r[n]) begin
        failures++;
        $display("output %0d: got %h expected %h", n, out_v[n], r[n]);
      end
    end
  endtask

  initial begin
    u32 v [6];
    v = '{0, 0, 0, 0, 0, 0};
    check_one(v);
    v = '{32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF};
    check_one(v);
    repeat (2000) begin
      foreach (v[n]) v[n] = $urandom;
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
