// tb_word_assembler: random tagged words; checks that only the words of the
// assembler's own ECON-D pass, packed to the low half, in e-link order.
`timescale 1ns/1ps
module tb_word_assembler;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic enable = 1;
  logic [3:0] econd_id = 4'd5;
  logic [63:0] in_data = '0, out_data;
  logic [1:0] in_valid = '0, out_cnt;
  logic [1:0][3:0] in_id = '0;
  int checks = 0, failures = 0;

  word_assembler dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w [$];
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t == 2000) enable = 0;
      in_data  = {$urandom(), $urandom()};
      in_valid = 2'($urandom());
      for (int h = 0; h < 2; h++) in_id[h] = ($urandom_range(0, 1) != 0) ? 4'd5 : 4'($urandom_range(0, 11));
      exp_w.delete();
      for (int h = 0; h < 2; h++)
        if (enable && in_valid[h] && in_id[h] == 4'd5) exp_w.push_back(in_data[32*h +: 32]);
      @(negedge clk);
      checks++;
      if (out_cnt != 2'(exp_w.size()) ||
          (exp_w.size() > 0 && out_data[31:0] != exp_w[0]) ||
          (exp_w.size() > 1 && out_data[63:32] != exp_w[1])) begin
        failures++;
        $display("FAIL: t=%0d cnt %0d expected %0d", t, out_cnt, exp_w.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
