// tb_elink_tagger: random e-link maps and random pair words; checks the
// registered per-half valid bits and ECON-D ids one cycle later.
`timescale 1ns/1ps
module tb_elink_tagger;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic [13:0] elink_en = '0;
  logic [13:0][3:0] elink_id = '0;
  logic in_valid = 0;
  logic [63:0] in_data = '0, out_data;
  logic [2:0] in_pair = '0;
  logic [1:0] out_valid;
  logic [1:0][3:0] out_id;
  int checks = 0, failures = 0;
  logic [63:0] e_data; logic [1:0] e_valid; logic [1:0][3:0] e_id;

  elink_tagger dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      if (t % 100 == 0) for (int i = 0; i < 14; i++) begin
        elink_en[i] = $urandom_range(0, 3) != 0;
        elink_id[i] = 4'($urandom_range(0, 11));
      end
      in_valid = $urandom_range(0, 4) != 0;
      in_pair  = 3'($urandom_range(0, 6));
      in_data  = {$urandom(), $urandom()};
      e_data = in_data;
      for (int h = 0; h < 2; h++) begin
        e_valid[h] = in_valid && elink_en[2*in_pair+h];
        e_id[h]    = elink_id[2*in_pair+h];
      end
      @(negedge clk);
      checks++;
      if (out_valid !== e_valid || out_data !== e_data ||
          (e_valid[0] && out_id[0] != e_id[0]) || (e_valid[1] && out_id[1] != e_id[1])) begin
        failures++;
        $display("FAIL: t=%0d valid %b/%b id %h/%h", t, out_valid, e_valid, out_id, e_id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
