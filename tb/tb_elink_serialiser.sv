// tb_elink_serialiser: random e-link words every 8 cycles; checks that the
// seven pair words appear in order one to seven cycles after the strobe,
// with the right pair index, and that the eighth cycle carries nothing.
`timescale 1ns/1ps
module tb_elink_serialiser;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic bx_strobe = 0;
  logic [13:0][31:0] elink_data = '0, sent;
  logic out_valid;
  logic [63:0] out_data;
  logic [2:0] out_pair;
  int checks = 0, failures = 0;

  elink_serialiser dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!out_valid, "idle after reset");
    for (int f = 0; f < 200; f++) begin
      for (int i = 0; i < 14; i++) elink_data[i] = $urandom();
      sent = elink_data;
      bx_strobe = 1;
      @(negedge clk);
      bx_strobe = 0;
      elink_data = '0;
      for (int p = 0; p < 7; p++) begin
        check(out_valid, "valid during frame");
        check(out_pair == 3'(p), "pair index");
        check(out_data == {sent[2*p+1], sent[2*p]}, $sformatf("frame %0d pair %0d data", f, p));
        @(negedge clk);
      end
      check(!out_valid, "eighth cycle empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
