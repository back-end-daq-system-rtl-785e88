// tb_timestamp_counters: drives bunch-crossing strobes with bc0 at every
// orbit start (and some orbits without bc0, to exercise the wrap), random
// L1As, and occasional orbit/event counter resets; compares each L1A
// timestamp with a reference count kept in the testbench.
`timescale 1ns/1ps
module tb_timestamp_counters;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic bx_strobe = 0, bc0 = 0, l1a = 0, ocr = 0, ecr = 0, l1a_valid;
  timestamp_t l1a_ts, now;
  int checks = 0, failures = 0, n_l1a = 0;

  timestamp_counters dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r_bx, r_orbit, r_evt;
    r_bx = -1; r_orbit = 0; r_evt = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 3564 * 12 + 100; b++) begin
      bit use_bc0;
      use_bc0 = (b % 3564 == 0) && ((b / 3564) % 3 != 2);
      bx_strobe = 1;
      bc0 = use_bc0;
      l1a = $urandom_range(0, 40) == 0;
      ocr = (b == 3564 * 7 + 10);
      ecr = (b == 3564 * 5 + 20);
      if (ocr) r_orbit = 0;
      if (use_bc0 || r_bx == 3563) begin r_bx = 0; r_orbit++; end
      else r_bx++;
      if (ecr) r_evt = 0;
      if (l1a) r_evt++;
      @(negedge clk);
      bx_strobe = 0; bc0 = 0; ocr = 0; ecr = 0;
      checks++;
      if (l1a_valid != l1a) begin failures++; $display("FAIL: l1a_valid at bx %0d", b); end
      if (l1a) begin
        n_l1a++;
        checks++;
        if (l1a_ts.bx != 12'(r_bx) || l1a_ts.orbit != 32'(r_orbit) || l1a_ts.evt != 32'(r_evt)) begin
          failures++;
          $display("FAIL: ts %0d/%0d/%0d expected %0d/%0d/%0d", l1a_ts.evt, l1a_ts.bx, l1a_ts.orbit, r_evt, r_bx, r_orbit);
        end
      end
      l1a = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (l1a_valid) begin failures++; $display("FAIL: l1a_valid held"); end
    end
    checks++;
    if (n_l1a < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
