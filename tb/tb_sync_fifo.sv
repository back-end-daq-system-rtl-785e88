// tb_sync_fifo: random push/pop against a queue model; checks data order,
// full/empty flags and the occupancy count.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  logic [75:0] in_data = '0, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [75:0] q [$];

  sync_fifo #(.WIDTH(76), .DEPTH(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 5000; t++) begin
      bias = (t / 500) % 2 ? 3 : 1;
      check(count == 5'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == 16), "full");
      if (q.size() != 0) check(out_data == q[0], "head data");
      push = ($urandom_range(0, 3) < bias) && !full;
      pop  = ($urandom_range(0, 3) < 4 - bias) && !empty;
      in_data = {12'($urandom()), $urandom(), $urandom()};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
