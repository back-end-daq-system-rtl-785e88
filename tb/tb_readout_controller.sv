// tb_readout_controller: three sources offer events of random length through
// size entries and word queues; checks that each output event is one
// source's next event, complete and in order, framed by sop/eop, and that
// every source is served.
`timescale 1ns/1ps
module tb_readout_controller;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic [N-1:0] size_valid, size_pop, ev_valid, ev_ready;
  logic [N-1:0][15:0] size_data;
  logic [N-1:0][63:0] ev_data;
  logic out_valid, out_sop, out_eop, out_ready = 0;
  logic [63:0] out_data;
  logic [1:0] out_src;

  readout_controller #(.NUM_CB(N)) dut (.*);

  int checks = 0, failures = 0;
  int sizes [N][$];
  logic [63:0] words [N][$];
  logic [63:0] expw [N][$];
  int served [N];
  int total = 0, got = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always begin
    @(negedge clk);
    #0.5;
    for (int s = 0; s < N; s++) begin
      size_valid[s] = sizes[s].size() != 0;
      size_data[s]  = sizes[s].size() ? 16'(sizes[s][0]) : '0;
      ev_valid[s]   = words[s].size() != 0;
      ev_data[s]    = words[s].size() ? words[s][0] : '0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int left = 0;
  logic [1:0] src = 0;
  always @(posedge clk) begin
    if (!rst) begin
      for (int s = 0; s < N; s++) begin
        if (size_pop[s]) void'(sizes[s].pop_front());
        if (ev_valid[s] && ev_ready[s]) void'(words[s].pop_front());
      end
      if (out_valid && out_ready) begin
        if (left == 0) begin
          check(out_sop, "sop");
          src = out_src;
          served[src]++;
        end else check(!out_sop && out_src == src, "inside event");
        check(out_data == expw[out_src][0], "data");
        void'(expw[out_src].pop_front());
        left = (left == 0) ? int'(out_data[15:0]) - 1 : left - 1;
        check(out_eop == (left == 0), "eop");
        if (left == 0) got++;
      end
    end
    out_ready <= $urandom_range(0, 3) != 0;
  end

  initial begin
    for (int s = 0; s < N; s++) served[s] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 0; e < 300; e++) begin
      int s, n;
      s = $urandom_range(0, N - 1);
      n = $urandom_range(1, 12);
      sizes[s].push_back(n);
      for (int i = 0; i < n; i++) begin
        logic [63:0] w;
        w = {8'(s), 24'(e), 16'(i), 16'(n)};
        words[s].push_back(w);
        expw[s].push_back(w);
      end
      total++;
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    while (got < total) @(negedge clk);
    for (int s = 0; s < N; s++) check(served[s] > 0 && expw[s].size() == 0, "all served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
