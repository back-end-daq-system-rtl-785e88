// tb_event_buffer: builds events out of order (reserve header, push payload,
// write header, commit), reads them back with random back-pressure and
// checks order, contents, event lengths, and that nothing of an event is
// visible before its commit.
`timescale 1ns/1ps
module tb_event_buffer;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic start = 0, push = 0, hdr_we = 0, hdr_idx = 0, commit = 0, out_valid, out_ready = 0;
  logic [63:0] push_data = '0, hdr_data = '0, out_data;
  logic [15:0] event_len;
  logic [6:0] free;

  event_buffer #(.DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] expq [$];
  int committed_words = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = $urandom_range(0, 2) != 0;
  always @(posedge clk) begin
    if (!rst) begin
      check(out_valid == (committed_words > 0), "visible data differs from committed data");
      if (out_valid && out_ready) begin
        check(out_data == expq[0], $sformatf("data %h expected %h", out_data, expq[0]));
        void'(expq.pop_front());
        committed_words--;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 0; e < 400; e++) begin
      int n;
      logic [63:0] body [$];
      n = $urandom_range(0, 20);
      body.delete();
      while (free < 7'(n + 2)) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < n; i++) begin
        push = 1; push_data = {32'(e), 32'(i)};
        body.push_back(push_data);
        @(negedge clk);
      end
      push = 0;
      hdr_we = 1; hdr_idx = 1; hdr_data = {32'(e), 32'hAAAA_0001};
      @(negedge clk);
      hdr_idx = 0; hdr_data = {32'(e), 32'hAAAA_0000};
      commit = 0;
      check(event_len == 16'(n + 2), "event length");
      commit = 1;
      expq.push_back({32'(e), 32'hAAAA_0000});
      expq.push_back({32'(e), 32'hAAAA_0001});
      foreach (body[i]) expq.push_back(body[i]);
      @(negedge clk);
      committed_words += n + 2;
      hdr_we = 0; commit = 0;
    end
    while (expq.size() != 0) @(negedge clk);
    check(free == 7'd64, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
