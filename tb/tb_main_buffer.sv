// tb_main_buffer: three packet sources write packets of random length into
// their own regions at the same time (so the arbiter must share the single
// write port), while a reader drains complete packets region by region.
// The regions are adjacent. Checks read-back data, packet counts, free space and that each staging
// source is granted at least once every N_ECOND cycles while it waits.
`timescale 1ns/1ps
module tb_main_buffer;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [N_ECOND-1:0][15:0] region_base = '0, region_size = '0, free_words;
  logic [N_ECOND-1:0] reserve = '0, wr_valid = '0, wr_last = '0, wr_ready;
  logic [N_ECOND-1:0][9:0] reserve_len = '0;
  logic [N_ECOND-1:0][63:0] wr_data = '0;
  logic [N_ECOND-1:0][9:0] pkt_count;
  logic rd_en = 0, pkt_done = 0;
  logic [3:0] rd_region = '0, pkt_done_region = '0;
  logic [63:0] rd_data;

  main_buffer #(.MEM_DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  localparam int NS = 3;
  int srcs [NS] = '{0, 5, 11};
  logic [63:0] pend [NS][$];       // words still to write
  logic [63:0] stored [NS][$];     // words written, to be read
  int          plen [NS][$];       // packet lengths written, to be read
  int          tx_len [NS][$];     // packet lengths queued
  int          wait_cnt [NS];
  int          used [NS];

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

  // Writers: reserve, then present words; one word leaves per grant.
  int cur_left [NS];
  always @(negedge clk) begin
    if (!rst) begin
      reserve = '0;
      for (int s = 0; s < NS; s++) begin
        int k;
        k = srcs[s];
        if (pend[s].size() == 0 && tx_len[s].size() < 4 && $urandom_range(0, 7) == 0) begin
          int l;
          l = $urandom_range(1, 20);
          if (free_words[k] >= 16'(l)) begin
            check(free_words[k] == 16'(region_size[k] - used[s]), "free words");
            reserve[k] = 1; reserve_len[k] = 10'(l);
            used[s] += l;
            for (int i = 0; i < l; i++) pend[s].push_back({16'(k), 16'(tx_len[s].size()), $urandom()});
            tx_len[s].push_back(l);
            cur_left[s] = (cur_left[s] == 0) ? l : cur_left[s];
          end
        end
        wr_valid[k] = pend[s].size() != 0;
        wr_data[k]  = pend[s].size() ? pend[s][0] : '0;
        wr_last[k]  = (pend[s].size() != 0) && (cur_left[s] == 1);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      check($countones(wr_ready) <= 1, "one grant per cycle");
      for (int s = 0; s < NS; s++) begin
        int k;
        k = srcs[s];
        if (wr_valid[k] && !wr_ready[k]) wait_cnt[s]++;
        if (wr_valid[k] && wr_ready[k]) begin
          check(wait_cnt[s] < N_ECOND, "round-robin fairness");
          wait_cnt[s] = 0;
          stored[s].push_back(pend[s].pop_front());
          cur_left[s]--;
          if (cur_left[s] == 0) begin
            plen[s].push_back(tx_len[s].pop_front());
            cur_left[s] = tx_len[s].size() ? tx_len[s][0] : 0;
          end
        end
      end
    end
  end

  initial begin
    int got = 0;
    // Adjacent regions: a pointer that leaves its region corrupts a neighbour.
    for (int s = 0; s < NS; s++) begin
      region_size[srcs[s]] = 16'(40 + s * 7);
      region_base[srcs[s]] = (s == 0) ? 16'd3 : region_base[srcs[s-1]] + region_size[srcs[s-1]];
      used[s] = 0; cur_left[s] = 0; wait_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    while (got < 600) begin
      int s, k;
      s = $urandom_range(0, NS - 1);
      k = srcs[s];
      @(negedge clk);
      check(pkt_count[k] == 10'(plen[s].size()), $sformatf("pkt count region %0d: %0d vs %0d", k, pkt_count[k], plen[s].size()));
      if (pkt_count[k] != 0 && plen[s].size() != 0) begin
        int l;
        l = plen[s].pop_front();
        for (int i = 0; i < l; i++) begin
          rd_en = 1; rd_region = 4'(k);
          @(negedge clk);
          rd_en = 0;
          check(rd_data == stored[s][0], $sformatf("region %0d data %h expected %h", k, rd_data, stored[s][0]));
          void'(stored[s].pop_front());
          used[s]--;
        end
        pkt_done = 1; pkt_done_region = 4'(k);
        @(negedge clk);
        pkt_done = 0;
        got++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
