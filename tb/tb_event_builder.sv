// tb_event_builder: the event builder against behavioural models of the main
// buffer (per-region packet queues answering reads one cycle late), the L1A
// FIFO and the event buffer (which records pushes and header writes; its
// free space is randomised to exercise hold-back). Three ECON-Ds are
// enabled. Each event plants, per ECON-D, a matching packet, a packet with a
// wrong timestamp or no packet at all, and sometimes an overflow pulse; the
// built event (header with flags, then the matching packets) is compared
// with the reference.
`timescale 1ns/1ps
module tb_event_builder;
  import cb_pkg::*;
  import tb_daq_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [N_ECOND-1:0] econd_en;
  logic l1a_empty, l1a_pop, rd_en, pkt_done, eb_start, eb_push, eb_hdr_we, eb_hdr_idx, eb_commit, busy;
  timestamp_t l1a_ts;
  logic [N_ECOND-1:0][9:0] pkt_count;
  logic [3:0] rd_region, pkt_done_region;
  logic [63:0] rd_data = '0, eb_push_data, eb_hdr_data;
  logic [N_ECOND-1:0] overflow = '0, flag_timeout, flag_mismatch;
  logic [12:0] eb_free;
  localparam int EB_CAP = 40;
  int occupied = 0;

  event_builder dut (
    .clk, .rst, .econd_en, .timeout(24'd50), .l1a_empty, .l1a_ts, .l1a_pop,
    .pkt_count, .rd_en, .rd_region, .rd_data, .pkt_done, .pkt_done_region, .overflow,
    .eb_free, .eb_start, .eb_push, .eb_push_data, .eb_hdr_we, .eb_hdr_idx, .eb_hdr_data,
    .eb_commit, .busy, .flag_timeout, .flag_mismatch
  );

  int checks = 0, failures = 0, n_events = 0, n_tmo = 0, n_mis = 0, n_ovf = 0, n_hold = 0;
  logic [63:0] region [N_ECOND][$];
  int          npkt [N_ECOND];
  timestamp_t  l1aq [$];
  logic [63:0] body [$];
  logic [63:0] hdr [2];
  logic [63:0] expect_ev [$];
  localparam int EN [3] = '{0, 4, 11};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mirrors of the queue models, refreshed half a cycle before each edge.
  always begin
    @(negedge clk);
    #0.5;
    econd_en = '0;
    foreach (EN[i]) econd_en[EN[i]] = 1'b1;
    l1a_empty = l1aq.size() == 0;
    l1a_ts    = l1aq.size() ? l1aq[0] : '0;
    for (int k = 0; k < N_ECOND; k++) pkt_count[k] = 10'(npkt[k]);
    eb_free   = 13'(EB_CAP - occupied);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural main buffer, L1A FIFO and event buffer.
  always @(posedge clk) begin
    if (!rst) begin
      if (rd_en) begin
        check(region[rd_region].size() != 0, "read of empty region");
        rd_data <= region[rd_region].pop_front();
      end
      if (pkt_done) npkt[pkt_done_region]--;
      if (l1a_pop) void'(l1aq.pop_front());
      if (eb_start) begin
        body.delete();
        occupied += 2;
      end
      if (eb_push) begin
        check(occupied < EB_CAP, "push into full event buffer");
        body.push_back(eb_push_data);
        occupied++;
      end
      if (eb_hdr_we) hdr[eb_hdr_idx] = eb_hdr_data;
      if (eb_commit) begin
        logic [63:0] got [$];
        got.delete();
        got.push_back(hdr[0]);
        got.push_back(hdr[1]);
        foreach (body[i]) got.push_back(body[i]);
        check(got.size() == expect_ev.size(), $sformatf("event %0d size %0d expected %0d", n_events, got.size(), expect_ev.size()));
        foreach (expect_ev[i]) if (i < got.size())
          check(got[i] == expect_ev[i], $sformatf("event %0d word %0d: %h expected %h", n_events, i, got[i], expect_ev[i]));
        n_events++;
      end
      n_tmo += $countones(flag_timeout);
      n_mis += $countones(flag_mismatch);
      if (rd_en === 1'b0 && busy && eb_free < 13'd4) n_hold++;
    end
  end
  // The event buffer drains at a random rate.
  always @(posedge clk) if (occupied > 0 && $urandom_range(0, 2) == 0) occupied--;

  initial begin
    for (int k = 0; k < N_ECOND; k++) npkt[k] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 1; e <= 200; e++) begin
      timestamp_t ts;
      econd_flags_t [N_ECOND-1:0] fl;
      logic [63:0] img [$];
      int ovf_k;
      bit any;
      ts = '{evt: 32'(e), bx: 12'($urandom_range(0, 3563)), orbit: $urandom()};
      fl = '0;
      expect_ev.delete();
      body.delete();
      any = 0;
      ovf_k = ($urandom_range(0, 4) == 0) ? EN[$urandom_range(0, 2)] : -1;
      if (ovf_k >= 0) begin
        @(negedge clk); overflow[ovf_k] = 1;
        @(negedge clk); overflow = '0;
        n_ovf++;
      end
      foreach (EN[i]) begin
        int k, kind, len;
        logic [63:0] h;
        k = EN[i];
        kind = $urandom_range(0, 5);
        if (i == 0 && kind == 5) kind = 0;   // keep at least one packet
        len = $urandom_range(0, 30);
        if (kind == 5) begin
          fl[k].timeout = 1;
        end else begin
          h = make_header(len, (kind == 4) ? ts.bx ^ 12'h1 : ts.bx, ts.evt[5:0], ts.orbit[2:0], 0);
          region[k].push_back(h);
          if (kind != 4) expect_ev.push_back(h);
          for (int j = 0; j < (len + 3) / 2 - 1; j++) begin
            logic [63:0] w;
            w = {$urandom(), $urandom()};
            region[k].push_back(w);
            if (kind != 4) expect_ev.push_back(w);
          end
          npkt[k]++;
          if (kind == 4) fl[k].mismatch = 1; else fl[k].present = 1;
        end
        if (k == ovf_k) fl[k].overflow = 1;
      end
      expect_ev.push_front({ts.bx, 4'hC, fl});
      expect_ev.push_front({ts.evt, ts.orbit});
      @(negedge clk);
      l1aq.push_back(ts);
      while (l1aq.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
      for (int k = 0; k < N_ECOND; k++) check(npkt[k] == 0 && region[k].size() == 0, "region drained");
    end
    check(n_events == 200, "all events built");
    check(n_tmo > 0 && n_mis > 0 && n_hold > 0, $sformatf("mechanisms tmo=%0d mis=%0d hold=%0d", n_tmo, n_mis, n_hold));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
