// tb_backend_daq_top: end-to-end test of two Capture Blocks behind one
// readout controller, with every parameter of the top at its default.
//
// As in the two-layer beam-test set-up, each Capture Block receives three
// ECON-Ds (two e-links each). Phase 1 triggers an event every 300 bunch
// crossings and plants one of each error: a corrupted header (filtered by the
// CRC check), a wrong BX (mismatch), a missing packet (timeout) and a packet
// too large for its region (overflow). Phase 2 triggers N_MID events with
// random spacing averaging about 182 bunch crossings (about 220 kHz) and
// phase 3 N_FAST events averaging about 41 bunch crossings (about 970 kHz at
// 40 MHz), the two average rates of the beam-test runs, with random packet
// sizes, while the output is randomly back-pressured. Every
// output event is checked word by word against a reference model per Capture
// Block (out_src selects the model), with sop/eop framing. The test fails if
// an L1A is lost or a mechanism never occurs.
`timescale 1ns/1ps
module tb_backend_daq_top;
  import cb_pkg::*;
  import tb_daq_pkg::*;

  localparam int NCB    = 2;
  localparam int N_SLOW = 8;
  localparam int N_MID  = 60;
  localparam int N_FAST = 400;
  localparam int TMO    = 400;

  logic clk = 0, rst = 1;
  always #1.5625 clk = ~clk;

  logic bx_strobe = 0, bc0 = 0, l1a = 0, ocr = 0, ecr = 0;
  logic [NCB-1:0][13:0][31:0] elink_data = '0;
  logic [1:0] cfg_cb = '0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic out_valid, out_sop, out_eop, out_ready;
  logic [63:0] out_data;
  logic [1:0] out_src;
  logic [NCB-1:0][15:0] l1a_lost;
  logic [N_ECOND-1:0] m_ovf, m_crc, m_tmo, m_mis, m_pst;

  backend_daq_top dut (
    .clk, .rst, .bx_strobe, .bc0, .l1a, .ocr, .ecr, .elink_data,
    .cfg_cb, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .out_valid, .out_data, .out_sop, .out_eop, .out_src, .out_ready,
    .l1a_lost, .mon_overflow(m_ovf), .mon_crc_err(m_crc), .mon_timeout(m_tmo),
    .mon_mismatch(m_mis), .mon_pkt_start(m_pst)
  );

  int checks = 0, failures = 0;
  int n_ovf = 0, n_crc = 0, n_tmo = 0, n_mis = 0, n_stall = 0, n_pkt = 0;
  int n_src [NCB];
  front_end fe [NCB];
  logic [63:0] expq [NCB][$];
  int ev_total = 0, ev_got = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg_write(input int c, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_cb = 2'(c); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  always @(negedge clk) begin
    n_ovf <= n_ovf + $countones(m_ovf);
    n_crc <= n_crc + $countones(m_crc);
    n_tmo <= n_tmo + $countones(m_tmo);
    n_mis <= n_mis + $countones(m_mis);
    n_pkt <= n_pkt + $countones(m_pst);
    if (out_valid && !out_ready) n_stall <= n_stall + 1;
  end

  // Reference fast-command counters.
  logic [11:0] r_bx = 12'd3563;
  logic [31:0] r_orbit = 0, r_evt = 0;
  int          bx_count = 0;

  task automatic run_bx(input bit do_l1a);
    bit is_bc0;
    is_bc0 = (bx_count % 3564) == 0;
    @(negedge clk);
    for (int c = 0; c < NCB; c++) elink_data[c] = fe[c].next_bx();
    bx_strobe = 1; bc0 = is_bc0; l1a = do_l1a;
    if (is_bc0) begin r_bx = 0; r_orbit++; end
    else r_bx = (r_bx == 3563) ? 12'd0 : r_bx + 1;
    if (do_l1a) r_evt++;
    @(negedge clk);
    bx_strobe = 0; bc0 = 0; l1a = 0;
    repeat (6) @(negedge clk);
    bx_count++;
  endtask

  // err: 0 none, 1 crc, 2 mismatch, 3 timeout, 4 overflow (CB 1, ECON-D 1)
  task automatic make_event(int err, int maxlen);
    for (int c = 0; c < NCB; c++) begin
      logic [63:0] img [$];
      logic [63:0] body [$];
      econd_flags_t [N_ECOND-1:0] fl;
      fl = '0;
      for (int k = 0; k < 3; k++) begin
        int len;
        bit hit;
        hit = (c == 1 && k == 1);
        len = $urandom_range(4, maxlen);
        if (hit && err == 3) begin
          fl[k].timeout = 1;
          continue;
        end
        if (hit && err == 4) begin
          fe[c].add_packet(k, 500, r_bx, r_evt[5:0], r_orbit[2:0], 0, img);
          fl[k].overflow = 1;
          fl[k].timeout  = 1;
          continue;
        end
        if (hit && err == 1) begin
          logic [63:0] bad;
          bad = make_header(7, r_bx, r_evt[5:0], r_orbit[2:0], 1);
          fe[c].push_word(k, IDLE);
          fe[c].push_word(k, bad[31:0]);
          fe[c].push_word(k, bad[63:32]);
        end
        if (hit && err == 2) begin
          fe[c].add_packet(k, len, r_bx, r_evt[5:0] + 6'd1, r_orbit[2:0], 0, img);
          fl[k].mismatch = 1;
          continue;
        end
        fe[c].add_packet(k, len, r_bx, r_evt[5:0], r_orbit[2:0], 0, img);
        fl[k].present = 1;
        foreach (img[i]) body.push_back(img[i]);
      end
      expq[c].push_back({r_evt, r_orbit});
      expq[c].push_back({r_bx, 4'hC, fl});
      foreach (body[i]) expq[c].push_back(body[i]);
    end
    ev_total += NCB;
  endtask

  // Output side: random back-pressure, compare against the source's model.
  logic [1:0] cur_src = 0;
  bit in_event = 0;
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      logic [63:0] x;
      check(out_sop == !in_event, "sop framing");
      if (out_sop) begin cur_src = out_src; n_src[out_src]++; end
      check(out_src == cur_src, "source changed inside event");
      x = expq[out_src].size() ? expq[out_src].pop_front() : 64'hDEAD;
      check(out_data == x, $sformatf("cb %0d word %h expected %h", out_src, out_data, x));
      in_event = !out_eop;
      if (out_eop) ev_got++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    for (int c = 0; c < NCB; c++) begin
      fe[c] = new();
      n_src[c] = 0;
    end
    repeat (4) @(posedge clk);
    rst = 0;
    for (int c = 0; c < NCB; c++) begin
      for (int i = 0; i < 6; i++) begin
        cfg_write(c, 8'(i), 32'h10 | (i / 2));
        fe[c].map_elink(i / 2, i);
      end
      for (int k = 0; k < 3; k++) begin
        cfg_write(c, 8'h10 + 8'(k), 1);
        cfg_write(c, 8'h20 + 8'(k), 32'(k * 1024));
        cfg_write(c, 8'h30 + 8'(k), (c == 1 && k == 1) ? 200 : 1024);
      end
      cfg_write(c, 8'h40, TMO);
    end
    cfg_cb = 2'd1; cfg_addr = 8'h31;
    @(negedge clk);
    check(cfg_rdata == 200, "config readback");
    // Phase 1: planted errors at a low rate.
    for (int n = 0; n < N_SLOW; n++) begin
      run_bx(1);
      make_event((n % 5), 40);
      for (int b = 1; b < 300; b++) run_bx(0);
    end
    // Phase 2: random triggers averaging ~182 BX apart (about 220 kHz).
    for (int n = 0; n < N_MID; n++) begin
      run_bx(1);
      make_event(0, 40);
      gap = $urandom_range(20, 344);
      for (int b = 1; b < gap; b++) run_bx(0);
    end
    // Phase 3: random triggers averaging ~41 BX apart (about 970 kHz).
    for (int n = 0; n < N_FAST; n++) begin
      run_bx(1);
      make_event(0, 40);
      gap = $urandom_range(3, 79);
      for (int b = 1; b < gap; b++) run_bx(0);
    end
    while (ev_got < ev_total && bx_count < 200000) run_bx(0);
    check(ev_got == ev_total, $sformatf("events %0d of %0d", ev_got, ev_total));
    for (int c = 0; c < NCB; c++) begin
      check(expq[c].size() == 0, "leftover expected words");
      check(l1a_lost[c] == 0, "L1A lost");
      check(n_src[c] == N_SLOW + N_MID + N_FAST, $sformatf("cb %0d events %0d", c, n_src[c]));
    end
    check(n_crc == 2, $sformatf("crc errors %0d", n_crc));
    check(n_mis >= 1, "no mismatch");
    check(n_tmo >= 2, "no timeout");
    check(n_ovf >= 1, "no overflow");
    check(n_stall > 0, "no back-pressure");
    $display("mechanisms: events=%0d/%0d pkts=%0d crc_err=%0d mismatch=%0d timeout=%0d overflow=%0d stalls=%0d bx=%0d",
             n_src[0], n_src[1], n_pkt, n_crc, n_mis, n_tmo, n_ovf, n_stall, bx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
