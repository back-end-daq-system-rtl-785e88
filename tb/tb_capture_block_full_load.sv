// tb_capture_block_full_load: one Capture Block in its largest configuration,
// all 12 ECON-Ds on the 14 e-links (ECON-Ds 0 and 1 on two e-links each, the
// other ten on one each), each with a 341-word main-buffer region. L1As come
// with random spacing of 3 to 79 bunch crossings (about 970 kHz on average)
// and packet sizes that keep the e-links about 70 % busy, so the shared
// main-buffer write port, the staging FIFOs and the event builder run close
// to their limits. Every event is compared word by word; no L1A may be lost
// and no timeout, mismatch or overflow may occur.
`timescale 1ns/1ps
module tb_capture_block_full_load;
  import cb_pkg::*;
  import tb_daq_pkg::*;

  localparam int N_EV    = 300;
  localparam int TMO     = 4000;

  logic clk = 0, rst = 1;
  always #1.5625 clk = ~clk;

  logic bx_strobe = 0, bc0 = 0, l1a = 0, ocr = 0, ecr = 0;
  logic in_valid = 0;
  logic [63:0] in_data = '0;
  logic [2:0]  in_pair = '0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic ev_valid, ev_ready, size_valid, size_pop;
  logic [63:0] ev_data;
  logic [15:0] size_data, l1a_lost;
  logic [N_ECOND-1:0] m_ovf, m_crc, m_tmo, m_mis, m_pst;

  capture_block dut (
    .clk, .rst, .bx_strobe, .bc0, .l1a, .ocr, .ecr, .in_valid, .in_data, .in_pair,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .ev_valid, .ev_data, .ev_ready, .size_valid, .size_data, .size_pop,
    .l1a_lost, .mon_overflow(m_ovf), .mon_crc_err(m_crc), .mon_timeout(m_tmo),
    .mon_mismatch(m_mis), .mon_pkt_start(m_pst)
  );

  int checks = 0, failures = 0;
  int n_ovf = 0, n_crc = 0, n_tmo = 0, n_mis = 0;
  front_end fe = new();
  logic [63:0] expq [$];
  logic [15:0] exp_len [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  always @(negedge clk) begin
    n_ovf <= n_ovf + $countones(m_ovf);
    n_crc <= n_crc + $countones(m_crc);
    n_tmo <= n_tmo + $countones(m_tmo);
    n_mis <= n_mis + $countones(m_mis);
  end

  // Reference counters of the fast-command side.
  logic [11:0] r_bx = 12'd3563;
  logic [31:0] r_orbit = 0, r_evt = 0;
  int          bx_count = 0;
  int          ev_sent = 0;

  // Bunch-crossing engine: fast commands, e-link serialisation, L1A stimulus.
  task automatic run_bx(input bit do_l1a);
    logic [13:0][31:0] e;
    bit is_bc0;
    is_bc0 = (bx_count % 3564) == 0;
    e = fe.next_bx();
    @(negedge clk);
    bx_strobe = 1; bc0 = is_bc0; l1a = do_l1a;
    if (is_bc0) begin r_bx = 0; r_orbit++; end
    else r_bx = (r_bx == 3563) ? 12'd0 : r_bx + 1;
    if (do_l1a) r_evt++;
    @(negedge clk);
    bx_strobe = 0; bc0 = 0; l1a = 0;
    for (int p = 0; p < 7; p++) begin
      in_valid = 1; in_pair = 3'(p); in_data = {e[2*p+1], e[2*p]};
      @(negedge clk);
    end
    in_valid = 0;
    bx_count++;
  endtask

  // Queue the packets of an event and its expected output.
  task automatic make_event(int n);
    logic [63:0] img [$];
    logic [63:0] body [$];
    econd_flags_t [N_ECOND-1:0] fl;
    fl = '0;
    for (int k = 0; k < N_ECOND; k++) begin
      int len;
      len = (k < 2) ? $urandom_range(4, 100) : $urandom_range(4, 50);
      fe.add_packet(k, len, r_bx, r_evt[5:0], r_orbit[2:0], 0, img);
      fl[k].present = 1;
      foreach (img[i]) body.push_back(img[i]);
    end
    expq.push_back({r_evt, r_orbit});
    expq.push_back({r_bx, 4'hC, fl});
    foreach (body[i]) expq.push_back(body[i]);
    exp_len.push_back(16'(body.size() + 2));
  endtask

  // Output reader: one size entry, then that many words.
  int ev_got = 0;
  int words_left = 0;
  assign size_pop = size_valid && (words_left == 0);
  assign ev_ready = (words_left != 0);
  always @(posedge clk) begin
    if (!rst) begin
      if (size_pop) begin
        check(exp_len.size() != 0, "unexpected event");
        if (exp_len.size() != 0) begin
          logic [15:0] l;
          l = exp_len.pop_front();
          check(size_data == l, $sformatf("event %0d size %0d expected %0d", ev_got, size_data, l));
        end
        words_left <= int'(size_data);
      end
      if (ev_valid && ev_ready) begin
        logic [63:0] x;
        x = expq.size() ? expq.pop_front() : 64'hDEAD;
        check(ev_data == x, $sformatf("event %0d word %h expected %h", ev_got, ev_data, x));
        words_left <= words_left - 1;
        if (words_left == 1) ev_got++;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    // e-link map: 0,1 -> ECON-D 0; 2,3 -> ECON-D 1; e-link i -> ECON-D i-2 above
    for (int i = 0; i < 14; i++) begin
      int id;
      id = (i < 4) ? i / 2 : i - 2;
      cfg_write(8'(i), 32'h10 | id);
      fe.map_elink(id, i);
    end
    for (int k = 0; k < N_ECOND; k++) begin
      cfg_write(8'h10 + 8'(k), 1);
      cfg_write(8'h20 + 8'(k), 32'(k * 341));
      cfg_write(8'h30 + 8'(k), 341);
    end
    cfg_write(8'h40, TMO);
    cfg_write(8'h01, 32'h10);
    check(cfg_rdata == 32'h10, "config readback");
    for (int n = 0; n < N_EV; n++) begin
      int gap;
      run_bx(1);
      make_event(n);
      gap = $urandom_range(3, 79);
      for (int b = 1; b < gap; b++) run_bx(0);
    end
    while (ev_got < N_EV && bx_count < 100000) run_bx(0);
    check(ev_got == N_EV, $sformatf("events %0d of %0d", ev_got, N_EV));
    check(expq.size() == 0, "leftover expected words");
    check(l1a_lost == 0, "L1A lost");
    check(n_ovf == 0 && n_crc == 0 && n_mis == 0 && n_tmo == 0, "unexpected error flags");
    $display("mechanisms: overflow=%0d crc_err=%0d mismatch=%0d timeout=%0d", n_ovf, n_crc, n_mis, n_tmo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
