// tb_packet_assembler: feeds a 32-bit word stream, 0 to 2 words per cycle,
// holding good packets of random length, idles, headers with a bad CRC,
// header-like words not preceded by an idle, and packets that do not fit the
// free space. Checks the 64-bit output words (padding, last flags), the
// reservations, and the overflow and CRC-error pulse counts. The output is
// randomly back-pressured.
`timescale 1ns/1ps
module tb_packet_assembler;
  import cb_pkg::*;
  import tb_daq_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic enable = 1;
  logic [1:0] in_cnt = '0;
  logic [63:0] in_data = '0;
  logic [15:0] free_words = 16'd1000;
  logic reserve, overflow, crc_err, pkt_start, out_valid, out_last, out_ready, stage_ovf;
  logic [9:0] reserve_len;
  logic [63:0] out_data;

  packet_assembler dut (
    .clk, .rst, .enable, .hdr_marker(9'h154), .idle_pattern(24'h555555),
    .in_cnt, .in_data, .free_words, .reserve, .reserve_len, .overflow, .crc_err, .pkt_start,
    .out_valid, .out_data, .out_last, .out_ready, .stage_ovf
  );

  int checks = 0, failures = 0;
  int n_ovf = 0, n_crc = 0, n_res = 0, exp_ovf = 0, exp_crc = 0;
  logic [31:0] stream [$];
  logic [64:0] expq [$];
  int          exp_res [$];
  int          small_from = -1, small_to = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic add_good(int len);
    logic [63:0] img [$];
    logic [63:0] h;
    logic [31:0] w [$];
    h = make_header(len, 12'($urandom()), 6'($urandom()), 3'($urandom()), 0);
    w.push_back(h[31:0]); w.push_back(h[63:32]);
    for (int i = 0; i < len; i++) w.push_back($urandom());
    stream.push_back(IDLE);
    foreach (w[i]) stream.push_back(w[i]);
    if (w.size() % 2) w.push_back(0);
    for (int i = 0; i < w.size(); i += 2)
      expq.push_back({(i + 2 == w.size()), w[i+1], w[i]});
    exp_res.push_back(w.size() / 2);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver: 0..2 words per cycle from the stream.
  int sent = 0;
  always @(negedge clk) begin
    if (!rst) begin
      int c;
      c = $urandom_range(0, 2);
      if (c > stream.size()) c = stream.size();
      in_cnt  = 2'(c);
      in_data = '0;
      for (int i = 0; i < c; i++) in_data[32*i +: 32] = stream.pop_front();
      sent += c;
      out_ready = $urandom_range(0, 3) != 0;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (overflow) n_ovf++;
      if (crc_err)  n_crc++;
      if (reserve) begin
        n_res++;
        check(exp_res.size() != 0 && reserve_len == 10'(exp_res[0]), "reservation length");
        if (exp_res.size()) void'(exp_res.pop_front());
      end
      if (out_valid && out_ready) begin
        logic [64:0] x;
        x = expq.size() ? expq.pop_front() : '1;
        check({out_last, out_data} == x, $sformatf("word %h/%0d expected %h", out_data, out_last, x));
      end
      check(!stage_ovf, "staging overflow");
    end
  end

  initial begin
    logic [63:0] h;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind == 0) begin
        // bad CRC header followed by garbage, then a good packet
        h = make_header(4, 12'($urandom()), 6'($urandom()), 3'($urandom()), 1);
        stream.push_back(IDLE); stream.push_back(h[31:0]); stream.push_back(h[63:32]);
        for (int i = 0; i < 4; i++) stream.push_back(32'h0BAD_0000 + i);
        exp_crc++;
      end else if (kind == 1) begin
        // a valid-looking header that does not follow an idle: ignored
        h = make_header(3, 12'($urandom()), 6'($urandom()), 3'($urandom()), 0);
        stream.push_back(32'h1234_5678); stream.push_back(h[31:0]); stream.push_back(h[63:32]);
      end
      for (int i = 0; i < $urandom_range(0, 3); i++) stream.push_back(IDLE);
      add_good($urandom_range(0, 25));
    end
    while (stream.size() != 0) @(negedge clk);
    repeat (50) @(negedge clk);
    // Overflow: free space 3 words; a 10-word packet (6 x 64-bit) is dropped,
    // the following 2-word packet (2 x 64-bit) is kept.
    free_words = 16'd3;
    h = make_header(10, 12'd7, 6'd1, 3'd2, 0);
    stream.push_back(IDLE); stream.push_back(h[31:0]); stream.push_back(h[63:32]);
    for (int i = 0; i < 10; i++) stream.push_back($urandom());
    exp_ovf++;
    add_good(2);
    while (stream.size() != 0) @(negedge clk);
    repeat (50) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d words missing", expq.size()));
    check(exp_res.size() == 0, "reservations missing");
    check(n_ovf == exp_ovf, $sformatf("overflow %0d expected %0d", n_ovf, exp_ovf));
    check(n_crc == exp_crc, $sformatf("crc errors %0d expected %0d", n_crc, exp_crc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
