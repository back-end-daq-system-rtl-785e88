// tb_config_regs: writes random values to every register, reads them back
// through the bus and checks the decoded configuration fields and the reset
// values.
`timescale 1ns/1ps
module tb_config_regs;
  import cb_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic we = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  cb_cfg_t cfg;

  config_regs #(.TIMEOUT_RST(24'd777)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(cfg.timeout == 24'd777 && cfg.hdr_marker == 9'h154 && cfg.idle_pattern == 24'h555555, "reset values");
    check(cfg.elink_en == '0 && cfg.econd_en == '0, "reset enables");
    for (int r = 0; r < 5; r++) begin
      for (int i = 0; i < 14; i++) begin
        v = $urandom();
        wr(8'(i), v);
        addr = 8'(i); #0.1;
        check(rdata == {27'h0, v[4:0]}, "e-link readback");
        check(cfg.elink_en[i] == v[4] && cfg.elink_id[i] == v[3:0], "e-link field");
      end
      for (int k = 0; k < 12; k++) begin
        v = $urandom();
        wr(8'h10 + 8'(k), v);
        check(cfg.econd_en[k] == v[0], "econd enable");
        wr(8'h20 + 8'(k), v);
        check(cfg.region_base[k] == v[15:0], "region base");
        wr(8'h30 + 8'(k), ~v);
        check(cfg.region_size[k] == ~v[15:0], "region size");
        addr = 8'h30 + 8'(k); #0.1;
        check(rdata == {16'h0, ~v[15:0]}, "region size readback");
      end
      v = $urandom();
      wr(8'h40, v); check(cfg.timeout == v[23:0], "timeout");
      wr(8'h41, v); check(cfg.hdr_marker == v[8:0], "marker");
      wr(8'h42, v); check(cfg.idle_pattern == v[23:0], "idle");
      addr = 8'h42; #0.1; check(rdata == {8'h0, v[23:0]}, "idle readback");
      addr = 8'h7F; #0.1; check(rdata == 0, "unmapped reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
