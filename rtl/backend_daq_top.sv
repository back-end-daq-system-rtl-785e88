// backend_daq_top: a group of Capture Blocks sharing one readout output.
//
// Each of the NUM_CB Capture Blocks serves one fibre pair: an
// elink_serialiser turns the pair's 14 e-link words of each bunch crossing
// into the 64-bit, 320 MHz stream the Capture Block consumes. All blocks see
// the same fast commands (bx_strobe marks each 40 MHz bunch crossing; bc0,
// l1a, ocr, ecr are sampled with it), so their timestamps stay in step. A
// readout_controller merges their events into one output stream
// (out_valid/out_data/out_sop/out_eop/out_src, out_ready back-pressure).
// Software configures block cfg_cb through cfg_we/cfg_addr/cfg_wdata and
// reads back through cfg_rdata (register map in config_regs).
// NUM_CB = 2 matches the two-Capture-Block system that was built and run;
// a full board would carry 54 Capture Blocks spread over 12 output links.
// Monitoring outputs are the OR over the blocks of the per-ECON-D pulses.
module backend_daq_top
  import cb_pkg::*;
#(
  parameter int unsigned NUM_CB    = 2,
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned EB_DEPTH  = 4096
)(
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  bx_strobe,
  input  logic                                  bc0,
  input  logic                                  l1a,
  input  logic                                  ocr,
  input  logic                                  ecr,
  input  logic [NUM_CB-1:0][N_ELINK-1:0][31:0]  elink_data,
  input  logic [$clog2(NUM_CB+1)-1:0]           cfg_cb,
  input  logic                                  cfg_we,
  input  logic [7:0]                            cfg_addr,
  input  logic [31:0]                           cfg_wdata,
  output logic [31:0]                           cfg_rdata,
  output logic                                  out_valid,
  output logic [63:0]                           out_data,
  output logic                                  out_sop,
  output logic                                  out_eop,
  output logic [$clog2(NUM_CB+1)-1:0]           out_src,
  input  logic                                  out_ready,
  output logic [NUM_CB-1:0][15:0]               l1a_lost,
  output logic [N_ECOND-1:0]                    mon_overflow,
  output logic [N_ECOND-1:0]                    mon_crc_err,
  output logic [N_ECOND-1:0]                    mon_timeout,
  output logic [N_ECOND-1:0]                    mon_mismatch,
  output logic [N_ECOND-1:0]                    mon_pkt_start
);
  logic [NUM_CB-1:0]                       ser_valid;
  logic [NUM_CB-1:0][63:0]                 ser_data;
  logic [NUM_CB-1:0][$clog2(N_PAIR)-1:0]   ser_pair;
  logic [NUM_CB-1:0][31:0]                 rdata;
  logic [NUM_CB-1:0]                       size_valid, size_pop, ev_valid, ev_ready;
  logic [NUM_CB-1:0][15:0]                 size_data;
  logic [NUM_CB-1:0][63:0]                 ev_data;
  logic [NUM_CB-1:0][N_ECOND-1:0]          ovf, crc, tmo, mis, pst;

  for (genvar c = 0; c < NUM_CB; c++) begin : g_cb
    elink_serialiser u_ser (
      .clk, .rst, .bx_strobe, .elink_data(elink_data[c]),
      .out_valid(ser_valid[c]), .out_data(ser_data[c]), .out_pair(ser_pair[c])
    );
    capture_block #(.MEM_DEPTH(MEM_DEPTH), .EB_DEPTH(EB_DEPTH)) u_cb (
      .clk, .rst, .bx_strobe, .bc0, .l1a, .ocr, .ecr,
      .in_valid(ser_valid[c]), .in_data(ser_data[c]), .in_pair(ser_pair[c]),
      .cfg_we(cfg_we && cfg_cb == ($clog2(NUM_CB+1))'(c)), .cfg_addr, .cfg_wdata,
      .cfg_rdata(rdata[c]),
      .ev_valid(ev_valid[c]), .ev_data(ev_data[c]), .ev_ready(ev_ready[c]),
      .size_valid(size_valid[c]), .size_data(size_data[c]), .size_pop(size_pop[c]),
      .l1a_lost(l1a_lost[c]),
      .mon_overflow(ovf[c]), .mon_crc_err(crc[c]), .mon_timeout(tmo[c]),
      .mon_mismatch(mis[c]), .mon_pkt_start(pst[c])
    );
  end

  always_comb begin
    cfg_rdata     = '0;
    mon_overflow  = '0;
    mon_crc_err   = '0;
    mon_timeout   = '0;
    mon_mismatch  = '0;
    mon_pkt_start = '0;
    for (int c = 0; c < NUM_CB; c++) begin
      if (cfg_cb == ($clog2(NUM_CB+1))'(c)) cfg_rdata = rdata[c];
      mon_overflow  |= ovf[c];
      mon_crc_err   |= crc[c];
      mon_timeout   |= tmo[c];
      mon_mismatch  |= mis[c];
      mon_pkt_start |= pst[c];
    end
  end

  readout_controller #(.NUM_CB(NUM_CB)) u_ro (
    .clk, .rst, .size_valid, .size_data, .size_pop, .ev_valid, .ev_data, .ev_ready,
    .out_valid, .out_data, .out_sop, .out_eop, .out_src, .out_ready
  );
endmodule
