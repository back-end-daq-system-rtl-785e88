// capture_block: the elementary DAQ unit of the back-end, which builds events
// from the ECON-D packets carried by one fibre pair.
//
// Dataflow (all at the 320 MHz processing clock):
//   serialised e-link pairs -> elink_tagger (ECON-D id per e-link word)
//   -> N_ECOND word_assemblers (words of one ECON-D each)
//   -> N_ECOND packet_assemblers (header detection, CRC-8 check, padding)
//   -> main_buffer (shared memory, one software-sized region per ECON-D)
//   -> event_builder (matches packets to L1A timestamps, adds the header)
//   -> event_buffer + size FIFO (output interface).
// In parallel timestamp_counters keep orbit/BX/event counters and push the
// timestamp of every L1A into the L1A FIFO read by the event builder.
// config_regs holds the software configuration.
//
// Input: one 64-bit e-link pair word per cycle (in_valid/in_data/in_pair),
// plus the fast commands sampled on bx_strobe. Output: committed events in the
// event buffer (ev_valid/ev_data/ev_ready, first-word fall-through) and one
// size FIFO entry per event giving its length in 64-bit words, header
// included (size_valid/size_data/size_pop). A reader pops one size, then
// reads that many words. Monitoring outputs count L1As lost to a full L1A
// FIFO and expose the per-ECON-D error pulses.
//
// The partition into these units and their order follow the described
// architecture; memory sizes and all interface details are this design's.
module capture_block
  import cb_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = 4096,
  parameter int unsigned EB_DEPTH    = 4096,
  parameter int unsigned L1A_DEPTH   = 32,
  parameter int unsigned SIZE_DEPTH  = 256,
  parameter int unsigned STAGE_DEPTH = 16,
  parameter logic [23:0] TIMEOUT_RST = 24'd4096
)(
  input  logic                       clk,
  input  logic                       rst,
  // fast commands, one sample per bunch crossing
  input  logic                       bx_strobe,
  input  logic                       bc0,
  input  logic                       l1a,
  input  logic                       ocr,
  input  logic                       ecr,
  // serialised e-link data
  input  logic                       in_valid,
  input  logic [63:0]                in_data,
  input  logic [$clog2(N_PAIR)-1:0]  in_pair,
  // configuration bus
  input  logic                       cfg_we,
  input  logic [7:0]                 cfg_addr,
  input  logic [31:0]                cfg_wdata,
  output logic [31:0]                cfg_rdata,
  // event buffer and size FIFO
  output logic                       ev_valid,
  output logic [63:0]                ev_data,
  input  logic                       ev_ready,
  output logic                       size_valid,
  output logic [15:0]                size_data,
  input  logic                       size_pop,
  // monitoring
  output logic [15:0]                l1a_lost,
  output logic [N_ECOND-1:0]         mon_overflow,
  output logic [N_ECOND-1:0]         mon_crc_err,
  output logic [N_ECOND-1:0]         mon_timeout,
  output logic [N_ECOND-1:0]         mon_mismatch,
  output logic [N_ECOND-1:0]         mon_pkt_start
);
  localparam int unsigned CNT_W = 10;
  localparam int unsigned EB_AW = $clog2(EB_DEPTH) + 1;

  cb_cfg_t cfg;

  config_regs #(.TIMEOUT_RST(TIMEOUT_RST)) u_cfg (
    .clk, .rst, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata), .cfg(cfg)
  );

  // ---------------------------------------------------------------- tagging
  logic [63:0]           tag_data;
  logic [1:0]            tag_valid;
  logic [1:0][ID_W-1:0]  tag_id;

  elink_tagger u_tag (
    .clk, .rst, .elink_en(cfg.elink_en), .elink_id(cfg.elink_id),
    .in_valid, .in_data, .in_pair,
    .out_data(tag_data), .out_valid(tag_valid), .out_id(tag_id)
  );

  // ------------------------------------------- word and packet assemblers
  logic [N_ECOND-1:0][1:0]      wa_cnt;
  logic [N_ECOND-1:0][63:0]     wa_data;
  logic [N_ECOND-1:0][15:0]     free_words;
  logic [N_ECOND-1:0]           reserve;
  logic [N_ECOND-1:0][LEN_W:0]  reserve_len;
  logic [N_ECOND-1:0]           pa_valid, pa_last, pa_ready, pa_stage_ovf;
  logic [N_ECOND-1:0][63:0]     pa_data;

  for (genvar g = 0; g < N_ECOND; g++) begin : g_econd
    word_assembler u_wa (
      .clk, .rst, .enable(cfg.econd_en[g]), .econd_id(ID_W'(g)),
      .in_data(tag_data), .in_valid(tag_valid), .in_id(tag_id),
      .out_cnt(wa_cnt[g]), .out_data(wa_data[g])
    );
    packet_assembler #(.STAGE_DEPTH(STAGE_DEPTH)) u_pa (
      .clk, .rst, .enable(cfg.econd_en[g]),
      .hdr_marker(cfg.hdr_marker), .idle_pattern(cfg.idle_pattern),
      .in_cnt(wa_cnt[g]), .in_data(wa_data[g]),
      .free_words(free_words[g]), .reserve(reserve[g]), .reserve_len(reserve_len[g]),
      .overflow(mon_overflow[g]), .crc_err(mon_crc_err[g]), .pkt_start(mon_pkt_start[g]),
      .out_valid(pa_valid[g]), .out_data(pa_data[g]), .out_last(pa_last[g]),
      .out_ready(pa_ready[g]), .stage_ovf(pa_stage_ovf[g])
    );
  end

  // ----------------------------------------------------------- main buffer
  logic [N_ECOND-1:0][CNT_W-1:0] pkt_count;
  logic                          mb_rd_en, pkt_done;
  logic [ID_W-1:0]               mb_rd_region, pkt_done_region;
  logic [63:0]                   mb_rd_data;

  main_buffer #(.MEM_DEPTH(MEM_DEPTH), .CNT_W(CNT_W)) u_mb (
    .clk, .rst, .region_base(cfg.region_base), .region_size(cfg.region_size),
    .reserve, .reserve_len, .free_words,
    .wr_valid(pa_valid), .wr_data(pa_data), .wr_last(pa_last), .wr_ready(pa_ready),
    .pkt_count, .rd_en(mb_rd_en), .rd_region(mb_rd_region), .rd_data(mb_rd_data),
    .pkt_done, .pkt_done_region
  );

  // ------------------------------------------------- timestamps and L1A FIFO
  logic       ts_valid;
  timestamp_t ts, ts_now, l1a_head;
  logic       l1a_full, l1a_empty, l1a_pop;

  timestamp_counters u_ts (
    .clk, .rst, .bx_strobe, .bc0, .l1a, .ocr, .ecr,
    .l1a_valid(ts_valid), .l1a_ts(ts), .now(ts_now)
  );

  sync_fifo #(.WIDTH($bits(timestamp_t)), .DEPTH(L1A_DEPTH)) u_l1a_fifo (
    .clk, .rst, .push(ts_valid && !l1a_full), .in_data(ts), .pop(l1a_pop),
    .out_data(l1a_head), .full(l1a_full), .empty(l1a_empty), .count()
  );

  always_ff @(posedge clk) begin
    if (rst)                        l1a_lost <= '0;
    else if (ts_valid && l1a_full)  l1a_lost <= l1a_lost + 1'b1;
  end

  // ---------------------------------------------------------- event builder
  logic                 eb_start, eb_push, eb_hdr_we, eb_hdr_idx, eb_commit;
  logic [63:0]          eb_push_data, eb_hdr_data;
  logic [EB_AW-1:0]     eb_free;
  logic [15:0]          eb_event_len;
  logic                 size_full, size_empty;

  event_builder #(.CNT_W(CNT_W), .EB_AW(EB_AW)) u_evb (
    .clk, .rst, .econd_en(cfg.econd_en), .timeout(cfg.timeout),
    .l1a_empty, .l1a_ts(l1a_head), .l1a_pop,
    .pkt_count, .rd_en(mb_rd_en), .rd_region(mb_rd_region), .rd_data(mb_rd_data),
    .pkt_done, .pkt_done_region, .overflow(mon_overflow),
    // an event may only start while the size FIFO can take its entry
    .eb_free(size_full ? '0 : eb_free),
    .eb_start, .eb_push, .eb_push_data, .eb_hdr_we, .eb_hdr_idx, .eb_hdr_data, .eb_commit,
    .busy(), .flag_timeout(mon_timeout), .flag_mismatch(mon_mismatch)
  );

  event_buffer #(.DEPTH(EB_DEPTH)) u_evbuf (
    .clk, .rst, .start(eb_start), .push(eb_push), .push_data(eb_push_data),
    .hdr_we(eb_hdr_we), .hdr_idx(eb_hdr_idx), .hdr_data(eb_hdr_data), .commit(eb_commit),
    .event_len(eb_event_len), .free(eb_free),
    .out_valid(ev_valid), .out_data(ev_data), .out_ready(ev_ready)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(SIZE_DEPTH)) u_size_fifo (
    .clk, .rst, .push(eb_commit), .in_data(eb_event_len), .pop(size_pop),
    .out_data(size_data), .full(size_full), .empty(size_empty), .count()
  );

  assign size_valid = !size_empty;

  a_stage: assert property (@(posedge clk) disable iff (rst) pa_stage_ovf == '0);
endmodule
