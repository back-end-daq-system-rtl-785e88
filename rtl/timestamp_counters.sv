// timestamp_counters: local LHC orbit, bunch-crossing (BX) and event counters.
//
// The fast commands arrive with bx_strobe, which is high for one 320 MHz
// cycle per 40 MHz bunch crossing. On each strobe the BX counter advances;
// bc0 (bunch crossing zero, start of an orbit) sets it back to 0 and
// advances the orbit counter. It also wraps after BX_PER_ORBIT crossings
// when no bc0 comes. ocr and ecr clear the orbit and event counters. An l1a
// (Level-1 Accept) advances the event counter and outputs the timestamp of
// the accepted crossing - {event number, BX, orbit} - for one cycle on
// l1a_valid/l1a_ts, to be queued in the L1A FIFO. The first event after reset
// or ecr is number 1. Keeping the three counters and storing them on an L1A
// follows the described design; the fast-command names, counter widths and
// the reset values are this design's choices.
module timestamp_counters
  import cb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        bx_strobe,
  input  logic        bc0,
  input  logic        l1a,
  input  logic        ocr,
  input  logic        ecr,
  output logic        l1a_valid,
  output timestamp_t  l1a_ts,
  output timestamp_t  now
);
  logic [BX_W-1:0]    bx, bx_cur;
  logic [ORBIT_W-1:0] orbit, orbit_cur;
  logic [EVT_W-1:0]   evt, evt_cur;

  // Counter values of the crossing being signalled by this strobe.
  always_comb begin
    orbit_cur = orbit;
    bx_cur    = bx + 1'b1;
    if (ocr) orbit_cur = '0;
    if (bc0) begin
      bx_cur    = '0;
      orbit_cur = orbit_cur + 1'b1;
    end else if (bx == BX_W'(BX_PER_ORBIT - 1)) begin
      bx_cur    = '0;
      orbit_cur = orbit_cur + 1'b1;
    end
    evt_cur = ecr ? '0 : evt;
    if (l1a) evt_cur = evt_cur + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bx        <= BX_W'(BX_PER_ORBIT - 1);
      orbit     <= '0;
      evt       <= '0;
      l1a_valid <= 1'b0;
      l1a_ts    <= '0;
    end else begin
      l1a_valid <= 1'b0;
      if (bx_strobe) begin
        bx    <= bx_cur;
        orbit <= orbit_cur;
        evt   <= evt_cur;
        if (l1a) begin
          l1a_valid <= 1'b1;
          l1a_ts    <= '{evt: evt_cur, bx: bx_cur, orbit: orbit_cur};
        end
      end
    end
  end

  assign now = '{evt: evt, bx: bx, orbit: orbit};
endmodule
