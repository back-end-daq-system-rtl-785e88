// event_builder: packet matching, the last step of event building.
//
// A state machine that starts an event when an L1A timestamp waits in the
// L1A FIFO and the main buffer holds data (a packet for any enabled ECON-D),
// and the event buffer has room for a header. It then visits the enabled
// ECON-Ds in order 0..N_ECOND-1:
//   WAIT   - waits for a packet in the ECON-D's main-buffer region. If none
//            arrives within cfg timeout cycles the ECON-D is flagged timeout.
//   HDRCHK - reads the packet's first 64-bit word (the ECON-D header) and
//            compares its BX, event-counter and orbit fields with the low
//            bits of the local L1A timestamp. Equal: the packet is copied.
//            Different: the ECON-D is flagged mismatch and the packet is read
//            out of the main buffer and discarded.
//   COPY   - streams the rest of the packet from the main buffer into the
//            event buffer, one word per cycle (reads are pipelined, the
//            memory answers one cycle after rd_en), holding back when the
//            event buffer is nearly full.
// Overflow pulses from the packet assemblers (packets dropped for lack of
// space) are kept in a sticky flag per ECON-D and reported, then cleared,
// when that ECON-D is next handled. At the end the two Capture Block header
// words ({event, orbit} and {BX, tag, 12 x 4-bit flags}, see cb_pkg) are
// written in front of the packets, the event is committed and the L1A FIFO
// entry is popped. The start condition, the timestamp comparison, copying on
// a match and the flag set follow the described design; discarding a
// mismatched packet, the visit order and the timing are this design's
// choices. An enabled ECON-D that never sends data costs one timeout per
// event.
module event_builder
  import cb_pkg::*;
#(
  parameter int unsigned CNT_W = 10,
  parameter int unsigned EB_AW = 13
)(
  input  logic                           clk,
  input  logic                           rst,
  input  logic [N_ECOND-1:0]             econd_en,
  input  logic [23:0]                    timeout,
  // L1A FIFO
  input  logic                           l1a_empty,
  input  timestamp_t                     l1a_ts,
  output logic                           l1a_pop,
  // main buffer
  input  logic [N_ECOND-1:0][CNT_W-1:0]  pkt_count,
  output logic                           rd_en,
  output logic [ID_W-1:0]                rd_region,
  input  logic [63:0]                    rd_data,
  output logic                           pkt_done,
  output logic [ID_W-1:0]                pkt_done_region,
  input  logic [N_ECOND-1:0]             overflow,
  // event buffer
  input  logic [EB_AW-1:0]               eb_free,
  output logic                           eb_start,
  output logic                           eb_push,
  output logic [63:0]                    eb_push_data,
  output logic                           eb_hdr_we,
  output logic                           eb_hdr_idx,
  output logic [63:0]                    eb_hdr_data,
  output logic                           eb_commit,
  // monitoring
  output logic                           busy,
  output logic [N_ECOND-1:0]             flag_timeout,
  output logic [N_ECOND-1:0]             flag_mismatch
);
  typedef enum logic [2:0] {S_IDLE, S_SELECT, S_WAIT, S_HDRCHK, S_COPY, S_HDR0, S_HDR1} state_t;

  state_t                      state;
  logic [ID_W-1:0]             k;
  logic [23:0]                 timer;
  econd_flags_t [N_ECOND-1:0]  flags;
  logic [N_ECOND-1:0]          ovf_sticky;
  logic                        copy;
  logic [LEN_W:0]              to_issue, to_recv;
  logic                        rd_valid;
  logic [N_ECOND-1:0]          have_data;
  logic                        ts_match;
  logic [LEN_W:0]              len64;
  logic                        issue;
  logic                        hdr_go;

  always_comb begin
    for (int i = 0; i < N_ECOND; i++) have_data[i] = econd_en[i] && (pkt_count[i] != '0);
  end

  assign ts_match = (rd_data[63:52] == l1a_ts.bx)
                 && (rd_data[51:46] == l1a_ts.evt[5:0])
                 && (rd_data[45:43] == l1a_ts.orbit[2:0]);
  assign len64    = pkt_len64(hdr_len_of(rd_data[31:0]));

  // Header read in WAIT: the header word is pushed in the next cycle.
  assign hdr_go = have_data[k] && (eb_free > EB_AW'(1));

  // Read issue in COPY: keep room for this cycle's push and the word in flight.
  assign issue = (state == S_COPY) && (to_issue != '0) && (!copy || eb_free > EB_AW'(3));

  always_comb begin
    rd_en           = 1'b0;
    rd_region       = k;
    pkt_done        = 1'b0;
    pkt_done_region = k;
    eb_start        = 1'b0;
    eb_push         = 1'b0;
    eb_push_data    = rd_data;
    eb_hdr_we       = 1'b0;
    eb_hdr_idx      = 1'b0;
    eb_hdr_data     = '0;
    eb_commit       = 1'b0;
    l1a_pop         = 1'b0;
    unique case (state)
      S_IDLE:   eb_start = !l1a_empty && (have_data != '0) && (eb_free > EB_AW'(CB_HDR_WORDS + 1));
      S_WAIT:   rd_en = hdr_go;
      S_HDRCHK: begin
        eb_push  = ts_match;
        pkt_done = (len64 == (LEN_W+1)'(1));
      end
      S_COPY: begin
        rd_en    = issue;
        eb_push  = rd_valid && copy;
        pkt_done = rd_valid && (to_recv == (LEN_W+1)'(1));
      end
      S_HDR0: begin
        eb_hdr_we   = 1'b1;
        eb_hdr_idx  = 1'b0;
        eb_hdr_data = {l1a_ts.evt, l1a_ts.orbit};
      end
      S_HDR1: begin
        eb_hdr_we   = 1'b1;
        eb_hdr_idx  = 1'b1;
        eb_hdr_data = {l1a_ts.bx, CB_HDR_TAG, flags};
        eb_commit   = 1'b1;
        l1a_pop     = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      k             <= '0;
      timer         <= '0;
      flags         <= '0;
      ovf_sticky    <= '0;
      copy          <= 1'b0;
      to_issue      <= '0;
      to_recv       <= '0;
      rd_valid      <= 1'b0;
      flag_timeout  <= '0;
      flag_mismatch <= '0;
    end else begin
      rd_valid      <= rd_en;
      flag_timeout  <= '0;
      flag_mismatch <= '0;
      ovf_sticky    <= ovf_sticky | overflow;
      unique case (state)
        S_IDLE: begin
          if (eb_start) begin
            state <= S_SELECT;
            k     <= '0;
            flags <= '0;
          end
        end
        S_SELECT: begin
          timer <= '0;
          if (k == ID_W'(N_ECOND)) state <= S_HDR0;
          else if (!econd_en[k])   k <= k + 1'b1;
          else                     state <= S_WAIT;
        end
        S_WAIT: begin
          if (hdr_go) begin
            state <= S_HDRCHK;
          end else if (timer >= timeout) begin
            flags[k].timeout    <= 1'b1;
            flags[k].overflow   <= ovf_sticky[k];
            ovf_sticky[k]       <= overflow[k];
            flag_timeout[k]     <= 1'b1;
            k                   <= k + 1'b1;
            state               <= S_SELECT;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_HDRCHK: begin
          copy               <= ts_match;
          flags[k].present   <= ts_match;
          flags[k].mismatch  <= !ts_match;
          flag_mismatch[k]   <= !ts_match;
          to_issue           <= len64 - 1'b1;
          to_recv            <= len64 - 1'b1;
          if (len64 == (LEN_W+1)'(1)) begin
            flags[k].overflow <= ovf_sticky[k];
            ovf_sticky[k]     <= overflow[k];
            k                 <= k + 1'b1;
            state             <= S_SELECT;
          end else begin
            state <= S_COPY;
          end
        end
        S_COPY: begin
          if (issue) to_issue <= to_issue - 1'b1;
          if (rd_valid) begin
            to_recv <= to_recv - 1'b1;
            if (to_recv == (LEN_W+1)'(1)) begin
              flags[k].overflow <= ovf_sticky[k];
              ovf_sticky[k]     <= overflow[k];
              k                 <= k + 1'b1;
              state             <= S_SELECT;
            end
          end
        end
        S_HDR0: state <= S_HDR1;
        S_HDR1: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_l1a_present: assert property (@(posedge clk) disable iff (rst) l1a_pop |-> !l1a_empty);
endmodule
