// packet_assembler: packet detection for one ECON-D stream.
//
// Input is the word assembler's output: 0, 1 or 2 32-bit words per cycle.
// The assembler scans them in order with a small state machine:
//   SEARCH  - idle words (bits [31:8] equal to idle_pattern) arm detection;
//             a word carrying hdr_marker in bits [31:23] right after an idle
//             word is taken as header word 0. Anything else is discarded.
//   HDR1    - the next word is header word 1. The CRC-8 of the header is
//             recomputed (cb_pkg::crc8_56) and compared with its bits [7:0].
//             On a mismatch the candidate is discarded and the search resumes.
//             On a match the packet size is checked against the free space of
//             this ECON-D's main-buffer region: if it fits, the space is
//             reserved (reserve/reserve_len) and the packet is kept (PAYLOAD);
//             if not, the packet is skipped (DROP) and overflow pulses.
//   PAYLOAD - header and payload words are forwarded; after the last one a
//             zero padding word is appended when the packet has an odd number
//             of 32-bit words, so that every packet fills whole 64-bit words.
//   DROP    - payload words of a rejected packet are discarded.
// Kept words are packed into 64-bit words (first word in the low half) and
// queued in a small staging FIFO, up to two per cycle; the main buffer drains
// it one word per grant (out_valid/out_ready), out_last marking the final
// word of each packet. Idle filtering, header detection after an idle, the
// header CRC check and 64-bit padding follow the described design; the
// staging FIFO, the space reservation and the drop-on-full policy are this
// design's choices. stage_ovf flags a staging FIFO overrun, which the
// arbitration in the main buffer is sized to prevent.
module packet_assembler
  import cb_pkg::*;
#(
  parameter int unsigned STAGE_DEPTH = 16
)(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic [8:0]           hdr_marker,
  input  logic [23:0]          idle_pattern,
  input  logic [1:0]           in_cnt,
  input  logic [63:0]          in_data,
  // main-buffer region space
  input  logic [15:0]          free_words,
  output logic                 reserve,
  output logic [LEN_W:0]       reserve_len,
  output logic                 overflow,
  output logic                 crc_err,
  output logic                 pkt_start,
  // staged 64-bit words towards the main buffer
  output logic                 out_valid,
  output logic [63:0]          out_data,
  output logic                 out_last,
  input  logic                 out_ready,
  output logic                 stage_ovf
);
  typedef enum logic [1:0] {S_SEARCH, S_HDR1, S_PAYLOAD, S_DROP} state_t;

  localparam int unsigned SW = $clog2(STAGE_DEPTH);

  state_t             state_q, state_d;
  logic               prev_idle_q, prev_idle_d;
  logic [31:0]        w0_q, w0_d;
  logic [LEN_W-1:0]   remain_q, remain_d;
  logic               pend_q, pend_d;
  logic [31:0]        pend_word_q, pend_word_d;

  logic [3:0][31:0]   wbuf;
  logic [3:0]         wlast;
  logic [2:0]         n;
  logic [1:0]         n64;
  logic [1:0][64:0]   push_word;   // {last, data}

  always_comb begin
    logic [31:0] w;
    state_d     = state_q;
    prev_idle_d = prev_idle_q;
    w0_d        = w0_q;
    remain_d    = remain_q;
    reserve     = 1'b0;
    reserve_len = '0;
    overflow    = 1'b0;
    crc_err     = 1'b0;
    pkt_start   = 1'b0;
    wbuf        = '0;
    wlast       = '0;
    n           = '0;
    if (pend_q) begin
      wbuf[0] = pend_word_q;
      n       = 3'd1;
    end
    for (int i = 0; i < 2; i++) begin
      if (enable && (2'(i) < in_cnt)) begin
        w = in_data[32*i +: 32];
        unique case (state_d)
          S_SEARCH: begin
            if (w[31:8] == idle_pattern) begin
              prev_idle_d = 1'b1;
            end else begin
              if (prev_idle_d && hdr_marker_of(w) == hdr_marker) begin
                w0_d    = w;
                state_d = S_HDR1;
              end
              prev_idle_d = 1'b0;
            end
          end
          S_HDR1: begin
            prev_idle_d = 1'b0;
            if (crc8_56({w0_d, w[31:8]}) != w[7:0]) begin
              crc_err     = 1'b1;
              state_d     = S_SEARCH;
              prev_idle_d = (w[31:8] == idle_pattern);
            end else if (16'(pkt_len64(hdr_len_of(w0_d))) > free_words) begin
              overflow = 1'b1;
              remain_d = hdr_len_of(w0_d);
              state_d  = (remain_d == 0) ? S_SEARCH : S_DROP;
            end else begin
              reserve      = 1'b1;
              pkt_start    = 1'b1;
              reserve_len  = pkt_len64(hdr_len_of(w0_d));
              remain_d     = hdr_len_of(w0_d);
              wbuf[n[1:0]] = w0_d;
              n            = n + 3'd1;
              wbuf[n[1:0]] = w;
              n            = n + 3'd1;
              if (remain_d == 0) begin
                state_d = S_SEARCH;
                wlast[n[1:0] - 2'd1] = 1'b1;
                if (n[0]) begin
                  wbuf[n[1:0]]  = 32'h0;
                  wlast[n[1:0]] = 1'b1;
                  n = n + 3'd1;
                end
              end else begin
                state_d = S_PAYLOAD;
              end
            end
          end
          S_PAYLOAD: begin
            wbuf[n[1:0]] = w;
            n            = n + 3'd1;
            remain_d     = remain_d - 1'b1;
            if (remain_d == 0) begin
              state_d = S_SEARCH;
              wlast[n[1:0] - 2'd1] = 1'b1;
              if (n[0]) begin
                wbuf[n[1:0]]  = 32'h0;
                wlast[n[1:0]] = 1'b1;
                n = n + 3'd1;
              end
            end
          end
          default: begin // S_DROP
            remain_d = remain_d - 1'b1;
            if (remain_d == 0) state_d = S_SEARCH;
          end
        endcase
      end
    end
    n64         = n[2:1];
    pend_d      = n[0];
    pend_word_d = n[0] ? wbuf[n[1:0] - 2'd1] : 32'h0;
    for (int j = 0; j < 2; j++)
      push_word[j] = {wlast[2*j] | wlast[2*j+1], wbuf[2*j+1], wbuf[2*j]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q     <= S_SEARCH;
      prev_idle_q <= 1'b0;
      w0_q        <= '0;
      remain_q    <= '0;
      pend_q      <= 1'b0;
      pend_word_q <= '0;
    end else begin
      state_q     <= state_d;
      prev_idle_q <= prev_idle_d;
      w0_q        <= w0_d;
      remain_q    <= remain_d;
      pend_q      <= pend_d;
      pend_word_q <= pend_word_d;
    end
  end

  // Staging FIFO: up to two pushes and one pop per cycle.
  logic [64:0]  stage_mem [STAGE_DEPTH];
  logic [SW-1:0] wp, rp;
  logic [SW:0]   count;
  logic          pop, fits;

  assign pop       = out_valid && out_ready;
  assign fits      = (32'(count) + 32'(n64)) <= STAGE_DEPTH;
  assign out_valid = (count != 0);
  assign out_data  = stage_mem[rp][63:0];
  assign out_last  = stage_mem[rp][64];
  assign stage_ovf = (n64 != 0) && !fits;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (fits) begin
        if (n64 >= 2'd1) stage_mem[wp] <= push_word[0];
        if (n64 == 2'd2) stage_mem[wp + 1'b1] <= push_word[1];
        wp <= wp + SW'(n64);
      end
      if (pop) rp <= rp + 1'b1;
      count <= count + (fits ? (SW+1)'(n64) : '0) - (SW+1)'(pop);
    end
  end

  // Reading an empty or writing a full staging FIFO is a design error.
  a_no_stage_ovf: assert property (@(posedge clk) disable iff (rst) !stage_ovf);
endmodule
