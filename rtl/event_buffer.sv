// event_buffer: the event buffer FIFO, output interface of the Capture Block.
//
// A circular memory of DEPTH 64-bit words written by the event builder and
// read by the readout side. Because the Capture Block header carries error
// flags that are only known once every ECON-D has been handled, the builder
// writes an event out of order: start reserves CB_HDR_WORDS words for the
// header at the current write pointer, push appends the ECON-D packet words
// after them, hdr_we fills in header word hdr_idx at the reserved place, and
// commit makes the whole event visible to the reader. event_len is the length
// of the event being built (header included), which is what the size buffer
// FIFO stores on commit. Only committed words can be read: out_valid/out_data
// show the oldest word (first-word fall-through) and out_ready removes it.
// free counts words that may still be written. Using a FIFO for the output and
// a separate size FIFO follows the described design; the header reservation
// and commit are this design's choice.
module event_buffer
  import cb_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
)(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   push,
  input  logic [63:0]            push_data,
  input  logic                   hdr_we,
  input  logic                   hdr_idx,
  input  logic [63:0]            hdr_data,
  input  logic                   commit,
  output logic [15:0]            event_len,
  output logic [$clog2(DEPTH):0] free,
  output logic                   out_valid,
  output logic [63:0]            out_data,
  input  logic                   out_ready
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0] mem [DEPTH];
  logic [AW:0] wp, cp, rp, base;
  logic [AW:0] len_now;

  assign free      = (AW+1)'(DEPTH) - (wp - rp);
  assign len_now   = wp - base;
  assign event_len = 16'(len_now);
  assign out_valid = (rp != cp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push)   mem[wp[AW-1:0]] <= push_data;
    if (hdr_we) mem[AW'(base + (AW+1)'(hdr_idx))] <= hdr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      cp   <= '0;
      rp   <= '0;
      base <= '0;
    end else begin
      if (start) begin
        base <= wp;
        wp   <= wp + (AW+1)'(CB_HDR_WORDS);
      end else if (push) begin
        wp <= wp + 1'b1;
      end
      if (commit) cp <= wp;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) push |-> (free != 0));
  a_no_start_push: assert property (@(posedge clk) disable iff (rst) !(start && push));
endmodule
