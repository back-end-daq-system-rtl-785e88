// sync_fifo: single-clock first-in first-out queue.
//
// Used for the L1A timestamp FIFO (timestamps waiting for the event builder)
// and the size buffer FIFO (length of each event in the event buffer). WIDTH
// bits wide, DEPTH entries (a power of two). push writes in_data when not
// full; pop removes the head when not empty. The head is always visible on
// out_data (first-word fall-through). count gives the occupancy. Pushing when
// full or popping when empty is ignored and flagged by an assertion.
module sync_fifo #(
  parameter int unsigned WIDTH = 76,
  parameter int unsigned DEPTH = 16
)(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         in_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         out_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full     = (count == (AW+1)'(DEPTH));
  assign empty    = (count == '0);
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign out_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overrun:  assert property (@(posedge clk) disable iff (rst) !(push && full));
  a_no_underrun: assert property (@(posedge clk) disable iff (rst) !(pop && empty));
endmodule
