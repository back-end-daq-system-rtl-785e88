// readout_controller: merges the events of several Capture Blocks into one
// output stream.
//
// Each Capture Block offers committed events through its size FIFO (one
// length per event) and its event buffer. The controller picks, round robin,
// a Capture Block with a pending size entry, pops that entry and forwards
// exactly that many 64-bit words from the block's event buffer. The output
// is a valid/ready word stream with out_sop on the first word of an event,
// out_eop on the last, and out_src naming the Capture Block. Merging several
// Capture Blocks packet by packet follows the described system; the framing
// of the result into the SLink protocol for the optical link is not
// modelled here, and the arbitration order is this design's choice.
module readout_controller #(
  parameter int unsigned NUM_CB = 2
)(
  input  logic                            clk,
  input  logic                            rst,
  input  logic [NUM_CB-1:0]               size_valid,
  input  logic [NUM_CB-1:0][15:0]         size_data,
  output logic [NUM_CB-1:0]               size_pop,
  input  logic [NUM_CB-1:0]               ev_valid,
  input  logic [NUM_CB-1:0][63:0]         ev_data,
  output logic [NUM_CB-1:0]               ev_ready,
  output logic                            out_valid,
  output logic [63:0]                     out_data,
  output logic                            out_sop,
  output logic                            out_eop,
  output logic [$clog2(NUM_CB+1)-1:0]     out_src,
  input  logic                            out_ready
);
  localparam int unsigned SW = $clog2(NUM_CB+1);
  localparam int unsigned IW = (NUM_CB > 1) ? $clog2(NUM_CB) : 1;

  logic          active;
  logic [IW-1:0] cur, last;
  logic [15:0]   remain;
  logic          first;
  logic [IW-1:0] pick;
  logic          pick_valid;

  always_comb begin
    logic [IW-1:0] idx;
    pick       = '0;
    pick_valid = 1'b0;
    for (int i = 1; i <= NUM_CB; i++) begin
      idx = IW'((32'(last) + i) % NUM_CB);
      if (!pick_valid && size_valid[idx] && size_data[idx] != 16'd0) begin
        pick       = idx;
        pick_valid = 1'b1;
      end
    end
  end

  always_comb begin
    size_pop  = '0;
    ev_ready  = '0;
    out_valid = active && ev_valid[cur];
    out_data  = ev_data[cur];
    out_sop   = first;
    out_eop   = (remain == 16'd1);
    out_src   = SW'(cur);
    if (!active && pick_valid) size_pop[pick] = 1'b1;
    if (active) ev_ready[cur] = out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      cur    <= '0;
      last   <= IW'(NUM_CB - 1);
      remain <= '0;
      first  <= 1'b0;
    end else if (!active) begin
      if (pick_valid) begin
        active <= 1'b1;
        cur    <= pick;
        last   <= pick;
        remain <= size_data[pick];
        first  <= 1'b1;
      end
    end else if (out_valid && out_ready) begin
      first  <= 1'b0;
      remain <= remain - 1'b1;
      if (remain == 16'd1) active <= 1'b0;
    end
  end

  a_sop_eop: assert property (@(posedge clk) disable iff (rst) out_valid |-> (remain != 0));
endmodule
