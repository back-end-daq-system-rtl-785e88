// main_buffer: the shared packet memory of the Capture Block.
//
// One memory of MEM_DEPTH 64-bit words (URAM on the target FPGA) is shared by
// all N_ECOND packet assemblers. Software divides it into one circular region
// per ECON-D (region_base/region_size, in 64-bit words), sized to the expected
// data rate of each ECON-D; an unused ECON-D can be given no memory. This
// software-controlled sharing follows the described design. The rest is this
// design's choice:
//  * Space: a packet assembler reserves a whole packet (reserve/reserve_len)
//    when it accepts the packet header; free_words = region_size - (reserved
//    words not yet read out). A packet is thus never cut short by a full
//    region: it is dropped whole by its assembler instead.
//  * Write: one 64-bit word per cycle. A round-robin arbiter grants one of the
//    assemblers' staging FIFOs (wr_valid/wr_ready). The input of a fibre pair
//    is at most 14 x 32 bits per 8 cycles, below one 64-bit word per cycle,
//    so one port keeps up. A word flagged wr_last completes a packet, which
//    then counts in pkt_count.
//  * Read: the event builder reads a region in order: rd_en with rd_region
//    returns the word at the region's read pointer on rd_data one cycle later
//    and advances the pointer. pkt_done retires one packet of a region.
// Region limits must be programmed before reset is released and held while
// running; they are not checked for overlap.
module main_buffer
  import cb_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned CNT_W     = 10
)(
  input  logic                              clk,
  input  logic                              rst,
  input  logic [N_ECOND-1:0][15:0]          region_base,
  input  logic [N_ECOND-1:0][15:0]          region_size,
  // packet assemblers
  input  logic [N_ECOND-1:0]                reserve,
  input  logic [N_ECOND-1:0][LEN_W:0]       reserve_len,
  output logic [N_ECOND-1:0][15:0]          free_words,
  input  logic [N_ECOND-1:0]                wr_valid,
  input  logic [N_ECOND-1:0][63:0]          wr_data,
  input  logic [N_ECOND-1:0]                wr_last,
  output logic [N_ECOND-1:0]                wr_ready,
  // event builder
  output logic [N_ECOND-1:0][CNT_W-1:0]     pkt_count,
  input  logic                              rd_en,
  input  logic [ID_W-1:0]                   rd_region,
  output logic [63:0]                       rd_data,
  input  logic                              pkt_done,
  input  logic [ID_W-1:0]                   pkt_done_region
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);
  localparam int unsigned GW = $clog2(N_ECOND);

  logic [63:0] mem [MEM_DEPTH];

  logic [N_ECOND-1:0][15:0] wr_off, rd_off;
  logic [N_ECOND-1:0][16:0] used;
  logic [GW-1:0]            last_grant;
  logic [GW-1:0]            grant;
  logic                     grant_valid;

  // Round-robin arbiter, starting after the last granted assembler.
  always_comb begin
    logic [GW-1:0] idx;
    grant       = '0;
    grant_valid = 1'b0;
    for (int i = 1; i <= N_ECOND; i++) begin
      idx = GW'((32'(last_grant) + i) % N_ECOND);
      if (!grant_valid && wr_valid[idx]) begin
        grant       = idx;
        grant_valid = 1'b1;
      end
    end
    wr_ready = '0;
    if (grant_valid) wr_ready[grant] = 1'b1;
  end

  always_comb begin
    for (int k = 0; k < N_ECOND; k++)
      free_words[k] = (17'(region_size[k]) > used[k]) ? 16'(17'(region_size[k]) - used[k]) : 16'd0;
  end

  function automatic logic [15:0] wrap_inc(input logic [15:0] off, input logic [15:0] size);
    return (off + 16'd1 >= size) ? 16'd0 : off + 16'd1;
  endfunction

  // Memory write and read ports.
  always_ff @(posedge clk) begin
    if (grant_valid)
      mem[AW'(region_base[grant] + wr_off[grant])] <= wr_data[grant];
    if (rd_en)
      rd_data <= mem[AW'(region_base[rd_region] + rd_off[rd_region])];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_off     <= '0;
      rd_off     <= '0;
      used       <= '0;
      pkt_count  <= '0;
      last_grant <= GW'(N_ECOND - 1);
    end else begin
      if (grant_valid) begin
        last_grant     <= grant;
        wr_off[grant]  <= wrap_inc(wr_off[grant], region_size[grant]);
      end
      if (rd_en)
        rd_off[rd_region] <= wrap_inc(rd_off[rd_region], region_size[rd_region]);
      for (int k = 0; k < N_ECOND; k++) begin
        used[k] <= used[k]
                   + (reserve[k] ? 17'(reserve_len[k]) : 17'd0)
                   - ((rd_en && rd_region == ID_W'(k)) ? 17'd1 : 17'd0);
        pkt_count[k] <= pkt_count[k]
                   + CNT_W'(grant_valid && grant == GW'(k) && wr_last[k])
                   - CNT_W'(pkt_done && pkt_done_region == ID_W'(k));
      end
    end
  end

  a_rd_region: assert property (@(posedge clk) disable iff (rst)
                                rd_en |-> (rd_region < ID_W'(N_ECOND)));
endmodule
