// elink_serialiser: turns the 14 parallel 32-bit e-link words of one bunch
// crossing into a 64-bit stream at the 320 MHz processing clock.
//
// On the cycle bx_strobe is high (once per 40 MHz bunch crossing, i.e. every
// FRAME_LEN = 8 cycles) the 14 e-link words are captured. During the
// following N_PAIR = 7 cycles the pairs are sent out in ascending order:
// out_data = {elink[2p+1], elink[2p]} with out_pair = p. The eighth cycle of
// the frame carries nothing (out_valid low). Grouping e-links in pairs on a
// 64-bit bus at 320 MHz follows the described system; the ascending pair
// order and the one-cycle capture latency are this design's choice.
// bx_strobe must not come more often than every N_PAIR+1 cycles.
module elink_serialiser
  import cb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          bx_strobe,
  input  logic [N_ELINK-1:0][31:0]      elink_data,
  output logic                          out_valid,
  output logic [63:0]                   out_data,
  output logic [$clog2(N_PAIR)-1:0]     out_pair
);
  localparam int unsigned PW = $clog2(N_PAIR);

  logic [N_ELINK-1:0][31:0] hold;
  logic [PW-1:0]            pair;
  logic                     busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      pair <= '0;
      hold <= '0;
    end else if (bx_strobe) begin
      hold <= elink_data;
      busy <= 1'b1;
      pair <= '0;
    end else if (busy) begin
      if (pair == PW'(N_PAIR - 1)) busy <= 1'b0;
      pair <= pair + 1'b1;
    end
  end

  always_comb begin
    out_valid = busy;
    out_pair  = pair;
    out_data  = {hold[2*pair+1], hold[2*pair]};
  end
endmodule
