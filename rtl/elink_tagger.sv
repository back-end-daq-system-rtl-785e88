// elink_tagger: labels each 32-bit e-link word of the serialised stream with
// the id of the ECON-D that drives that e-link.
//
// The id and an enable bit of every e-link come from configuration registers
// written by software, so one gateware serves any mapping of up to 12 ECON-Ds
// onto the 14 e-links. The input is one 64-bit pair word per cycle with its
// pair index p (lower half = e-link 2p, upper half = e-link 2p+1). The output
// is registered (one cycle latency): the same data with a valid bit and an id
// for each half. Disabled e-links produce an invalid half.
module elink_tagger
  import cb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_ELINK-1:0]            elink_en,
  input  logic [N_ELINK-1:0][ID_W-1:0]  elink_id,
  input  logic                          in_valid,
  input  logic [63:0]                   in_data,
  input  logic [$clog2(N_PAIR)-1:0]     in_pair,
  output logic [63:0]                   out_data,
  output logic [1:0]                    out_valid,   // per 32-bit half
  output logic [1:0][ID_W-1:0]          out_id
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= '0;
      out_data  <= '0;
      out_id    <= '0;
    end else begin
      out_data  <= in_data;
      for (int h = 0; h < 2; h++) begin
        out_valid[h] <= in_valid && elink_en[2*in_pair + h];
        out_id[h]    <= elink_id[2*in_pair + h];
      end
    end
  end
endmodule
