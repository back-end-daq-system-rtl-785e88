// word_assembler: extracts the words of one ECON-D from the tagged stream.
//
// Each cycle the tagged stream carries up to two 32-bit e-link words, each
// with an ECON-D id. The assembler keeps the words whose id equals its own
// (input econd_id) and packs them to the low end: out_cnt tells how many
// words (0, 1 or 2) are valid, the first in out_data[31:0] and the second in
// out_data[63:32]. Because pairs arrive in ascending e-link order, an ECON-D
// spread over several e-links keeps its word order. Output is registered
// (one cycle latency). A disabled assembler outputs nothing.
module word_assembler
  import cb_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    enable,
  input  logic [ID_W-1:0]         econd_id,
  input  logic [63:0]             in_data,
  input  logic [1:0]              in_valid,
  input  logic [1:0][ID_W-1:0]    in_id,
  output logic [1:0]              out_cnt,
  output logic [63:0]             out_data
);
  logic [1:0] hit;

  always_comb begin
    for (int h = 0; h < 2; h++) hit[h] = enable && in_valid[h] && (in_id[h] == econd_id);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_cnt  <= '0;
      out_data <= '0;
    end else begin
      unique case (hit)
        2'b00: begin out_cnt <= 2'd0; out_data <= '0; end
        2'b01: begin out_cnt <= 2'd1; out_data <= {32'h0, in_data[31:0]}; end
        2'b10: begin out_cnt <= 2'd1; out_data <= {32'h0, in_data[63:32]}; end
        2'b11: begin out_cnt <= 2'd2; out_data <= in_data; end
      endcase
    end
  end
endmodule
