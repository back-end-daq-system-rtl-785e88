// config_regs: software-visible configuration of one Capture Block.
//
// A plain synchronous register bus (we/addr/wdata, combinational rdata) of
// the kind a slow-control endpoint such as IPbus drives. Register map (32-bit
// registers, word addresses):
//   0x00+i  e-link i (i < 14):   [4] enable, [3:0] ECON-D id
//   0x10+k  ECON-D k (k < 12):   [0] enable (packet assembler and event builder)
//   0x20+k  ECON-D k:            [15:0] main-buffer region base (64-bit words)
//   0x30+k  ECON-D k:            [15:0] main-buffer region size (64-bit words)
//   0x40    event-builder timeout in 320 MHz cycles [23:0]
//   0x41    ECON-D header marker [8:0]
//   0x42    ECON-D idle pattern [23:0]
// Unmapped addresses read 0. After reset all e-links and ECON-Ds are
// disabled, regions are empty, the timeout is TIMEOUT_RST cycles and the
// marker and idle pattern take the cb_pkg defaults. That the e-link to ECON-D
// mapping and the memory allocation are software registers follows the
// described design; the bus, the map and the reset values are this design's.
module config_regs
  import cb_pkg::*;
#(
  parameter logic [23:0] TIMEOUT_RST = 24'd4096
)(
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [7:0]   addr,
  input  logic [31:0]  wdata,
  output logic [31:0]  rdata,
  output cb_cfg_t      cfg
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg              <= '0;
      cfg.timeout      <= TIMEOUT_RST;
      cfg.hdr_marker   <= DEF_HDR_MARKER;
      cfg.idle_pattern <= DEF_IDLE;
    end else if (we) begin
      unique case (addr[7:4])
        4'h0: if (addr[3:0] < 4'(N_ELINK)) begin
                cfg.elink_en[addr[3:0]] <= wdata[4];
                cfg.elink_id[addr[3:0]] <= wdata[3:0];
              end
        4'h1: if (addr[3:0] < 4'(N_ECOND)) cfg.econd_en[addr[3:0]]    <= wdata[0];
        4'h2: if (addr[3:0] < 4'(N_ECOND)) cfg.region_base[addr[3:0]] <= wdata[15:0];
        4'h3: if (addr[3:0] < 4'(N_ECOND)) cfg.region_size[addr[3:0]] <= wdata[15:0];
        4'h4: unique case (addr[3:0])
                4'h0: cfg.timeout      <= wdata[23:0];
                4'h1: cfg.hdr_marker   <= wdata[8:0];
                4'h2: cfg.idle_pattern <= wdata[23:0];
                default: ;
              endcase
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr[7:4])
      4'h0: if (addr[3:0] < 4'(N_ELINK)) rdata = {27'h0, cfg.elink_en[addr[3:0]], cfg.elink_id[addr[3:0]]};
      4'h1: if (addr[3:0] < 4'(N_ECOND)) rdata = {31'h0, cfg.econd_en[addr[3:0]]};
      4'h2: if (addr[3:0] < 4'(N_ECOND)) rdata = {16'h0, cfg.region_base[addr[3:0]]};
      4'h3: if (addr[3:0] < 4'(N_ECOND)) rdata = {16'h0, cfg.region_size[addr[3:0]]};
      4'h4: unique case (addr[3:0])
              4'h0: rdata = {8'h0, cfg.timeout};
              4'h1: rdata = {23'h0, cfg.hdr_marker};
              4'h2: rdata = {8'h0, cfg.idle_pattern};
              default: ;
            endcase
      default: ;
    endcase
  end
endmodule
