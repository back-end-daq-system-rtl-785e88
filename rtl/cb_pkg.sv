// cb_pkg: constants, types and helper functions shared by the Capture Block
// modules.
//
// The Capture Block takes the e-links of one fibre pair (14 e-links of 32 bits
// each, refreshed at the 40 MHz LHC bunch-crossing rate), serialised two
// e-links at a time onto a 64-bit bus at 320 MHz, and builds events from up to
// 12 ECON-D data streams. The counts 14, 12, 64-bit and 320/40 MHz follow the
// described system; field layouts of the ECON-D header, the CRC polynomial and
// the Capture Block header layout are this design's own choices, collected
// here so they can be changed in one place.
package cb_pkg;

  // Fibre-pair geometry.
  localparam int unsigned N_ELINK   = 14;  // e-links per fibre pair
  localparam int unsigned N_PAIR    = N_ELINK / 2; // 64-bit words per BX
  localparam int unsigned N_ECOND   = 12;  // ECON-Ds per fibre pair
  localparam int unsigned FRAME_LEN = 8;   // 320 MHz cycles per 40 MHz BX
  localparam int unsigned ID_W      = 4;   // ECON-D id width

  // LHC timing.
  localparam int unsigned BX_PER_ORBIT = 3564;

  // ECON-D header (two 32-bit words, w0 first on the link).
  //   w0[31:23] header marker, w0[22:14] payload length in 32-bit words
  //             (not counting the two header words), w0[13:0] not inspected.
  //   w1[31:20] BX, w1[19:14] event counter (6 LSBs), w1[13:11] orbit (3 LSBs),
  //   w1[10:8]  not inspected, w1[7:0] CRC-8 over w0 and w1[31:8].
  localparam logic [8:0]  DEF_HDR_MARKER = 9'h154;
  localparam logic [23:0] DEF_IDLE       = 24'h555555;
  localparam logic [7:0]  CRC8_POLY      = 8'hA7;
  localparam int unsigned LEN_W          = 9;

  // Width of the local counters.
  localparam int unsigned EVT_W   = 32;
  localparam int unsigned BX_W    = 12;
  localparam int unsigned ORBIT_W = 32;

  typedef struct packed {
    logic [EVT_W-1:0]   evt;
    logic [BX_W-1:0]    bx;
    logic [ORBIT_W-1:0] orbit;
  } timestamp_t;

  // Per-ECON-D error flags written in the Capture Block header.
  typedef struct packed {
    logic overflow;   // packet(s) dropped because the main-buffer region was full
    logic timeout;    // no packet arrived within the timeout
    logic mismatch;   // packet timestamp differs from the local L1A timestamp
    logic present;    // packet copied into the event
  } econd_flags_t;

  // Capture Block header: two 64-bit words ahead of the ECON-D packets.
  //   word 0 = {event counter[31:0], orbit counter[31:0]}
  //   word 1 = {BX[11:0], 4'hC, 12 x econd_flags_t (ECON-D 11 in the MSBs)}
  localparam int unsigned CB_HDR_WORDS = 2;
  localparam logic [3:0]  CB_HDR_TAG   = 4'hC;

  // Software configuration of one Capture Block.
  typedef struct packed {
    logic [N_ELINK-1:0]               elink_en;
    logic [N_ELINK-1:0][ID_W-1:0]     elink_id;
    logic [N_ECOND-1:0]               econd_en;
    logic [N_ECOND-1:0][15:0]         region_base;  // in 64-bit words
    logic [N_ECOND-1:0][15:0]         region_size;  // in 64-bit words
    logic [23:0]                      timeout;      // 320 MHz cycles
    logic [8:0]                       hdr_marker;
    logic [23:0]                      idle_pattern;
  } cb_cfg_t;

  // CRC-8, MSB first, initial value 0, no final XOR.
  function automatic logic [7:0] crc8_56(input logic [55:0] data);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 55; i >= 0; i--) begin
      if (c[7] ^ data[i]) c = (c << 1) ^ CRC8_POLY;
      else                c = c << 1;
    end
    return c;
  endfunction

  function automatic logic [8:0] hdr_marker_of(input logic [31:0] w0);
    return w0[31:23];
  endfunction

  function automatic logic [LEN_W-1:0] hdr_len_of(input logic [31:0] w0);
    return w0[22:14];
  endfunction

  // Number of 64-bit words a packet of the given payload length occupies
  // once padded: (2 header words + payload, rounded up to even) / 2.
  function automatic logic [LEN_W:0] pkt_len64(input logic [LEN_W-1:0] len);
    return (LEN_W+1)'((32'(len) + 3) >> 1);
  endfunction

endpackage
