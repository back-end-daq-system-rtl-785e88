// tb_daq_pkg: stimulus and reference helpers shared by the testbenches.
//
// front_end models the ECON-D side of one fibre pair: each ECON-D has a queue
// of 32-bit words and a list of e-links; on every bunch crossing each
// e-link carries the next word of its ECON-D (e-links of one ECON-D in
// ascending order) or an idle word. Packets are built with a reference CRC-8
// (polynomial long division, written independently of the RTL function) and
// their padded 64-bit image is returned for the expected-output model.
package tb_daq_pkg;

  localparam logic [8:0]  MARKER = 9'h154;
  localparam logic [31:0] IDLE   = 32'h5555_5500;

  // Reference CRC-8 (poly x^8+x^7+x^5+x^2+x+1 = 0x1A7): remainder of
  // data(x) * x^8 divided by the polynomial.
  function automatic logic [7:0] ref_crc8(input logic [55:0] data);
    logic [63:0] r;
    r = {data, 8'h00};
    for (int i = 63; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h1A7;
    return r[7:0];
  endfunction

  function automatic logic [63:0] make_header(input int len, input logic [11:0] bx,
                                              input logic [5:0] evt, input logic [2:0] orb,
                                              input bit bad_crc);
    logic [31:0] w0, w1;
    w0 = {MARKER, 9'(len), 14'h0A5};
    w1 = {bx, evt, orb, 3'b0, 8'h00};
    w1[7:0] = ref_crc8({w0, w1[31:8]}) ^ (bad_crc ? 8'h01 : 8'h00);
    return {w1, w0};
  endfunction

  class front_end;
    logic [31:0] q [12][$];
    int          elinks [12][$];

    function void map_elink(int econd, int elink);
      elinks[econd].push_back(elink);
    endfunction

    // Queue an idle + packet for an ECON-D; return its padded 64-bit words.
    function void add_packet(int k, int len, logic [11:0] bx, logic [5:0] evt,
                             logic [2:0] orb, bit bad_crc, ref logic [63:0] img [$]);
      logic [63:0] h;
      logic [31:0] words [$];
      h = make_header(len, bx, evt, orb, bad_crc);
      words.push_back(h[31:0]);
      words.push_back(h[63:32]);
      for (int i = 0; i < len; i++) words.push_back($urandom());
      if (words.size() % 2) words.push_back(32'h0);
      q[k].push_back(IDLE);
      for (int i = 0; i < len + 2; i++) q[k].push_back(words[i]);
      img.delete();
      for (int i = 0; i < words.size(); i += 2) img.push_back({words[i+1], words[i]});
    endfunction

    function void push_word(int k, logic [31:0] w);
      q[k].push_back(w);
    endfunction

    function logic [13:0][31:0] next_bx();
      logic [13:0][31:0] e;
      e = '0;
      for (int k = 0; k < 12; k++)
        foreach (elinks[k][j]) e[elinks[k][j]] = (q[k].size() != 0) ? q[k].pop_front() : IDLE;
      return e;
    endfunction

    function bit busy();
      for (int k = 0; k < 12; k++) if (q[k].size() != 0) return 1;
      return 0;
    endfunction
  endclass

endpackage
