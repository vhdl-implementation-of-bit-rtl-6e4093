// bt_ref_pkg: reference arithmetic for the bitstream datapath testbenches.
//
// Works on polynomials over GF(2) directly instead of modelling shift
// registers. A divider of width W, preloaded with S0 (position i = coefficient
// of D^i) and fed with message bits m_0 .. m_{n-1}, holds afterwards
//   R = (S0 * D^n + D^W * M(D)) mod g(D),   M(D) = sum m_k D^(n-1-k).
// The whitening sequence bit j is the D^6 coefficient of S0 * D^j mod g(D).
package bt_ref_pkg;

  // Remainder of the polynomial whose coefficients are given highest degree
  // first, divided by g_full (which includes its D^w term).
  function automatic longint unsigned pmod(input bit coeffs[$], input int w,
                                           input longint unsigned g_full);
    longint unsigned r = 0;
    foreach (coeffs[i]) begin
      r = (r << 1) | longint'(coeffs[i]);
      if (r[w]) r ^= g_full;
    end
    return r;
  endfunction

  // Divider contents after the message bits msg (msg[0] entered first).
  function automatic longint unsigned divider(input longint unsigned s0, input bit msg[$],
                                              input int w, input longint unsigned g_full);
    bit c[$];
    int n = msg.size();
    for (int d = w + n - 1; d >= 0; d--) begin
      bit b = 0;
      if (d - n >= 0 && d - n < w) b ^= s0[d - n];
      if (d >= w) b ^= msg[w + n - 1 - d];
      c.push_back(b);
    end
    return pmod(c, w, g_full);
  endfunction

  // Bit j of the whitening sequence for the 7-bit initial state s0.
  function automatic bit whiten_bit(input logic [6:0] s0, input int j);
    bit c[$];
    for (int d = 6 + j; d >= 0; d--) c.push_back((d >= j) ? s0[d - j] : 1'b0);
    return pmod(c, 7, 64'h91) >> 6;
  endfunction

  localparam longint unsigned G_HEC = 64'h1A7;    // D^8+D^7+D^5+D^2+D+1
  localparam longint unsigned G_CRC = 64'h11021;  // D^16+D^12+D^5+1

  // the whitening initial word: 1, then CLK6..CLK1 with CLK1 in position 0
  function automatic logic [6:0] whiten_init(input logic [6:1] clk_bits);
    return {1'b1, clk_bits};
  endfunction

  // Whitened air bits of one packet: header LSB first, HEC (position 7
  // first), and, when there is a payload, the payload and its CRC (position
  // 15 first), all XORed with one continuous whitening sequence.
  function automatic void build_packet(input logic [7:0] uap, input logic [6:1] cb,
                                       input logic [9:0] hdr, input bit pl[$],
                                       output bit air[$]);
    bit plain[$], h[$];
    logic [7:0]  hec;
    logic [15:0] crc;
    for (int i = 0; i < 10; i++) h.push_back(hdr[i]);
    hec = 8'(divider(longint'(uap), h, 8, G_HEC));
    plain = h;
    for (int i = 7; i >= 0; i--) plain.push_back(hec[i]);
    if (pl.size() > 0) begin
      crc = 16'(divider(longint'(uap), pl, 16, G_CRC));
      foreach (pl[i]) plain.push_back(pl[i]);
      for (int i = 15; i >= 0; i--) plain.push_back(crc[i]);
    end
    air.delete();
    foreach (plain[j]) air.push_back(plain[j] ^ whiten_bit(whiten_init(cb), j % 127));
  endfunction

endpackage
