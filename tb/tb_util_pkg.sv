// tb_util_pkg: frame construction and reference functions for the testbenches.
//
// build_frame() assembles an Ethernet frame (optional one or two VLAN tags,
// optional IPv4 with TCP or UDP and a payload) with correct IPv4 header and
// transport checksums. The reference functions (bit-serial CRC32 and CRC64,
// full checksum recomputation, H3 hash) are written independently of the RTL.
package tb_util_pkg;
  import secan_pkg::*;

  typedef byte unsigned bytes_t[$];

  typedef struct {
    logic [47:0] dmac, smac;
    int          nvlan;
    logic [15:0] vlan1, vlan2;
    logic [15:0] etype;     // used when not IPv4
    bit          ip;
    logic [31:0] sip, dip;
    logic [7:0]  proto;     // 6 TCP, 17 UDP, other: no ports
    logic [15:0] sport, dport;
    bytes_t      payload;
  } fspec_t;

  function automatic fspec_t default_spec();
    fspec_t s;
    s.dmac = 48'h0200_0000_0001; s.smac = 48'h0200_0000_0002;
    s.nvlan = 0; s.vlan1 = 16'h0064; s.vlan2 = 16'h00C8;
    s.etype = 16'h0806; s.ip = 1; s.sip = 32'h0A00_0001; s.dip = 32'hC0A8_0101;
    s.proto = 8'd6; s.sport = 16'd40000; s.dport = 16'd80;
    s.payload = {};
    for (int i = 0; i < 20; i++) s.payload.push_back(byte'(8'h41 + i));
    return s;
  endfunction

  function automatic logic [15:0] ocsum(bytes_t b, int from, int len, logic [31:0] init);
    logic [31:0] s;
    s = init;
    for (int i = 0; i < len; i += 2) begin
      s += {b[from+i], (i + 1 < len) ? b[from+i+1] : 8'h00};
    end
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  function automatic void put16(ref bytes_t b, input logic [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction

  function automatic void put32(ref bytes_t b, input logic [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction

  function automatic bytes_t build_frame(fspec_t s);
    bytes_t b;
    int l3, l4, l4len;
    logic [15:0] c;
    for (int i = 5; i >= 0; i--) b.push_back(s.dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(s.smac[8*i +: 8]);
    if (s.nvlan >= 1) begin put16(b, 16'h8100); put16(b, s.vlan1); end
    if (s.nvlan >= 2) begin put16(b, 16'h8100); put16(b, s.vlan2); end
    if (!s.ip) begin
      put16(b, s.etype);
      foreach (s.payload[i]) b.push_back(s.payload[i]);
      while (b.size() < 60) b.push_back(8'h00);
      return b;
    end
    put16(b, 16'h0800);
    l3 = b.size();
    l4len = (s.proto == 6) ? 20 : (s.proto == 17) ? 8 : 0;
    b.push_back(8'h45); b.push_back(8'h00);
    put16(b, 16'(20 + l4len + s.payload.size()));
    put16(b, 16'h1234); put16(b, 16'h4000);
    b.push_back(8'd64); b.push_back(s.proto);
    put16(b, 16'h0000);
    put32(b, s.sip); put32(b, s.dip);
    c = ocsum(b, l3, 20, 0);
    b[l3+10] = c[15:8]; b[l3+11] = c[7:0];
    l4 = b.size();
    if (s.proto == 6) begin
      put16(b, s.sport); put16(b, s.dport);
      put32(b, 32'h0000_1000); put32(b, 32'h0);
      b.push_back(8'h50); b.push_back(8'h18); put16(b, 16'hFFFF);
      put16(b, 16'h0); put16(b, 16'h0);
    end else if (s.proto == 17) begin
      put16(b, s.sport); put16(b, s.dport);
      put16(b, 16'(8 + s.payload.size())); put16(b, 16'h0);
    end
    foreach (s.payload[i]) b.push_back(s.payload[i]);
    if (l4len != 0) begin
      c = l4_csum(b, l3);
      if (s.proto == 17 && c == 0) c = 16'hFFFF;
      b[l4 + ((s.proto == 6) ? 16 : 6)]     = c[15:8];
      b[l4 + ((s.proto == 6) ? 16 : 6) + 1] = c[7:0];
    end
    while (b.size() < 60) b.push_back(8'h00);
    return b;
  endfunction

  // transport checksum with pseudo header, computed with the checksum field zero
  function automatic logic [15:0] l4_csum(bytes_t b, int l3);
    int l4, len, co;
    logic [31:0] s;
    bytes_t t;
    l4  = l3 + 20;
    len = {b[l3+2], b[l3+3]} - 20;
    co  = (b[l3+9] == 6) ? 16 : 6;
    s = {b[l3+12], b[l3+13]} + {b[l3+14], b[l3+15]} + {b[l3+16], b[l3+17]} + {b[l3+18], b[l3+19]}
        + 32'(b[l3+9]) + 32'(len);
    for (int i = 0; i < len; i++) t.push_back((i == co || i == co + 1) ? 8'h00 : b[l4+i]);
    return ocsum(t, 0, len, s);
  endfunction

  // checks of a frame built by build_frame without VLAN tags (IPv4 at 14)
  function automatic bit ip_csum_good(bytes_t b, int l3);
    return ocsum(b, l3, 20, 0) == 16'h0000;
  endfunction

  function automatic bit l4_csum_good(bytes_t b, int l3);
    int co = (b[l3+9] == 6) ? 16 : 6;
    logic [15:0] c = l4_csum(b, l3);
    if (b[l3+9] == 17 && c == 0) c = 16'hFFFF;
    return {b[l3+20+co], b[l3+20+co+1]} == c;
  endfunction

  // bit-serial CRC32 (poly 04C11DB7, MSB first, start all ones, no final xor)
  function automatic logic [31:0] crc32_ref(logic [255:0] d, int nbits);
    logic [31:0] c = '1;
    for (int i = 255; i > 255 - nbits; i--) begin
      logic fb = c[31] ^ d[i];
      c = c << 1;
      if (fb) c ^= 32'h04C11DB7;
    end
    return c;
  endfunction

  // bit-serial CRC64 ECMA-182 over a string, lower-cased by the caller
  function automatic logic [63:0] crc64_ref(string s);
    logic [63:0] c = '1;
    for (int i = 0; i < s.len(); i++) begin
      for (int k = 7; k >= 0; k--) begin
        logic fb = c[63] ^ s[i][k];
        c = c << 1;
        if (fb) c ^= 64'h42F0E1EBA9EA3693;
      end
    end
    return c;
  endfunction

  // H3 hash as documented for dpi_bloom (window newest byte in the low byte)
  function automatic int h3_ref(int i, logic [31:0] x, int hw);
    int h = 0;
    for (int j = 0; j < 32; j++) begin
      logic [31:0] r = 32'(i * 64 + j + 1) * 32'h9E3779B1;
      if (x[j]) h ^= int'(r >> (32 - hw));
    end
    return h;
  endfunction

  function automatic bytes_t str_bytes(string s);
    bytes_t b;
    for (int i = 0; i < s.len(); i++) b.push_back(s[i]);
    return b;
  endfunction

  // reference parameter extraction for frames from build_frame
  function automatic fparams_t spec_params(fspec_t s);
    fparams_t f = '0;
    f.dmac = s.dmac; f.smac = s.smac;
    if (s.nvlan >= 1) f.vlan1 = s.vlan1;
    if (s.nvlan >= 2) f.vlan2 = s.vlan2;
    f.etype = s.ip ? 16'h0800 : s.etype;
    if (s.ip) begin
      f.sip = s.sip; f.dip = s.dip; f.proto = s.proto;
      if (s.proto == 6 || s.proto == 17) begin f.sport = s.sport; f.dport = s.dport; end
    end
    return f;
  endfunction

  function automatic logic [9:0] spec_present(fspec_t s);
    logic [9:0] p = 10'b00000_10011;
    if (s.nvlan >= 1) p[2] = 1;
    if (s.nvlan >= 2) p[3] = 1;
    if (s.ip) begin
      p[5] = 1; p[6] = 1; p[7] = 1;
      if (s.proto == 6 || s.proto == 17) begin p[8] = 1; p[9] = 1; end
    end
    return p;
  endfunction

  function automatic int spec_payload_off(fspec_t s);
    if (!s.ip || !(s.proto == 6 || s.proto == 17)) return 0;
    return 14 + 4 * s.nvlan + 20 + ((s.proto == 6) ? 20 : 8);
  endfunction
endpackage
