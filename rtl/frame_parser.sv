// frame_parser: builds the frame parameter set of an Ethernet frame.
//
// While a frame streams past, its first HDR_WORDS words are captured. After
// the last beat, the ten frame parameters are extracted from the capture:
// destination and source MAC, up to two VLAN tags (TPID 0x8100 or 0x88A8),
// EtherType, and for IPv4 the source and destination address and the
// protocol, and for TCP (6) or UDP (17) the two ports. A parameter that the
// frame does not carry, or that lies beyond the frame, is reported absent in
// `pset.present`. The parser also records where the IPv4 header, the
// transport checksum and the payload start, which the control stages and
// the DPI need. The ten parameters follow the document; the capture depth,
// the supported encapsulations and the extra offsets are this design's own.
//
// Timing: `done` pulses one cycle after the eop beat; `pset` is valid from
// then until the next sop. One frame at a time.
module frame_parser
  import secan_pkg::*;
#(
  parameter int unsigned HDR_WORDS = 32  // 128 bytes: enough for 2 VLAN tags, IPv4 options and TCP header
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  beat_t  in_beat,
  output logic   done,
  output pset_t  pset
);
  localparam int unsigned HB = HDR_WORDS * 4;

  logic [7:0]  hdr [HB];
  logic [15:0] nbytes;   // bytes captured (saturates at HB)
  logic [15:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbytes <= '0;
      wcnt   <= '0;
      done   <= 1'b0;
      for (int i = 0; i < int'(HB); i++) hdr[i] <= '0;
    end else begin
      done <= in_valid && in_beat.eop;
      if (in_valid) begin
        automatic logic [15:0] w = in_beat.sop ? 16'd0 : wcnt;
        wcnt <= w + 1'b1;
        if (w < 16'(HDR_WORDS)) begin
          for (int b = 0; b < 4; b++) hdr[w*4 + b] <= in_beat.data[31-8*b -: 8];
          nbytes <= w*4 + (in_beat.eop ? 16'(4 - in_beat.mty) : 16'd4);
        end
      end
    end
  end

  function automatic logic [7:0] b8(int unsigned i);
    return (i < int'(nbytes) && i < HB) ? hdr[i] : 8'h00;
  endfunction
  function automatic logic [15:0] b16(int unsigned i);
    return {b8(i), b8(i+1)};
  endfunction
  function automatic logic [31:0] b32(int unsigned i);
    return {b8(i), b8(i+1), b8(i+2), b8(i+3)};
  endfunction

  always_comb begin
    automatic int unsigned off, l3, l4, ihl;
    automatic logic [15:0] t;
    pset = '0;
    pset.f.dmac = {b32(0), b16(4)};
    pset.f.smac = {b32(6), b16(10)};
    pset.present[P_DMAC] = nbytes >= 6;
    pset.present[P_SMAC] = nbytes >= 12;
    off = 12;
    t   = b16(12);
    if (nbytes >= 16 && (t == 16'h8100 || t == 16'h88A8)) begin
      pset.f.vlan1 = b16(14);
      pset.present[P_VLAN1] = 1'b1;
      off = 16;
      t   = b16(16);
      if (nbytes >= 20 && (t == 16'h8100 || t == 16'h88A8)) begin
        pset.f.vlan2 = b16(18);
        pset.present[P_VLAN2] = 1'b1;
        off = 20;
        t   = b16(20);
      end
    end
    pset.f.etype = t;
    pset.present[P_ETYPE] = int'(nbytes) >= off + 2;
    l3  = off + 2;
    ihl = int'(b8(l3)[3:0]) * 4;
    if (t == 16'h0800 && b8(l3)[7:4] == 4'd4 && ihl >= 20 && int'(nbytes) >= l3 + 20) begin
      pset.ip_off   = 8'(l3);
      pset.ip_csum  = b16(l3 + 10);
      pset.f.proto  = b8(l3 + 9);
      pset.f.sip    = b32(l3 + 12);
      pset.f.dip    = b32(l3 + 16);
      pset.present[P_SIP]   = 1'b1;
      pset.present[P_DIP]   = 1'b1;
      pset.present[P_PROTO] = 1'b1;
      l4 = l3 + ihl;
      if ((pset.f.proto == 8'd6 || pset.f.proto == 8'd17) && int'(nbytes) >= l4 + 4) begin
        pset.f.sport = b16(l4);
        pset.f.dport = b16(l4 + 2);
        pset.present[P_SPORT] = 1'b1;
        pset.present[P_DPORT] = 1'b1;
        if (pset.f.proto == 8'd6) begin
          pset.l4csum_off  = 8'(l4 + 16);
          pset.l4_csum     = b16(l4 + 16);
          pset.l4csum_ok   = int'(nbytes) >= l4 + 18;
          pset.payload_off = 8'(l4 + int'(b8(l4 + 12)[7:4]) * 4);
        end else begin
          pset.l4csum_off  = 8'(l4 + 6);
          pset.l4_csum     = b16(l4 + 6);
          pset.l4csum_ok   = int'(nbytes) >= l4 + 8 && b16(l4 + 6) != 16'h0;
          pset.payload_off = 8'(l4 + 8);
        end
      end
    end
  end
endmodule
