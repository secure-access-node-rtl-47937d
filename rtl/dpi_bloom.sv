// dpi_bloom: signature recognition with a Bloom filter.
//
// Scanning starts after the transport layer header (payload_off from the
// parameter set; frames without a TCP/UDP payload are not scanned). Every
// payload byte ends a window of the last SIG_LEN payload bytes; each window
// is hashed by K independent H3 hash functions into a bit vector of M_BITS
// bits, and the window is a possible signature when all K bits are set. The
// bit vector is written by the configurator from the signature database
// (each signature sets its K bits). Four windows are tested per cycle, so
// the filter keeps up with the 32-bit datapath. A frame with a possible
// signature is marked for discarding at its last beat.
// The use of a Bloom filter on the payload follows the document; the window
// length, the hash family, K and M_BITS are this design's own choices.
// Possible matches are not re-verified here (that is the match analyzer's
// task, which this design does not contain), so false positives discard.
//
// H3 hash i of window x: XOR of row(i, j) over all set bits j of x, with
// row(i, j) = upper log2(M_BITS) bits of ((i*64 + j + 1) * 32'h9E3779B1).
//
// Interface: stream in/out as in the control stages (latency 1).
// Configuration component COMP_DPI: word a holds bits [32a+31:32a].
module dpi_bloom
  import secan_pkg::*;
#(
  parameter int unsigned M_BITS  = 4096,
  parameter int unsigned K       = 3,
  parameter int unsigned SIG_LEN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  input  desc_t       in_desc,
  input  logic        in_drop,
  output logic        out_valid,
  output beat_t       out_beat,
  output desc_t       out_desc,
  output logic        out_drop,
  input  cfg_req_t    cfg,
  output logic        cfg_rvalid,
  output logic [31:0] cfg_rdata,
  output logic [31:0] stat_matches  // frames with a possible signature
);
  localparam int unsigned HW = $clog2(M_BITS);
  localparam int unsigned WB = SIG_LEN * 8;

  function automatic logic [HW-1:0] h3(int unsigned i, logic [WB-1:0] x);
    logic [HW-1:0] h;
    logic [31:0]   r;
    h = '0;
    for (int j = 0; j < int'(WB); j++) begin
      r = 32'((i * 64 + j + 1)) * 32'h9E37_79B1;
      if (x[j]) h ^= r[31 -: HW];
    end
    return h;
  endfunction

  logic [M_BITS-1:0] bloom;
  logic [WB-1:0]     win;       // last payload bytes, newest in the low byte
  logic [7:0]        pcnt;      // payload bytes seen (saturating)
  logic [7:0]        poff;
  logic [13:0]       widx;
  logic              hit_cur;

  // scan of one beat
  logic [WB-1:0] n_win;
  logic [7:0]    n_pcnt;
  logic          n_hit;
  always_comb begin
    automatic logic [15:0] pos;
    automatic logic [7:0]  off;
    automatic logic        all;
    automatic int unsigned nvalid;
    n_win  = in_beat.sop ? '0 : win;
    n_pcnt = in_beat.sop ? '0 : pcnt;
    off    = in_beat.sop ? in_desc.p.payload_off : poff;
    n_hit  = 1'b0;
    nvalid = in_beat.eop ? 4 - int'(in_beat.mty) : 4;
    for (int b = 0; b < 4; b++) begin
      pos = (in_beat.sop ? 16'd0 : 16'({widx, 2'b00})) + 16'(b);
      if (b < int'(nvalid) && off != 0 && pos >= 16'(off)) begin
        n_win = {n_win[WB-9:0], in_beat.data[31-8*b -: 8]};
        if (n_pcnt != 8'hFF) n_pcnt = n_pcnt + 1'b1;
        if (n_pcnt >= 8'(SIG_LEN)) begin
          all = 1'b1;
          for (int i = 0; i < int'(K); i++) all &= bloom[h3(i, n_win)];
          n_hit |= all;
        end
      end
    end
  end

  logic cfg_sel;
  assign cfg_sel = (cfg.wr || cfg.rd) && cfg.comp == COMP_DPI && !cfg_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bloom        <= '0;
      win          <= '0;
      pcnt         <= '0;
      poff         <= '0;
      widx         <= '0;
      hit_cur      <= 1'b0;
      out_valid    <= 1'b0;
      out_beat     <= '0;
      out_desc     <= '0;
      out_drop     <= 1'b0;
      cfg_rvalid   <= 1'b0;
      cfg_rdata    <= '0;
      stat_matches <= '0;
    end else begin
      cfg_rvalid <= cfg_sel;
      if (cfg_sel) begin
        cfg_rdata <= bloom[32*cfg.addr[HW-6:0] +: 32];
        if (cfg.wr) bloom[32*cfg.addr[HW-6:0] +: 32] <= cfg.wdata;
      end
      out_valid <= in_valid;
      if (in_valid) begin
        win      <= n_win;
        pcnt     <= n_pcnt;
        widx     <= in_beat.sop ? 14'd1 : widx + 1'b1;
        if (in_beat.sop) begin
          poff     <= in_desc.p.payload_off;
          out_desc <= in_desc;
        end
        hit_cur  <= (in_beat.sop ? 1'b0 : hit_cur) | n_hit;
        out_beat <= in_beat;
        if (in_beat.eop) begin
          out_drop <= in_drop || hit_cur || n_hit;
          if ((hit_cur || n_hit) && !in_drop) stat_matches <= stat_matches + 1'b1;
        end else begin
          out_drop <= in_drop;
        end
      end
    end
  end
endmodule
