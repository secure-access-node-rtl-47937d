// web_filter: domain filter on HTTP requests.
//
// The filter finds the domain a request is sent to: in the payload after the
// transport header it looks for a header line "Host:" (letters in any case),
// skips blanks, and hashes the following domain name, lower-cased, up to a
// CR, LF, ':' (port) or the end of the frame, with CRC64. The 64-bit hash
// is then searched in a binary search tree configured with the hashes of the
// blocked domains. A hit marks the frame for discarding.
// Hashing domains with CRC64 and searching a preconfigured binary tree follow
// the document; taking the domain from the Host header, the CRC64
// polynomial (ECMA-182, 0x42F0E1EBA9EA3693, MSB first, start value all
// ones), the tree layout and the delay line are this design's own. The second
// step of the document's filter, verifying a hit against the full domain
// list in DDR2, is not part of this block.
//
// Tree: node i has children 2i+1 (smaller keys) and 2i+2 (larger keys); a
// search stops at an empty node or beyond NODES. One node is visited per
// cycle, so a search takes at most TREE_DEPTH cycles. To have the verdict
// before the frame's last beat leaves, the stream is delayed by DELAY
// cycles (TREE_DEPTH + 4). Frames must start at least DELAY cycles apart for
// the verdict bookkeeping; minimum-size Ethernet frames are 16 beats long.
//
// Interface: stream in (descriptor at sop), stream out with direction and
// drop flag (latency DELAY cycles). Configuration component COMP_WEB:
// word 4i = key[63:32] of node i, 4i+1 = key[31:0], 4i+2 bit 0 = valid.
module web_filter
  import secan_pkg::*;
#(
  parameter int unsigned NODES = 1023
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  input  desc_t       in_desc,
  input  logic        in_drop,
  output logic        out_valid,
  output beat_t       out_beat,
  output dir_e        out_dir,
  output logic        out_drop,
  input  cfg_req_t    cfg,
  output logic        cfg_rvalid,
  output logic [31:0] cfg_rdata,
  output logic [31:0] stat_lookups,  // domains searched
  output logic [31:0] stat_hits      // frames discarded for a blocked domain
);
  localparam int unsigned TREE_DEPTH = $clog2(NODES + 1);
  localparam int unsigned DELAY      = TREE_DEPTH + 4;
  localparam int unsigned NW         = $clog2(NODES);
  localparam logic [63:0] POLY       = 64'h42F0_E1EB_A9EA_3693;

  function automatic logic [63:0] crc64_byte(logic [63:0] c, logic [7:0] d);
    logic [63:0] r;
    r = c ^ {d, 56'h0};
    for (int i = 0; i < 8; i++) r = r[63] ? ({r[62:0], 1'b0} ^ POLY) : {r[62:0], 1'b0};
    return r;
  endfunction

  function automatic logic [7:0] lower(logic [7:0] c);
    return (c >= 8'h41 && c <= 8'h5A) ? c | 8'h20 : c;
  endfunction

  typedef enum logic [1:0] {H_SEEK, H_BLANK, H_HASH, H_DONE} hstate_e;

  // tree storage
  logic [63:0] key_mem [NODES];
  logic        vld_mem [NODES];

  // scanner state
  hstate_e     hst;
  logic [2:0]  mcnt;     // characters of "\nhost:" matched
  logic [63:0] crc;
  logic [7:0]  poff;
  logic [13:0] widx;
  logic [2:0]  tag_in;   // frame tag at the input

  // search unit
  logic        srch_busy;
  logic [63:0] srch_key;
  logic [NW:0] srch_node;
  logic [2:0]  srch_tag;
  logic [7:0]  verdict;  // per frame tag: blocked domain found

  // scan of one beat
  hstate_e     n_hst;
  logic [2:0]  n_mcnt;
  logic [63:0] n_crc;
  logic        n_fire;   // hash complete in this beat
  always_comb begin
    automatic logic [15:0] pos;
    automatic logic [7:0]  off, c, lc;
    automatic int unsigned nvalid;
    automatic logic [7:0]  pat [6];
    pat[0] = 8'h0A; pat[1] = "h"; pat[2] = "o"; pat[3] = "s"; pat[4] = "t"; pat[5] = ":";
    n_hst  = in_beat.sop ? H_SEEK : hst;
    n_mcnt = in_beat.sop ? 3'd0 : mcnt;
    n_crc  = in_beat.sop ? '1 : crc;
    n_fire = 1'b0;
    off    = in_beat.sop ? in_desc.p.payload_off : poff;
    nvalid = in_beat.eop ? 4 - int'(in_beat.mty) : 4;
    for (int b = 0; b < 4; b++) begin
      pos = (in_beat.sop ? 16'd0 : 16'({widx, 2'b00})) + 16'(b);
      c   = in_beat.data[31-8*b -: 8];
      lc  = lower(c);
      if (b < int'(nvalid) && off != 0 && pos >= 16'(off)) begin
        case (n_hst)
          H_SEEK: begin
            if (lc == pat[n_mcnt]) begin
              if (n_mcnt == 3'd5) begin
                n_hst  = H_BLANK;
                n_mcnt = 3'd0;
              end else n_mcnt = n_mcnt + 1'b1;
            end else n_mcnt = (c == 8'h0A) ? 3'd1 : 3'd0;
          end
          H_BLANK: if (c != 8'h20 && c != 8'h09) begin
            if (c == 8'h0D || c == 8'h0A) n_hst = H_DONE;
            else begin
              n_crc = crc64_byte(n_crc, lc);
              n_hst = H_HASH;
            end
          end
          H_HASH: begin
            if (c == 8'h0D || c == 8'h0A || c == ":") begin
              n_hst  = H_DONE;
              n_fire = 1'b1;
            end else n_crc = crc64_byte(n_crc, lc);
          end
          default: ;
        endcase
      end
    end
    if (in_beat.eop && n_hst == H_HASH) n_fire = 1'b1;
  end

  // delay line
  logic        dl_valid [DELAY];
  beat_t       dl_beat  [DELAY];
  dir_e        dl_dir   [DELAY];
  logic        dl_drop  [DELAY];
  logic [2:0]  dl_tag   [DELAY];
  dir_e        dir_cur;

  logic cfg_sel;
  assign cfg_sel = (cfg.wr || cfg.rd) && cfg.comp == COMP_WEB && !cfg_rvalid;

  logic [NW-1:0] cfg_node;
  assign cfg_node = cfg.addr[NW+1:2];

  always_ff @(posedge clk) begin
    if (cfg_sel && cfg.wr && cfg.addr[1:0] == 2'd0) key_mem[cfg_node][63:32] <= cfg.wdata;
    if (cfg_sel && cfg.wr && cfg.addr[1:0] == 2'd1) key_mem[cfg_node][31:0]  <= cfg.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NODES); i++) vld_mem[i] <= 1'b0;
      hst          <= H_SEEK;
      mcnt         <= '0;
      crc          <= '1;
      poff         <= '0;
      widx         <= '0;
      tag_in       <= '0;
      srch_busy    <= 1'b0;
      srch_key     <= '0;
      srch_node    <= '0;
      srch_tag     <= '0;
      verdict      <= '0;
      dir_cur      <= DIR_UP;
      for (int i = 0; i < int'(DELAY); i++) begin
        dl_valid[i] <= 1'b0;
        dl_beat[i]  <= '0;
        dl_dir[i]   <= DIR_UP;
        dl_drop[i]  <= 1'b0;
        dl_tag[i]   <= '0;
      end
      cfg_rvalid   <= 1'b0;
      cfg_rdata    <= '0;
      stat_lookups <= '0;
      stat_hits    <= '0;
    end else begin
      // configuration
      cfg_rvalid <= cfg_sel;
      if (cfg_sel) begin
        case (cfg.addr[1:0])
          2'd0:    cfg_rdata <= key_mem[cfg_node][63:32];
          2'd1:    cfg_rdata <= key_mem[cfg_node][31:0];
          default: cfg_rdata <= 32'(vld_mem[cfg_node]);
        endcase
        if (cfg.wr && cfg.addr[1:0] == 2'd2) vld_mem[cfg_node] <= cfg.wdata[0];
      end

      // scanner
      if (in_valid) begin
        automatic logic [2:0] t = in_beat.sop ? tag_in + 1'b1 : tag_in;
        hst    <= n_hst;
        mcnt   <= n_mcnt;
        crc    <= n_crc;
        widx   <= in_beat.sop ? 14'd1 : widx + 1'b1;
        tag_in <= t;
        if (in_beat.sop) begin
          poff       <= in_desc.p.payload_off;
          dir_cur    <= in_desc.p.dir;
          verdict[t] <= 1'b0;
        end
        if (n_fire && !srch_busy) begin
          srch_busy    <= 1'b1;
          srch_key     <= n_crc;
          srch_node    <= '0;
          srch_tag     <= t;
          stat_lookups <= stat_lookups + 1'b1;
        end
      end

      // tree search, one node per cycle
      if (srch_busy) begin
        if (srch_node >= (NW+1)'(NODES) || !vld_mem[srch_node[NW-1:0]]) begin
          srch_busy <= 1'b0;
        end else if (key_mem[srch_node[NW-1:0]] == srch_key) begin
          srch_busy          <= 1'b0;
          verdict[srch_tag]  <= 1'b1;
        end else if (srch_key < key_mem[srch_node[NW-1:0]]) begin
          srch_node <= {srch_node[NW-1:0], 1'b0} + 1'b1;
        end else begin
          srch_node <= {srch_node[NW-1:0], 1'b0} + 2'd2;
        end
      end

      // delay line
      dl_valid[0] <= in_valid;
      dl_beat[0]  <= in_beat;
      dl_dir[0]   <= in_beat.sop ? in_desc.p.dir : dir_cur;
      dl_drop[0]  <= in_drop;
      dl_tag[0]   <= in_beat.sop ? tag_in + 1'b1 : tag_in;
      for (int i = 1; i < int'(DELAY); i++) begin
        dl_valid[i] <= dl_valid[i-1];
        dl_beat[i]  <= dl_beat[i-1];
        dl_dir[i]   <= dl_dir[i-1];
        dl_drop[i]  <= dl_drop[i-1];
        dl_tag[i]   <= dl_tag[i-1];
      end
      if (out_valid && out_beat.eop && verdict[dl_tag[DELAY-1]] && !dl_drop[DELAY-1])
        stat_hits <= stat_hits + 1'b1;
    end
  end

  assign out_valid = dl_valid[DELAY-1];
  assign out_beat  = dl_beat[DELAY-1];
  assign out_dir   = dl_dir[DELAY-1];
  assign out_drop  = dl_drop[DELAY-1] || (dl_beat[DELAY-1].eop && verdict[dl_tag[DELAY-1]]);
endmodule
