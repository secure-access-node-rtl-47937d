// control_stage: one control stage (CS) of the L2-L4 packet filter.
//
// A stage looks only at the first rule of the frame's rule set, on the first
// beat of the frame, where the parameter set and rule set arrive. If the rule
// type differs from the stage id CS_ID, everything passes unchanged to the
// next stage. Otherwise the stage processes the rule and removes it from the
// rule set, so the next stage again finds its rule at the first position.
// Processing compares the rule's value with the selected parameter of the
// parameter set (equal or not equal; an absent parameter never matches) and,
// on a match, executes the rule action:
//   ACT_FORWARD  the frame continues;
//   ACT_DISCARD  the frame is marked for discarding (drop flag);
//   ACT_REPLACE  a source or destination address is rewritten as the frame
//                streams through: an IPv4 address (new value in the third
//                value word; the IPv4 header checksum and the TCP/UDP
//                checksum are updated incrementally, RFC 1624) or a MAC
//                address (new value in the low 16 bits of the third and the
//                fourth value word), e.g. to translate a subscriber MAC
//                address to a provider address.
// Rule look-up, removal and the three actions follow the document; the rule
// encoding (secan_pkg) and the checksum update are this design's own.
//
// Interface: stream in/out with the descriptor valid on the sop beat and a
// drop flag that is final on the eop beat. One register stage (latency 1),
// no back-pressure, one beat per cycle. The sop beat is rewritten with the
// decision made in the same cycle, later beats with the registered one.
module control_stage
  import secan_pkg::*;
#(
  parameter logic [7:0] CS_ID = CS_L3
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
  output logic [31:0] stat_rules,     // rules processed by this stage
  output logic [31:0] stat_discards,  // frames discarded by this stage
  output logic [31:0] stat_replaces   // frames rewritten by this stage
);
  // one's complement incremental checksum update for a 32-bit field
  function automatic logic [15:0] csum_upd(logic [15:0] hc, logic [31:0] m_old, logic [31:0] m_new);
    logic [31:0] s;
    logic [15:0] nhc, nm_hi, nm_lo;
    nhc   = ~hc;
    nm_hi = ~m_old[31:16];
    nm_lo = ~m_old[15:0];
    s = 32'(nhc) + 32'(nm_hi) + 32'(nm_lo) + 32'(m_new[31:16]) + 32'(m_new[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    return ~s[15:0];
  endfunction

  // per-frame state
  logic        drop_cur;
  logic        repl, repl_ip;
  logic [7:0]  repl_off, ipc_off, l4c_off;
  logic [2:0]  repl_len;
  logic [47:0] repl_val;
  logic [15:0] ipc_new, l4c_new;
  logic        l4c_en;
  logic [13:0] widx;  // word index of the current beat

  // decision on the sop beat
  logic        s_hit, s_match, s_drop, s_repl, s_rip;
  desc_t       s_desc;
  logic [31:0] s_hdr;
  logic [7:0]  s_roff;
  logic [2:0]  s_rlen;
  logic [47:0] s_rval;
  logic [15:0] s_ipc, s_l4c;

  always_comb begin
    automatic logic [3:0]  field;
    automatic logic [63:0] val, cmp;
    automatic logic        pres;
    automatic int unsigned nw;
    s_desc  = in_desc;
    s_hdr   = in_desc.rs.words[0];
    s_hit   = in_desc.rs.count != 0 && s_hdr[31:24] == CS_ID;
    field   = s_hdr[15:12];
    val     = param_value(in_desc.p.f, field);
    cmp     = {in_desc.rs.words[1], in_desc.rs.words[2]};
    pres    = field < 4'(NUM_PARAMS) && in_desc.p.present[field];
    s_match = s_hit && pres && ((s_hdr[11:8] == OP_NE) ? (val != cmp) : (val == cmp));
    s_drop  = s_match && s_hdr[7:0] == ACT_DISCARD;
    s_rip   = field == 4'(P_SIP) || field == 4'(P_DIP);
    s_repl  = s_match && s_hdr[7:0] == ACT_REPLACE &&
              (s_rip || field == 4'(P_DMAC) || field == 4'(P_SMAC));
    case (field)
      4'(P_DMAC): s_roff = 8'd0;
      4'(P_SMAC): s_roff = 8'd6;
      4'(P_SIP):  s_roff = in_desc.p.ip_off + 8'd12;
      default:    s_roff = in_desc.p.ip_off + 8'd16;
    endcase
    s_rlen  = s_rip ? 3'd4 : 3'd6;
    s_rval  = s_rip ? {16'h0, in_desc.rs.words[3]} : {in_desc.rs.words[3][15:0], in_desc.rs.words[4]};
    s_ipc   = csum_upd(in_desc.p.ip_csum, val[31:0], in_desc.rs.words[3]);
    s_l4c   = csum_upd(in_desc.p.l4_csum, val[31:0], in_desc.rs.words[3]);
    if (in_desc.p.f.proto == 8'd17 && s_l4c == 16'h0000) s_l4c = 16'hFFFF;
    if (s_hit) begin
      nw = 1 + int'(s_hdr[23:18]);
      s_desc.rs.words = in_desc.rs.words >> (32 * nw);
      s_desc.rs.count = (int'(in_desc.rs.count) > nw) ? 5'(int'(in_desc.rs.count) - nw) : 5'd0;
    end
    if (s_repl) begin
      case (field)
        4'(P_DMAC): s_desc.p.f.dmac = s_rval;
        4'(P_SMAC): s_desc.p.f.smac = s_rval;
        4'(P_SIP):  s_desc.p.f.sip  = s_rval[31:0];
        default:    s_desc.p.f.dip  = s_rval[31:0];
      endcase
      if (s_rip) begin
        s_desc.p.ip_csum = s_ipc;
        if (in_desc.p.l4csum_ok) s_desc.p.l4_csum = s_l4c;
      end
    end
  end

  // byte rewriting: the address field, and for IPv4 both checksums
  function automatic logic [7:0] rewrite(logic [7:0] b, logic [15:0] pos, logic en, logic ip,
                                         logic [7:0] off, logic [2:0] len, logic [47:0] val,
                                         logic [7:0] ico, logic [15:0] ic, logic l4en,
                                         logic [7:0] lco, logic [15:0] lc);
    logic [7:0]  r;
    logic [15:0] k;
    r = b;
    k = pos - 16'(off);
    if (en && pos >= 16'(off) && k < 16'(len))
      r = val[8*(int'(len) - 1 - int'(k)) +: 8];
    if (en && ip && pos == 16'(ico))              r = ic[15:8];
    if (en && ip && pos == 16'(ico) + 1)          r = ic[7:0];
    if (en && ip && l4en && pos == 16'(lco))      r = lc[15:8];
    if (en && ip && l4en && pos == 16'(lco) + 1)  r = lc[7:0];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_cur      <= 1'b0;
      repl          <= 1'b0;
      repl_ip       <= 1'b0;
      repl_len      <= '0;
      repl_off      <= '0;
      ipc_off       <= '0;
      l4c_off       <= '0;
      repl_val      <= '0;
      ipc_new       <= '0;
      l4c_new       <= '0;
      l4c_en        <= 1'b0;
      widx          <= '0;
      out_valid     <= 1'b0;
      out_beat      <= '0;
      out_desc      <= '0;
      out_drop      <= 1'b0;
      stat_rules    <= '0;
      stat_discards <= '0;
      stat_replaces <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (in_beat.sop) begin
          drop_cur <= s_drop;
          repl     <= s_repl;
          repl_ip  <= s_rip;
          repl_len <= s_rlen;
          repl_off <= s_roff;
          ipc_off  <= in_desc.p.ip_off + 8'd10;
          l4c_off  <= in_desc.p.l4csum_off;
          l4c_en   <= in_desc.p.l4csum_ok;
          repl_val <= s_rval;
          ipc_new  <= s_ipc;
          l4c_new  <= s_l4c;
          widx     <= 14'd1;
          out_beat <= in_beat;
          for (int b = 0; b < 4; b++)
            out_beat.data[31-8*b -: 8] <= rewrite(in_beat.data[31-8*b -: 8], 16'(b), s_repl, s_rip,
                                                  s_roff, s_rlen, s_rval, in_desc.p.ip_off + 8'd10, s_ipc,
                                                  in_desc.p.l4csum_ok, in_desc.p.l4csum_off, s_l4c);
          out_desc <= s_desc;
          out_drop <= in_drop || s_drop;
          if (s_hit)  stat_rules    <= stat_rules + 1'b1;
          if (s_drop && !in_drop) stat_discards <= stat_discards + 1'b1;
          if (s_repl) stat_replaces <= stat_replaces + 1'b1;
        end else begin
          widx <= widx + 1'b1;
          out_beat <= in_beat;
          for (int b = 0; b < 4; b++)
            out_beat.data[31-8*b -: 8] <= rewrite(in_beat.data[31-8*b -: 8], 16'({widx, 2'b00}) + 16'(b),
                                                  repl, repl_ip, repl_off, repl_len, repl_val,
                                                  ipc_off, ipc_new, l4c_en, l4c_off, l4c_new);
          out_drop <= in_drop || drop_cur;
        end
      end
    end
  end
endmodule
