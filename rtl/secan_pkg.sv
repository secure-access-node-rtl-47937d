// secan_pkg: types and constants shared by the Secure Access Node blocks.
//
// The internal datapath is 32 bits per cycle (twice the 16 bits/cycle that two
// 1 Gbit/s directions need). A frame travels as a sequence of beats; byte 0 of
// a frame is data[31:24] of its first beat. `mty` on the last beat gives the
// number of unused byte lanes at the low end of that word.
//
// The PCE extracts ten frame parameters (both MAC addresses, up to two VLAN
// tags, EtherType, both IP addresses, the transport protocol and both ports).
// A flow id trigger is a 10-bit mask over these parameters; bit i selects the
// parameter with index i below. The flow id is the 248-bit parameter vector
// with unselected parameters cleared, padded to 256 bits (8 words).
//
// Rules (and rule sets) follow a type-length-value layout. The rule encoding
// below (header word + value words) is this design's own choice.
package secan_pkg;

  localparam int unsigned NUM_PARAMS   = 10;
  localparam int unsigned FID_WORDS    = 8;   // 256-bit flow id
  localparam int unsigned RS_MAX_WORDS = 16;  // rule words carried with a frame

  // Parameter indices (bit positions in triggers and presence masks)
  localparam int unsigned P_DMAC  = 0;
  localparam int unsigned P_SMAC  = 1;
  localparam int unsigned P_VLAN1 = 2;
  localparam int unsigned P_VLAN2 = 3;
  localparam int unsigned P_ETYPE = 4;
  localparam int unsigned P_SIP   = 5;
  localparam int unsigned P_DIP   = 6;
  localparam int unsigned P_PROTO = 7;
  localparam int unsigned P_SPORT = 8;
  localparam int unsigned P_DPORT = 9;

  typedef enum logic {DIR_UP = 1'b0, DIR_DOWN = 1'b1} dir_e;

  typedef struct packed {
    logic [31:0] data;
    logic        sop;
    logic        eop;
    logic [1:0]  mty;
  } beat_t;

  typedef struct packed {
    logic [47:0] dmac;
    logic [47:0] smac;
    logic [15:0] vlan1;
    logic [15:0] vlan2;
    logic [15:0] etype;
    logic [31:0] sip;
    logic [31:0] dip;
    logic [7:0]  proto;
    logic [15:0] sport;
    logic [15:0] dport;
  } fparams_t;  // 248 bits

  // Frame parameter set: parameters plus what later stages need to locate
  // fields inside the frame.
  typedef struct packed {
    fparams_t    f;
    logic [NUM_PARAMS-1:0] present;
    dir_e        dir;
    logic [7:0]  ip_off;       // byte offset of the IPv4 header
    logic [15:0] ip_csum;      // IPv4 header checksum as received
    logic [7:0]  l4csum_off;   // byte offset of the TCP/UDP checksum
    logic [15:0] l4_csum;      // TCP/UDP checksum as received
    logic        l4csum_ok;    // TCP, or UDP with a non-zero checksum
    logic [7:0]  payload_off;  // first byte after the transport header, 0 = none
  } pset_t;

  typedef struct packed {
    logic                               is_default;
    logic [4:0]                         count;   // valid rule words
    logic [RS_MAX_WORDS-1:0][31:0]      words;   // words[0] is the first
  } ruleset_t;

  typedef struct packed {
    pset_t    p;
    ruleset_t rs;
  } desc_t;

  // Rule header word: [31:24] type (control stage id), [23:16] length of the
  // value in bytes, [15:12] parameter index, [11:8] compare op, [7:0] action.
  // Value: compare value high word, compare value low word, and for
  // ACT_REPLACE a third word with the new IPv4 address.
  localparam logic [3:0] OP_EQ = 4'd0;
  localparam logic [3:0] OP_NE = 4'd1;

  localparam logic [7:0] ACT_FORWARD = 8'd0;
  localparam logic [7:0] ACT_DISCARD = 8'd1;
  localparam logic [7:0] ACT_REPLACE = 8'd2;

  // Control stage ids (rule types), one per OSI layer handled by the filter
  localparam logic [7:0] CS_L2 = 8'h02;
  localparam logic [7:0] CS_L3 = 8'h03;
  localparam logic [7:0] CS_L4 = 8'h04;

  // Configuration components. Write type = {id, 1'b0}, read type = {id, 1'b1}.
  localparam logic [6:0] COMP_SYS = 7'd1;
  localparam logic [6:0] COMP_PCE = 7'd2;
  localparam logic [6:0] COMP_RSE = 7'd3;
  localparam logic [6:0] COMP_DPI = 7'd4;
  localparam logic [6:0] COMP_WEB = 7'd5;

  // Word-wide configuration access issued by the configurator
  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [6:0]  comp;
    logic [31:0] addr;
    logic [31:0] wdata;
  } cfg_req_t;

  // Word-wide memory request (SRAM and DDR2 ports of the RSE)
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;   // word address
    logic [31:0] wdata;
  } mem_req_t;

  // Event counters brought out of the top
  typedef struct packed {
    logic [31:0] mux_overflow_up;     // frames lost at the upstream input buffer
    logic [31:0] mux_overflow_down;   // frames lost at the downstream input buffer
    logic [31:0] incomplete_flow_id;  // frames classified with the standard rule set request
    logic [31:0] default_rule_sets;   // lookups answered with the standard rule set
    logic [31:0] cs_discards;         // frames discarded by a control stage rule
    logic [31:0] cs_replaces;         // frames with a replaced IPv4 address
    logic [31:0] dpi_matches;         // frames with a possible signature
    logic [31:0] web_hits;            // frames to a blocked domain
    logic [31:0] fwd_up;              // frames sent out upstream
    logic [31:0] fwd_down;            // frames sent out downstream
    logic [31:0] dropped;             // frames discarded by the PPE
    logic [31:0] out_overflow;        // frames lost at the output buffers
  } stats_t;

  // Value of parameter `idx`, zero-extended to 64 bits
  function automatic logic [63:0] param_value(fparams_t f, logic [3:0] idx);
    case (idx)
      4'd0:    return {16'h0, f.dmac};
      4'd1:    return {16'h0, f.smac};
      4'd2:    return {48'h0, f.vlan1};
      4'd3:    return {48'h0, f.vlan2};
      4'd4:    return {48'h0, f.etype};
      4'd5:    return {32'h0, f.sip};
      4'd6:    return {32'h0, f.dip};
      4'd7:    return {56'h0, f.proto};
      4'd8:    return {48'h0, f.sport};
      4'd9:    return {48'h0, f.dport};
      default: return 64'h0;
    endcase
  endfunction

  // Flow id: selected and present parameters kept, others cleared
  function automatic logic [255:0] make_flow_id(fparams_t f, logic [NUM_PARAMS-1:0] sel);
    fparams_t m;
    m = f;
    if (!sel[P_DMAC])  m.dmac  = '0;
    if (!sel[P_SMAC])  m.smac  = '0;
    if (!sel[P_VLAN1]) m.vlan1 = '0;
    if (!sel[P_VLAN2]) m.vlan2 = '0;
    if (!sel[P_ETYPE]) m.etype = '0;
    if (!sel[P_SIP])   m.sip   = '0;
    if (!sel[P_DIP])   m.dip   = '0;
    if (!sel[P_PROTO]) m.proto = '0;
    if (!sel[P_SPORT]) m.sport = '0;
    if (!sel[P_DPORT]) m.dport = '0;
    return {m, 8'h00};
  endfunction

endpackage
