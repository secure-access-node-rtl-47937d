// ppe: Packet Processing Engine.
//
// The frame, its parameter set and its rule set pass through three parts in
// a row: the packet filter, made of NUM_CS control stages (stage i has the
// id CS_IDS[i]; with the default, two stages each for OSI layers 2, 3 and 4,
// in that order), the signature recognition (DPI, Bloom filter) and the web
// filter. Each part may mark the frame for discarding; the mark is final on
// the frame's last beat, and the frame demultiplexer drops marked frames.
// The order of the three parts and the number of stages per layer are this
// design's choice; the document names the parts and says that the filter
// consists of several control stages for layers 2 to 4.
//
// Interface: stream from the PCE (descriptor on the sop beat), stream to the
// demultiplexer with direction and drop flag; configuration requests go to
// the DPI and the web filter. Latency NUM_CS + 1 + web filter delay cycles.
module ppe
  import secan_pkg::*;
#(
  parameter int unsigned NUM_CS = 6,
  parameter logic [NUM_CS-1:0][7:0] CS_IDS = {CS_L4, CS_L4, CS_L3, CS_L3, CS_L2, CS_L2},
  parameter int unsigned BLOOM_BITS = 4096,
  parameter int unsigned WEB_NODES  = 1023
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  input  desc_t       in_desc,
  output logic        out_valid,
  output beat_t       out_beat,
  output dir_e        out_dir,
  output logic        out_drop,
  input  cfg_req_t    cfg,
  output logic        cfg_rvalid,
  output logic [31:0] cfg_rdata,
  output logic        idle,
  output logic [31:0] stat_cs_discards,
  output logic [31:0] stat_cs_replaces,
  output logic [31:0] stat_dpi_matches,
  output logic [31:0] stat_web_hits
);
  logic  v    [NUM_CS+2];
  beat_t bt   [NUM_CS+2];
  desc_t ds   [NUM_CS+2];
  logic  dr   [NUM_CS+2];
  logic [31:0] cs_rules [NUM_CS];
  logic [31:0] cs_disc  [NUM_CS];
  logic [31:0] cs_repl  [NUM_CS];

  assign v[0]  = in_valid;
  assign bt[0] = in_beat;
  assign ds[0] = in_desc;
  assign dr[0] = 1'b0;

  for (genvar i = 0; i < int'(NUM_CS); i++) begin : g_cs
    control_stage #(.CS_ID(CS_IDS[i])) u_cs (
      .clk, .rst_n,
      .in_valid(v[i]), .in_beat(bt[i]), .in_desc(ds[i]), .in_drop(dr[i]),
      .out_valid(v[i+1]), .out_beat(bt[i+1]), .out_desc(ds[i+1]), .out_drop(dr[i+1]),
      .stat_rules(cs_rules[i]), .stat_discards(cs_disc[i]), .stat_replaces(cs_repl[i])
    );
  end

  logic        dpi_rv, web_rv;
  logic [31:0] dpi_rd, web_rd;

  dpi_bloom #(.M_BITS(BLOOM_BITS)) u_dpi (
    .clk, .rst_n,
    .in_valid(v[NUM_CS]), .in_beat(bt[NUM_CS]), .in_desc(ds[NUM_CS]), .in_drop(dr[NUM_CS]),
    .out_valid(v[NUM_CS+1]), .out_beat(bt[NUM_CS+1]), .out_desc(ds[NUM_CS+1]), .out_drop(dr[NUM_CS+1]),
    .cfg, .cfg_rvalid(dpi_rv), .cfg_rdata(dpi_rd), .stat_matches(stat_dpi_matches)
  );

  web_filter #(.NODES(WEB_NODES)) u_web (
    .clk, .rst_n,
    .in_valid(v[NUM_CS+1]), .in_beat(bt[NUM_CS+1]), .in_desc(ds[NUM_CS+1]), .in_drop(dr[NUM_CS+1]),
    .out_valid, .out_beat, .out_dir, .out_drop,
    .cfg, .cfg_rvalid(web_rv), .cfg_rdata(web_rd),
    .stat_lookups(), .stat_hits(stat_web_hits)
  );

  assign cfg_rvalid = dpi_rv | web_rv;
  assign cfg_rdata  = dpi_rv ? dpi_rd : web_rd;

  // frames in flight: counted in at sop, out at eop
  logic [7:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 8'(in_valid && in_beat.sop) - 8'(out_valid && out_beat.eop);
  end
  assign idle = inflight == 0 && !in_valid;

  always_comb begin
    stat_cs_discards = '0;
    stat_cs_replaces = '0;
    for (int i = 0; i < int'(NUM_CS); i++) begin
      stat_cs_discards += cs_disc[i];
      stat_cs_replaces += cs_repl[i];
    end
  end
endmodule
