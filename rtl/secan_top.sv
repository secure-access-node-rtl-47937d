// secan_top: Secure Access Node, a packet filter, signature recognition and
// web filter for both directions of an access node line.
//
// Data path: frame multiplexer -> packet classification engine (with the
// rule set engine) -> packet processing engine (control stages, DPI, web
// filter) -> frame demultiplexer. The configurator writes and reads the
// configuration of the PCE, RSE, DPI and web filter and starts and stops the
// frame flow. The partitioning follows the block diagram of the design; the
// internal datapath is 32 bits per cycle.
//
// Off-chip parts are reached through ports: the two Gigabit Ethernet
// transceivers (rx_*/tx_*: one byte per cycle per direction, index 0 is
// upstream traffic from the subscribers, 1 downstream traffic towards
// them), the board SRAM holding the flow-id-to-rule-set map and the DDR2
// SDRAM holding the rule sets (word request/response ports, see rse.sv),
// and the configuration host (byte streams cfg_in_*/cfg_out_*).
//
// Nothing passes before the `run` bit has been written; while a
// configuration record is processed no new frame enters the engines.
module secan_top
  import secan_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 1024,  // words per frame buffer
  parameter int unsigned SRAM_AW    = 18,    // 1 MB SRAM in 32-bit words
  parameter int unsigned NUM_CS     = 6,
  parameter int unsigned BLOOM_BITS = 4096,
  parameter int unsigned WEB_NODES  = 1023
) (
  input  logic        clk,
  input  logic        rst_n,
  // Ethernet receive/transmit, per direction
  input  logic [1:0]  rx_valid,
  input  logic [7:0]  rx_data [2],
  input  logic [1:0]  rx_last,
  output logic [1:0]  tx_valid,
  output logic [7:0]  tx_data [2],
  output logic [1:0]  tx_last,
  // configuration host
  input  logic        cfg_in_valid,
  output logic        cfg_in_ready,
  input  logic [7:0]  cfg_in_data,
  output logic        cfg_out_valid,
  input  logic        cfg_out_ready,
  output logic [7:0]  cfg_out_data,
  // board SRAM
  output mem_req_t    sram_req,
  input  logic        sram_ready,
  input  logic        sram_rvalid,
  input  logic [31:0] sram_rdata,
  // board DDR2 SDRAM
  output mem_req_t    ddr_req,
  input  logic        ddr_ready,
  input  logic        ddr_rvalid,
  input  logic [31:0] ddr_rdata,
  // status
  output logic        running,
  output stats_t      stats
);
  // configuration
  cfg_req_t    cfg;
  logic        hold, run, sys_idle;
  logic        pce_rv, rse_rv, ppe_rv;
  logic [31:0] pce_rd, rse_rd, ppe_rd;

  // frame multiplexer -> PCE
  logic  mux_valid, mux_ready, mux_busy;
  beat_t mux_beat;
  dir_e  mux_dir;
  logic [31:0] mux_ovf [2];

  // PCE <-> RSE
  logic         rq_valid, rq_ready, rq_def, rs_valid;
  logic [255:0] rq_fid;
  logic [31:0]  rq_hash;
  ruleset_t     rs;

  // PCE -> PPE -> demultiplexer
  logic  pce_valid, ppe_valid, ppe_drop;
  beat_t pce_beat, ppe_beat;
  desc_t pce_desc;
  dir_e  ppe_dir;

  logic pce_idle, rse_idle, ppe_idle;
  logic [31:0] fwd [2];

  configurator u_cfg (
    .clk, .rst_n,
    .in_valid(cfg_in_valid), .in_ready(cfg_in_ready), .in_data(cfg_in_data),
    .out_valid(cfg_out_valid), .out_ready(cfg_out_ready), .out_data(cfg_out_data),
    .cfg, .cfg_rvalid(pce_rv | rse_rv | ppe_rv),
    .cfg_rdata(pce_rv ? pce_rd : rse_rv ? rse_rd : ppe_rd),
    .sys_idle, .hold, .run
  );

  assign sys_idle = !mux_busy && pce_idle && rse_idle && ppe_idle;
  assign running  = run && !hold;

  frame_mux #(.DEPTH(BUF_DEPTH)) u_mux (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_last,
    .enable(run && !hold),
    .out_valid(mux_valid), .out_ready(mux_ready), .out_beat(mux_beat), .out_dir(mux_dir),
    .busy(mux_busy), .stat_overflow(mux_ovf)
  );

  pce #(.FB_DEPTH(BUF_DEPTH)) u_pce (
    .clk, .rst_n,
    .in_valid(mux_valid), .in_ready(mux_ready), .in_beat(mux_beat), .in_dir(mux_dir),
    .rse_req_valid(rq_valid), .rse_req_ready(rq_ready), .rse_req_fid(rq_fid),
    .rse_req_hash(rq_hash), .rse_req_use_default(rq_def),
    .rse_rsp_valid(rs_valid), .rse_rsp_rs(rs),
    .out_valid(pce_valid), .out_beat(pce_beat), .out_desc(pce_desc),
    .cfg, .cfg_rvalid(pce_rv), .cfg_rdata(pce_rd),
    .idle(pce_idle), .stat_incomplete(stats.incomplete_flow_id)
  );

  rse #(.SRAM_AW(SRAM_AW)) u_rse (
    .clk, .rst_n,
    .req_valid(rq_valid), .req_ready(rq_ready), .req_fid(rq_fid), .req_hash(rq_hash),
    .req_use_default(rq_def),
    .rsp_valid(rs_valid), .rsp_rs(rs),
    .sram_req, .sram_ready, .sram_rvalid, .sram_rdata,
    .ddr_req, .ddr_ready, .ddr_rvalid, .ddr_rdata,
    .cfg, .cfg_rvalid(rse_rv), .cfg_rdata(rse_rd),
    .idle(rse_idle), .stat_default(stats.default_rule_sets)
  );

  ppe #(.NUM_CS(NUM_CS), .BLOOM_BITS(BLOOM_BITS), .WEB_NODES(WEB_NODES)) u_ppe (
    .clk, .rst_n,
    .in_valid(pce_valid), .in_beat(pce_beat), .in_desc(pce_desc),
    .out_valid(ppe_valid), .out_beat(ppe_beat), .out_dir(ppe_dir), .out_drop(ppe_drop),
    .cfg, .cfg_rvalid(ppe_rv), .cfg_rdata(ppe_rd),
    .idle(ppe_idle),
    .stat_cs_discards(stats.cs_discards), .stat_cs_replaces(stats.cs_replaces),
    .stat_dpi_matches(stats.dpi_matches), .stat_web_hits(stats.web_hits)
  );

  frame_demux #(.DEPTH(BUF_DEPTH)) u_demux (
    .clk, .rst_n,
    .in_valid(ppe_valid), .in_beat(ppe_beat), .in_dir(ppe_dir), .in_drop(ppe_drop),
    .tx_valid, .tx_data, .tx_last, .idle(),
    .stat_forwarded(fwd), .stat_dropped(stats.dropped), .stat_overflow(stats.out_overflow)
  );

  assign stats.mux_overflow_up   = mux_ovf[0];
  assign stats.mux_overflow_down = mux_ovf[1];
  assign stats.fwd_up            = fwd[0];
  assign stats.fwd_down          = fwd[1];
endmodule
