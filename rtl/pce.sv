// pce: Packet Classification Engine.
//
// Takes one frame at a time from the frame multiplexer, together with the
// direction it was received in. While the frame is written into the frame
// buffer, the frame parser collects the ten frame parameters. The flow id
// trigger of the frame's direction (upstream or downstream, both written by
// the configurator) selects the parameters that make up the flow id; the flow
// id is composed word by word and hashed with CRC32 on the way, giving the
// SRAM address of the rule set map. If a selected parameter is missing from
// the frame, the flow id is incomplete and the standard rule set is
// requested instead. Once the RSE returns the rule set, the frame leaves the
// frame buffer towards the PPE, its first beat accompanied by the parameter
// set and the rule set (`out_desc`), so the control stages can compare rule
// and parameters before the frame data arrives.
//
// Three stages overlap: while frame n is sent to the PPE (stage B), the rule
// set of frame n+1 may be searched by the RSE (lookup stage) and frame n+2
// received and classified (stage A). This keeps up with minimum-size frames
// arriving on both lines at once. The frame buffer holds FB_DEPTH words.
//
// Interface: in_valid/in_ready/in_beat/in_dir from the multiplexer;
// out_valid/out_beat with out_desc valid on the sop beat (no back-pressure).
// RSE request valid/ready, response valid. Configuration component COMP_PCE:
// word 0 = upstream trigger, word 1 = downstream trigger (bits 9:0).
// Timing: classification takes 8 cycles for the flow id plus the RSE lookup
// after the last beat of the frame has been received.
module pce
  import secan_pkg::*;
#(
  parameter int unsigned FB_DEPTH = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  beat_t           in_beat,
  input  dir_e            in_dir,
  // RSE
  output logic            rse_req_valid,
  input  logic            rse_req_ready,
  output logic [255:0]    rse_req_fid,
  output logic [31:0]     rse_req_hash,
  output logic            rse_req_use_default,
  input  logic            rse_rsp_valid,
  input  ruleset_t        rse_rsp_rs,
  // towards the PPE
  output logic            out_valid,
  output beat_t           out_beat,
  output desc_t           out_desc,
  // configuration
  input  cfg_req_t        cfg,
  output logic            cfg_rvalid,
  output logic [31:0]     cfg_rdata,
  output logic            idle,
  output logic [31:0]     stat_incomplete  // frames whose flow id could not be completed
);
  typedef enum logic [1:0] {A_RECV, A_PARSE, A_HASH, A_REQ} a_state_e;
  a_state_e a_state;

  logic [NUM_PARAMS-1:0] trig_up, trig_down;
  dir_e      dir;
  pset_t     pset_parsed, pset_q;
  logic      parse_done;
  logic [255:0] fid;
  logic [3:0]   widx;
  logic         incomplete;

  // lookup stage: the frame whose rule set is being searched by the RSE
  logic         l_busy, l_have_rs;
  pset_t        l_pset;
  ruleset_t     l_rs;

  // descriptor slot between the two stages
  logic   slot_full;
  desc_t  slot;

  // frame buffer
  logic   fb_full, fb_rd_valid, fb_rd_en;
  beat_t  fb_rd_beat;
  logic   in_fire;

  assign in_ready = a_state == A_RECV && !fb_full;
  assign in_fire  = in_valid && in_ready;

  pkt_fifo #(.DEPTH(FB_DEPTH)) u_fb (
    .clk, .rst_n,
    .wr_en(in_fire), .wr_beat(in_beat), .wr_drop(1'b0), .wr_full(fb_full),
    .rd_valid(fb_rd_valid), .rd_beat(fb_rd_beat), .rd_en(fb_rd_en),
    .fill(), .frames(), .committed(), .discarded()
  );

  frame_parser u_parser (
    .clk, .rst_n, .in_valid(in_fire), .in_beat, .done(parse_done), .pset(pset_parsed)
  );

  // CRC32 over the flow id, one word per cycle while it is composed
  logic        crc_init, crc_en;
  logic [31:0] crc;
  assign crc_init = a_state == A_PARSE;
  assign crc_en   = a_state == A_HASH;
  crc32_unit u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_en), .data(fid[255 - 32*widx -: 32]), .crc
  );

  assign rse_req_valid       = a_state == A_REQ && !l_busy;
  assign rse_req_fid         = fid;
  assign rse_req_hash        = crc;
  assign rse_req_use_default = incomplete;

  // configuration registers
  logic cfg_sel;
  assign cfg_sel = (cfg.wr || cfg.rd) && cfg.comp == COMP_PCE && !cfg_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_up    <= '0;
      trig_down  <= '0;
      cfg_rvalid <= 1'b0;
      cfg_rdata  <= '0;
    end else begin
      cfg_rvalid <= cfg_sel;
      if (cfg_sel) begin
        cfg_rdata <= 32'(cfg.addr[0] ? trig_down : trig_up);
        if (cfg.wr && !cfg.addr[0]) trig_up   <= cfg.wdata[NUM_PARAMS-1:0];
        if (cfg.wr &&  cfg.addr[0]) trig_down <= cfg.wdata[NUM_PARAMS-1:0];
      end
    end
  end

  // stage A: receive, classify, look up
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_state         <= A_RECV;
      dir             <= DIR_UP;
      pset_q          <= '0;
      fid             <= '0;
      widx            <= '0;
      incomplete      <= 1'b0;
      stat_incomplete <= '0;
    end else begin
      case (a_state)
        A_RECV: if (in_fire) begin
          if (in_beat.sop) dir <= in_dir;
          if (in_beat.eop) a_state <= A_PARSE;
        end
        A_PARSE: if (parse_done) begin
          automatic logic [NUM_PARAMS-1:0] trig = (dir == DIR_DOWN) ? trig_down : trig_up;
          pset_q     <= pset_parsed;
          pset_q.dir <= dir;
          fid        <= make_flow_id(pset_parsed.f, trig);
          incomplete <= |(trig & ~pset_parsed.present);
          widx       <= '0;
          a_state    <= A_HASH;
        end
        A_HASH: begin
          widx <= widx + 1'b1;
          if (widx == 4'(FID_WORDS - 1)) a_state <= A_REQ;
        end
        A_REQ: if (rse_req_valid && rse_req_ready) begin
          if (incomplete) stat_incomplete <= stat_incomplete + 1'b1;
          a_state <= A_RECV;
        end
        default: a_state <= A_RECV;
      endcase
    end
  end

  // lookup stage: waits for the rule set, then hands the descriptor to stage B
  logic l_push;
  assign l_push = l_busy && l_have_rs && !slot_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_busy    <= 1'b0;
      l_have_rs <= 1'b0;
      l_pset    <= '0;
      l_rs      <= '0;
    end else begin
      if (rse_req_valid && rse_req_ready) begin
        l_busy <= 1'b1;
        l_pset <= pset_q;
      end
      if (rse_rsp_valid) begin
        l_have_rs <= 1'b1;
        l_rs      <= rse_rsp_rs;
      end
      if (l_push) begin
        l_busy    <= 1'b0;
        l_have_rs <= 1'b0;
      end
    end
  end

  // stage B: send the frame with its descriptor to the PPE
  assign fb_rd_en = slot_full && fb_rd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_full <= 1'b0;
      slot      <= '0;
      out_valid <= 1'b0;
      out_beat  <= '0;
      out_desc  <= '0;
    end else begin
      out_valid <= fb_rd_en;
      if (fb_rd_en) begin
        out_beat <= fb_rd_beat;
        out_desc <= slot;
        if (fb_rd_beat.eop) slot_full <= 1'b0;
      end
      if (l_push) begin
        slot_full <= 1'b1;
        slot.p    <= l_pset;
        slot.rs   <= l_rs;
      end
    end
  end

  assign idle = a_state == A_RECV && !l_busy && !slot_full && !fb_rd_valid && !in_valid;
endmodule
