// rse: Rule Set Engine, a two-stage rule set search without CAM.
//
// Stage 1 reads one word of the board SRAM at the address given by the low
// SRAM_AW bits of the CRC32 of the flow id. That word is a map entry:
//   [31] valid, [30:24] number of rule words, [23:0] pointer to the rule set
//   record in DDR2, in units of 8 words (32 bytes).
// Stage 2 reads the record from DDR2: the 8-word flow id it belongs to,
// followed by the rule words. The stored flow id is compared with the
// requested one, so a CRC collision or an empty map entry falls back to the
// standard rule set, described by the `default entry` register (its record
// is read without the flow id check). A request flagged `use_default` (a
// flow id that could not be completed) goes straight to the standard set.
// The two-stage split and the SRAM/DDR2 roles follow the document; the entry
// and record formats and the collision check are this design's own.
//
// Memory ports: one request per cycle when `*_ready`, read data returns in
// order with `*_rvalid`. DDR2 reads are issued back to back (several in
// flight); the SRAM is read once per lookup.
// Configuration (component COMP_RSE): addr[31:30] = 0 default entry
// register, 1 SRAM word addr[29:0], 2 DDR2 word addr[29:0]. Configuration
// accesses are only served while no lookup is in progress. A request is held
// by the configurator until `cfg_rvalid` acknowledges it (writes included);
// the cycle of the acknowledge is ignored so a held request acts once.
// Timing: a lookup takes SRAM latency + 8 + n DDR2 words + latency cycles.
module rse
  import secan_pkg::*;
#(
  parameter int unsigned SRAM_AW = 18  // 1 MB of 32-bit words
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup request from the PCE
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [255:0]    req_fid,
  input  logic [31:0]     req_hash,
  input  logic            req_use_default,
  // rule set to the PCE
  output logic            rsp_valid,
  output ruleset_t        rsp_rs,
  // SRAM port
  output mem_req_t        sram_req,
  input  logic            sram_ready,
  input  logic            sram_rvalid,
  input  logic [31:0]     sram_rdata,
  // DDR2 port
  output mem_req_t        ddr_req,
  input  logic            ddr_ready,
  input  logic            ddr_rvalid,
  input  logic [31:0]     ddr_rdata,
  // configuration
  input  cfg_req_t        cfg,
  output logic            cfg_rvalid,
  output logic [31:0]     cfg_rdata,
  output logic            idle,
  output logic [31:0]     stat_default  // lookups answered with the standard set
);
  typedef enum logic [2:0] {S_IDLE, S_SRAM_REQ, S_SRAM_WAIT, S_DDR, S_RSP, S_CFG_WAIT} state_e;
  state_e state;

  logic [255:0] fid;
  logic [31:0]  hash;
  logic [31:0]  def_entry;
  logic         use_def, mismatch;
  logic [7:0]   n_total, n_issued, n_recv;
  logic [31:0]  base;
  ruleset_t     rs;
  logic         cfg_sel, cfg_mem;
  logic         cfg_is_ddr;

  assign cfg_sel    = (cfg.wr || cfg.rd) && cfg.comp == COMP_RSE && !cfg_rvalid;
  assign cfg_mem    = cfg.addr[31:30] != 2'd0;
  assign cfg_is_ddr = cfg.addr[31:30] == 2'd2;
  assign req_ready  = state == S_IDLE && !cfg_sel;
  assign idle       = state == S_IDLE && !req_valid;

  function automatic logic [7:0] words_of(logic [31:0] e, logic d);
    logic [7:0] n;
    n = {1'b0, e[30:24]};
    if (n > 8'(RS_MAX_WORDS)) n = 8'(RS_MAX_WORDS);
    return d ? n : n + 8'(FID_WORDS);
  endfunction

  // memory ports
  always_comb begin
    sram_req = '0;
    ddr_req  = '0;
    if (state == S_SRAM_REQ) begin
      sram_req.valid = 1'b1;
      sram_req.addr  = 32'(hash[SRAM_AW-1:0]);
    end
    if (state == S_DDR && n_issued < n_total) begin
      ddr_req.valid = 1'b1;
      ddr_req.addr  = base + 32'(n_issued);
    end
    if (state == S_IDLE && cfg_sel && cfg_mem) begin
      if (cfg_is_ddr) begin
        ddr_req.valid = 1'b1;
        ddr_req.we    = cfg.wr;
        ddr_req.addr  = {2'b00, cfg.addr[29:0]};
        ddr_req.wdata = cfg.wdata;
      end else begin
        sram_req.valid = 1'b1;
        sram_req.we    = cfg.wr;
        sram_req.addr  = {2'b00, cfg.addr[29:0]};
        sram_req.wdata = cfg.wdata;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      fid          <= '0;
      hash         <= '0;
      def_entry    <= '0;
      use_def      <= 1'b0;
      mismatch     <= 1'b0;
      n_total      <= '0;
      n_issued     <= '0;
      n_recv       <= '0;
      base         <= '0;
      rs           <= '0;
      rsp_valid    <= 1'b0;
      rsp_rs       <= '0;
      cfg_rvalid   <= 1'b0;
      cfg_rdata    <= '0;
      stat_default <= '0;
    end else begin
      rsp_valid  <= 1'b0;
      cfg_rvalid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (cfg_sel) begin
            if (!cfg_mem) begin
              if (cfg.wr) def_entry <= cfg.wdata;
              cfg_rdata  <= def_entry;
              cfg_rvalid <= 1'b1;
            end else if (cfg_is_ddr ? ddr_ready : sram_ready) begin
              if (cfg.rd) state      <= S_CFG_WAIT;
              else        cfg_rvalid <= 1'b1;
            end
          end else if (req_valid) begin
            fid  <= req_fid;
            hash <= req_hash;
            if (req_use_default) begin
              use_def  <= 1'b1;
              base     <= 32'({def_entry[23:0], 3'b000}) + 32'(FID_WORDS);
              n_total  <= words_of(def_entry, 1'b1);
              n_issued <= '0;
              n_recv   <= '0;
              rs       <= '0;
              mismatch <= 1'b0;
              state    <= S_DDR;
            end else begin
              use_def <= 1'b0;
              state   <= S_SRAM_REQ;
            end
          end
        end
        S_CFG_WAIT: begin
          if (cfg_is_ddr ? ddr_rvalid : sram_rvalid) begin
            cfg_rdata  <= cfg_is_ddr ? ddr_rdata : sram_rdata;
            cfg_rvalid <= 1'b1;
            state      <= S_IDLE;
          end
        end
        S_SRAM_REQ: if (sram_ready) state <= S_SRAM_WAIT;
        S_SRAM_WAIT: begin
          if (sram_rvalid) begin
            automatic logic [31:0] e = sram_rdata[31] ? sram_rdata : def_entry;
            automatic logic        d = !sram_rdata[31];
            use_def  <= d;
            base     <= 32'({e[23:0], 3'b000}) + (d ? 32'(FID_WORDS) : 32'd0);
            n_total  <= words_of(e, d);
            n_issued <= '0;
            n_recv   <= '0;
            rs       <= '0;
            mismatch <= 1'b0;
            state    <= S_DDR;
          end
        end
        S_DDR: begin
          if (ddr_req.valid && ddr_ready) n_issued <= n_issued + 1'b1;
          if (ddr_rvalid) begin
            n_recv <= n_recv + 1'b1;
            if (!use_def && n_recv < 8'(FID_WORDS)) begin
              if (ddr_rdata != fid[255 - 32*n_recv -: 32]) mismatch <= 1'b1;
            end else begin
              automatic int unsigned k = use_def ? int'(n_recv) : int'(n_recv) - FID_WORDS;
              rs.words[k] <= ddr_rdata;
              rs.count    <= 5'(k + 1);
            end
          end
          if (n_recv == n_total || (ddr_rvalid && n_recv + 1'b1 == n_total)) begin
            state <= S_RSP;
          end
        end
        S_RSP: begin
          if (mismatch) begin
            // wrong flow: read the standard rule set instead
            use_def  <= 1'b1;
            mismatch <= 1'b0;
            base     <= 32'({def_entry[23:0], 3'b000}) + 32'(FID_WORDS);
            n_total  <= words_of(def_entry, 1'b1);
            n_issued <= '0;
            n_recv   <= '0;
            rs       <= '0;
            state    <= S_DDR;
          end else begin
            rsp_valid         <= 1'b1;
            rsp_rs            <= rs;
            rsp_rs.is_default <= use_def;
            if (use_def) stat_default <= stat_default + 1'b1;
            state             <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
