// configurator: applies type-length-value configuration data.
//
// Configuration arrives as a byte stream of records: an 8-bit type, an
// 8-bit length (number of value bytes, 1..255; 0 stands for 256) and the
// value. Every component has two types: {component id, 0} writes and
// {component id, 1} reads (ids in secan_pkg: system 1, PCE 2, RSE 3, DPI 4,
// web filter 5). The value of a write record is a 32-bit start word
// address followed by data words (big-endian), written to consecutive
// addresses. The value of a read record is a start address and a word
// count (1 byte); the answer is a record on the output stream with the read
// type, length 4 x count and the words read.
// From the type byte of a record until its end `hold` is high: the frame
// multiplexer starts no new frame, and before the first access the
// configurator waits until `sys_idle` says that no frame is left inside the
// classification and processing engines. Frames only flow while the system
// register (component 1, word 0, bit 0 `run`) is set, so nothing passes
// before the system has been configured.
// The TLV layout, the two types per component, the 256-byte limit and the
// stop during configuration follow the document; the component ids, the
// address/count layout of the value and the `run` bit are this design's own.
//
// Component accesses use cfg_req_t: the request is held until the component
// answers with cfg_rvalid (for reads and writes). Unknown types are skipped.
module configurator
  import secan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output cfg_req_t    cfg,
  input  logic        cfg_rvalid,
  input  logic [31:0] cfg_rdata,
  input  logic        sys_idle,
  output logic        hold,
  output logic        run
);
  typedef enum logic [3:0] {
    C_TYPE, C_LEN, C_ADDR, C_WDATA, C_CNT, C_IDLE_WAIT, C_ACCESS,
    C_RHDR_T, C_RHDR_L, C_RSEND, C_SKIP
  } state_e;
  state_e state;

  logic [7:0]  type_q;
  logic [8:0]  rem;      // value bytes still to come
  logic [1:0]  bcnt;
  logic [31:0] addr, wdata, rdata;
  logic [6:0]  nwords;   // words still to read
  logic        accessed; // the idle wait has been done for this record

  logic [6:0] comp;
  logic       is_rd, comp_ok, in_fire;
  assign comp     = type_q[7:1];
  assign is_rd    = type_q[0];
  assign comp_ok  = comp >= COMP_SYS && comp <= COMP_WEB;
  assign in_ready = state inside {C_TYPE, C_LEN, C_ADDR, C_WDATA, C_CNT, C_SKIP};
  assign in_fire  = in_valid && in_ready;

  assign hold = state != C_TYPE;

  assign out_valid = state inside {C_RHDR_T, C_RHDR_L, C_RSEND};
  always_comb begin
    case (state)
      C_RHDR_T: out_data = type_q;
      C_RHDR_L: out_data = {nwords[5:0], 2'b00};
      default:  out_data = rdata[31 - 8*bcnt -: 8];
    endcase
  end

  // component request (the system register is served here)
  always_comb begin
    cfg       = '0;
    cfg.comp  = comp;
    cfg.addr  = addr;
    cfg.wdata = wdata;
    if (state == C_ACCESS && comp != COMP_SYS) begin
      cfg.wr = !is_rd;
      cfg.rd = is_rd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_TYPE;
      type_q   <= '0;
      rem      <= '0;
      bcnt     <= '0;
      addr     <= '0;
      wdata    <= '0;
      rdata    <= '0;
      nwords   <= '0;
      accessed <= 1'b0;
      run      <= 1'b0;
    end else begin
      case (state)
        C_TYPE: if (in_fire) begin
          type_q   <= in_data;
          accessed <= 1'b0;
          state    <= C_LEN;
        end
        C_LEN: if (in_fire) begin
          rem   <= (in_data == 8'd0) ? 9'd256 : {1'b0, in_data};
          bcnt  <= '0;
          state <= (comp_ok && (in_data == 8'd0 || in_data >= 8'd4)) ? C_ADDR : C_SKIP;
        end
        C_ADDR: if (in_fire) begin
          addr <= {addr[23:0], in_data};
          rem  <= rem - 1'b1;
          bcnt <= bcnt + 1'b1;
          if (bcnt == 2'd3) begin
            if (rem == 9'd1)  state <= C_TYPE;
            else if (is_rd)   state <= C_CNT;
            else              state <= C_WDATA;
          end
        end
        C_WDATA: if (in_fire) begin
          wdata <= {wdata[23:0], in_data};
          rem   <= rem - 1'b1;
          bcnt  <= bcnt + 1'b1;
          if (bcnt == 2'd3)        state <= accessed ? C_ACCESS : C_IDLE_WAIT;
          else if (rem == 9'd1)    state <= C_TYPE;  // incomplete word ignored
        end
        C_CNT: if (in_fire) begin
          nwords <= (in_data > 8'd63) ? 7'd63 : in_data[6:0];
          rem    <= rem - 1'b1;
          state  <= (rem == 9'd1) ? C_IDLE_WAIT : C_SKIP;
        end
        C_SKIP: if (in_fire) begin
          rem <= rem - 1'b1;
          if (rem == 9'd1) state <= C_TYPE;
        end
        C_IDLE_WAIT: if (sys_idle) begin
          accessed <= 1'b1;
          state    <= is_rd ? C_RHDR_T : C_ACCESS;
        end
        C_RHDR_T: if (out_ready) state <= C_RHDR_L;
        C_RHDR_L: if (out_ready) state <= (nwords == 0) ? C_TYPE : C_ACCESS;
        C_ACCESS: begin
          if (comp == COMP_SYS || cfg_rvalid) begin
            rdata <= (comp == COMP_SYS) ? {31'h0, run} : cfg_rdata;
            if (comp == COMP_SYS && !is_rd && addr == 32'd0) run <= wdata[0];
            addr <= addr + 1'b1;
            bcnt <= '0;
            if (is_rd)            state <= C_RSEND;
            else if (rem == 9'd0) state <= C_TYPE;
            else                  state <= C_WDATA;
          end
        end
        C_RSEND: if (out_ready) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 2'd3) begin
            nwords <= nwords - 1'b1;
            state  <= (nwords == 7'd1) ? C_TYPE : C_ACCESS;
          end
        end
        default: state <= C_TYPE;
      endcase
    end
  end
endmodule
