// pkt_fifo: frame buffer with per-frame commit or discard.
//
// Beats are written at a tentative write pointer. When the last beat of a
// frame (eop) is written, the frame is committed, which makes it visible to
// the reader, unless `wr_drop` is high with that beat or the buffer ran full
// during the frame: then the tentative pointer is rewound and the frame
// vanishes without a trace. The reader only ever sees whole frames.
// This buffer serves as the PCE frame buffer and as the per-direction buffers
// of the frame multiplexer and demultiplexer.
//
// Interface: write side wr_en/wr_beat/wr_drop; read side rd_valid/rd_beat
// (combinational from the array)/rd_en. `fill` counts committed words,
// `frames` committed frames. `committed`/`discarded` pulse one cycle after
// an eop write. Storage is a plain array of DEPTH words (a block RAM with
// asynchronous read on an FPGA would be replaced by a registered read).
module pkt_fifo
  import secan_pkg::*;
#(
  parameter int unsigned DEPTH = 1024  // words; power of two
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_en,
  input  beat_t    wr_beat,
  input  logic     wr_drop,
  output logic     wr_full,
  output logic     rd_valid,
  output beat_t    rd_beat,
  input  logic     rd_en,
  output logic [$clog2(DEPTH):0] fill,
  output logic [15:0] frames,
  output logic     committed,
  output logic     discarded
);
  localparam int unsigned AW = $clog2(DEPTH);

  beat_t mem [DEPTH];
  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic        ovf;  // current frame lost words for lack of space
  logic        rd_fire, wr_fire, eop_rd;

  assign wr_full  = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign rd_valid = rd_ptr != commit_ptr;
  assign rd_beat  = mem[rd_ptr[AW-1:0]];
  assign fill     = commit_ptr - rd_ptr;
  assign rd_fire  = rd_en && rd_valid;
  assign wr_fire  = wr_en && !wr_full;
  assign eop_rd = rd_fire && rd_beat.eop;

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wr_ptr[AW-1:0]] <= wr_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      commit_ptr <= '0;
      rd_ptr     <= '0;
      ovf        <= 1'b0;
      frames     <= '0;
      committed  <= 1'b0;
      discarded  <= 1'b0;
    end else begin
      committed <= 1'b0;
      discarded <= 1'b0;
      if (rd_fire) rd_ptr <= rd_ptr + 1'b1;
      if (wr_en && wr_beat.eop) begin
        if (wr_drop || ovf || wr_full) begin
          wr_ptr    <= commit_ptr;
          discarded <= 1'b1;
        end else begin
          wr_ptr     <= wr_ptr + 1'b1;
          commit_ptr <= wr_ptr + 1'b1;
          committed  <= 1'b1;
        end
        ovf <= 1'b0;
      end else if (wr_en) begin
        if (wr_full) ovf <= 1'b1;
        else         wr_ptr <= wr_ptr + 1'b1;
      end
      frames <= frames + 16'(committed) - 16'(eop_rd);
    end
  end
endmodule
