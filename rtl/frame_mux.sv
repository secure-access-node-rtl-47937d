// frame_mux: frame multiplexer in front of the PCE.
//
// Each of the two Ethernet directions delivers one byte per cycle (1 Gbit/s
// at 125 MHz). Bytes are packed into 32-bit words and stored, frame by
// frame, in a buffer per direction; a frame that does not fit is discarded
// whole. Whenever the PCE can take a new frame and `enable` is high, the
// multiplexer picks the direction whose buffer holds the most words (among
// those holding a complete frame; upstream wins a tie) and sends that frame
// to the PCE, with the direction it came from. Picking the fuller buffer
// follows the document; packing, buffer size and tie rule are this design's.
// `enable` low (not configured yet, or configuration in progress) stops new
// frames from being started; frames keep arriving into the buffers.
//
// Interface: rx_valid/rx_data/rx_last per direction (index 0 upstream,
// 1 downstream); out_valid/out_ready/out_beat/out_dir towards the PCE.
module frame_mux
  import secan_pkg::*;
#(
  parameter int unsigned DEPTH = 1024  // words per direction
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  rx_valid,
  input  logic [7:0]  rx_data [2],
  input  logic [1:0]  rx_last,
  input  logic        enable,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output dir_e        out_dir,
  output logic        busy,             // a frame is being sent
  output logic [31:0] stat_overflow [2] // frames lost for lack of buffer space
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic        wr_en    [2];
  beat_t       wr_beat  [2];
  logic        rd_valid [2];
  beat_t       rd_beat  [2];
  logic        rd_en    [2];
  logic [AW:0] fill     [2];
  logic        disc     [2];
  logic [23:0] acc      [2];
  logic [1:0]  nb       [2];
  logic        first    [2];

  for (genvar d = 0; d < 2; d++) begin : g_dir
    // byte packer
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[d]     <= '0;
        nb[d]      <= '0;
        first[d]   <= 1'b1;
        wr_en[d]   <= 1'b0;
        wr_beat[d] <= '0;
        stat_overflow[d] <= '0;
      end else begin
        wr_en[d] <= 1'b0;
        if (rx_valid[d]) begin
          if (nb[d] == 2'd3 || rx_last[d]) begin
            automatic logic [31:0] w;
            case (nb[d])
              2'd0:    w = {rx_data[d], 24'h0};
              2'd1:    w = {acc[d][7:0], rx_data[d], 16'h0};
              2'd2:    w = {acc[d][15:0], rx_data[d], 8'h0};
              default: w = {acc[d], rx_data[d]};
            endcase
            wr_en[d]        <= 1'b1;
            wr_beat[d].data <= w;
            wr_beat[d].sop  <= first[d];
            wr_beat[d].eop  <= rx_last[d];
            wr_beat[d].mty  <= 2'd3 - nb[d];
            nb[d]           <= '0;
            first[d]        <= rx_last[d];
          end else begin
            acc[d] <= {acc[d][15:0], rx_data[d]};
            nb[d]  <= nb[d] + 1'b1;
          end
        end
        if (disc[d]) stat_overflow[d] <= stat_overflow[d] + 1'b1;
      end
    end

    pkt_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en(wr_en[d]), .wr_beat(wr_beat[d]), .wr_drop(1'b0), .wr_full(),
      .rd_valid(rd_valid[d]), .rd_beat(rd_beat[d]), .rd_en(rd_en[d]),
      .fill(fill[d]), .frames(), .committed(), .discarded(disc[d])
    );
  end

  // selection of the next frame
  logic active;
  dir_e sel;

  assign out_valid = active && rd_valid[sel];
  assign out_beat  = rd_beat[sel];
  assign out_dir   = sel;
  assign rd_en[0]  = out_valid && out_ready && sel == DIR_UP;
  assign rd_en[1]  = out_valid && out_ready && sel == DIR_DOWN;
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      sel    <= DIR_UP;
    end else if (!active) begin
      if (enable && (rd_valid[0] || rd_valid[1])) begin
        active <= 1'b1;
        if (rd_valid[0] && (!rd_valid[1] || fill[0] >= fill[1])) sel <= DIR_UP;
        else                                                     sel <= DIR_DOWN;
      end
    end else if (out_valid && out_ready && out_beat.eop) begin
      active <= 1'b0;
    end
  end
endmodule
