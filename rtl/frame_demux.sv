// frame_demux: frame demultiplexer behind the PPE.
//
// Frames leaving the PPE are written into an output buffer for their
// direction: upstream frames (received from subscribers) go to the network
// side, downstream frames to the subscriber side. A frame is only released
// once its last beat has arrived without the drop mark; a marked frame, or a
// frame that does not fit into the buffer, is removed whole (store and
// forward). Each buffer is unpacked to one byte per cycle for its Ethernet
// transmitter. Sending to the right interface and discarding follow the
// document; the store-and-forward buffers are this design's way of letting
// checks that finish at the end of a frame still stop it.
//
// Interface: in_valid/in_beat/in_dir/in_drop from the PPE (no back-pressure);
// tx_valid/tx_data/tx_last per direction (index 0 upstream, 1 downstream),
// one byte per cycle, no back-pressure from the transmitters.
module frame_demux
  import secan_pkg::*;
#(
  parameter int unsigned DEPTH = 1024  // words per direction
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  input  dir_e        in_dir,
  input  logic        in_drop,
  output logic [1:0]  tx_valid,
  output logic [7:0]  tx_data [2],
  output logic [1:0]  tx_last,
  output logic        idle,
  output logic [31:0] stat_forwarded [2],  // frames released per direction
  output logic [31:0] stat_dropped,        // frames discarded by the PPE
  output logic [31:0] stat_overflow        // frames lost for lack of buffer space
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic        rd_valid [2];
  beat_t       rd_beat  [2];
  logic        rd_en    [2];
  logic        comm     [2];
  logic        disc     [2];
  logic [AW:0] fill     [2];
  logic [1:0]  bidx     [2];
  logic        drop_d;

  for (genvar d = 0; d < 2; d++) begin : g_dir
    pkt_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en(in_valid && in_dir == dir_e'(d)), .wr_beat(in_beat), .wr_drop(in_drop), .wr_full(),
      .rd_valid(rd_valid[d]), .rd_beat(rd_beat[d]), .rd_en(rd_en[d]),
      .fill(fill[d]), .frames(), .committed(comm[d]), .discarded(disc[d])
    );

    logic last_byte;
    assign last_byte = rd_beat[d].eop ? (bidx[d] == 2'd3 - rd_beat[d].mty) : (bidx[d] == 2'd3);
    assign rd_en[d]  = rd_valid[d] && last_byte;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        bidx[d]     <= '0;
        tx_valid[d] <= 1'b0;
        tx_data[d]  <= '0;
        tx_last[d]  <= 1'b0;
        stat_forwarded[d] <= '0;
      end else begin
        tx_valid[d] <= rd_valid[d];
        tx_last[d]  <= rd_valid[d] && last_byte && rd_beat[d].eop;
        tx_data[d]  <= rd_beat[d].data[31 - 8*bidx[d] -: 8];
        if (rd_valid[d]) bidx[d] <= last_byte ? 2'd0 : bidx[d] + 1'b1;
        if (comm[d]) stat_forwarded[d] <= stat_forwarded[d] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_d        <= 1'b0;
      stat_dropped  <= '0;
      stat_overflow <= '0;
    end else begin
      drop_d <= in_valid && in_beat.eop && in_drop;
      if (drop_d) stat_dropped <= stat_dropped + 1'b1;
      if ((disc[0] || disc[1]) && !drop_d) stat_overflow <= stat_overflow + 1'b1;
    end
  end

  assign idle = !rd_valid[0] && !rd_valid[1] && fill[0] == 0 && fill[1] == 0;
endmodule
