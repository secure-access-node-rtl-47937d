// tb_frame_demux: frame demultiplexer test with small buffers (64 words).
// Frames arrive at 32 bits per cycle, some marked for dropping at their last
// beat, and leave at one byte per cycle on the interface of their direction.
// Checks the bytes of every released frame (order per direction, last-byte
// flag, no gaps inside a frame), that marked frames never appear, the
// overflow case and the counters.
module tb_frame_demux;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_drop, idle;
  beat_t       in_beat;
  dir_e        in_dir;
  logic [1:0]  tx_valid, tx_last;
  logic [7:0]  tx_data [2];
  logic [31:0] stat_forwarded [2], stat_dropped, stat_overflow;

  frame_demux #(.DEPTH(64)) dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  bytes_t exp_q [2][$];
  bytes_t got [2];
  bit     inframe [2] = '{0, 0};
  int     nfwd [2] = '{0, 0};
  int     gaps = 0;
  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      if (rst_n && inframe[d] && !tx_valid[d]) gaps++;
      if (rst_n && tx_valid[d]) begin
        if (!inframe[d]) got[d] = {};
        inframe[d] = 1;
        got[d].push_back(tx_data[d]);
        if (tx_last[d]) begin
          automatic bytes_t e;
          inframe[d] = 0;
          nfwd[d]++;
          check(exp_q[d].size() > 0, $sformatf("unexpected frame on %0d at %0t", d, $time));
          if (exp_q[d].size() > 0) begin
            e = exp_q[d].pop_front();
            check(got[d] == e, $sformatf("dir %0d frame %0d bytes", d, nfwd[d]));
          end
        end
      end
    end
  end

  function automatic bytes_t rand_frame(int len);
    bytes_t b;
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  // drive one frame; `drop` is asserted with the last beat only
  task automatic send(dir_e d, bytes_t b, bit drop, bit expect_out, bit gappy);
    int n = (b.size() + 3) / 4;
    if (expect_out) exp_q[int'(d)].push_back(b);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      in_valid = 1; in_dir = d;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'hEE;
      in_drop = drop && in_beat.eop;
      if (gappy && ($urandom % 3 == 0)) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0; in_drop = 0;
  endtask

  initial begin
    int ndrop = 0;
    in_valid = 0; in_drop = 0; in_beat = '0; in_dir = DIR_UP;
    repeat (3) @(negedge clk); rst_n = 1;

    // single frames, all tail lengths, both directions
    for (int len = 60; len < 64; len++) begin
      send(DIR_UP, rand_frame(len), 0, 1, 0);
      send(DIR_DOWN, rand_frame(len), 0, 1, 0);
    end
    // a dropped frame between two good ones
    send(DIR_UP, rand_frame(70), 0, 1, 0);
    send(DIR_UP, rand_frame(70), 1, 0, 0); ndrop++;
    send(DIR_UP, rand_frame(70), 0, 1, 0);
    repeat (400) @(negedge clk);
    check(idle, "idle after draining");

    // overflow: three 120-byte frames back to back into 64 words
    send(DIR_DOWN, rand_frame(120), 0, 1, 0);
    send(DIR_DOWN, rand_frame(120), 0, 1, 0);
    send(DIR_DOWN, rand_frame(120), 0, 0, 0);
    repeat (400) @(negedge clk);
    check(stat_overflow == 1, $sformatf("overflow count %0d", stat_overflow));

    // random mix with gaps inside frames
    for (int i = 0; i < 60; i++) begin
      automatic bit dr = ($urandom % 4) == 0;
      automatic dir_e d = dir_e'($urandom % 2);
      send(d, rand_frame(60 + $urandom % 40), dr, !dr, 1);
      if (dr) ndrop++;
      repeat (100) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all frames out");
    check(gaps == 0, $sformatf("%0d gaps inside transmitted frames", gaps));
    check(stat_dropped == ndrop, $sformatf("dropped %0d vs %0d", stat_dropped, ndrop));
    check(stat_forwarded[0] == nfwd[0] && stat_forwarded[1] == nfwd[1], "forward counters");
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
