// tb_frame_mux: frame multiplexer test with small buffers (64 words).
// Checks: nothing leaves while `enable` is low; the fuller buffer is served
// first and upstream wins a tie; a frame that does not fit is discarded whole
// and counted; random traffic on both directions with random back-pressure
// arrives complete, unchanged, in order per direction and with the right
// direction tag.
module tb_frame_mux;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  rx_valid, rx_last;
  logic [7:0]  rx_data [2];
  logic        enable, out_valid, out_ready, busy;
  beat_t       out_beat;
  dir_e        out_dir;
  logic [31:0] stat_overflow [2];

  frame_mux #(.DEPTH(64)) dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  bytes_t exp_q [2][$];
  dir_e   order[$];
  bytes_t got;
  int     nout = 0;
  always @(posedge clk) if (out_valid && out_ready) begin
    if (out_beat.sop) got = {};
    for (int k = 0; k < 4; k++) if (!(out_beat.eop && k >= 4 - int'(out_beat.mty))) got.push_back(out_beat.data[31-8*k -: 8]);
    if (out_beat.eop) begin
      automatic bytes_t e;
      automatic int d = int'(out_dir);
      nout++;
      order.push_back(out_dir);
      check(exp_q[d].size() > 0, "unexpected frame");
      if (exp_q[d].size() > 0) begin
        e = exp_q[d].pop_front();
        check(got == e, $sformatf("frame %0d dir %0d content (len %0d vs %0d)", nout, d, got.size(), e.size()));
      end
    end
  end

  function automatic bytes_t rand_frame(int len);
    bytes_t b;
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  task automatic send(int d, bytes_t b, bit expect_out, int gap);
    if (expect_out) exp_q[d].push_back(b);
    foreach (b[i]) begin
      @(negedge clk);
      rx_valid[d] = 1; rx_data[d] = b[i]; rx_last[d] = (i == b.size() - 1);
    end
    @(negedge clk); rx_valid[d] = 0; rx_last[d] = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic drain(int cycles);
    enable = 1;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    rx_valid = 0; rx_last = 0; rx_data[0] = 0; rx_data[1] = 0; enable = 0; out_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. enable low holds frames; the fuller buffer goes first
    fork
      send(0, rand_frame(20), 1, 0);
      send(1, rand_frame(100), 1, 0);
    join
    repeat (20) @(negedge clk);
    check(!busy && !out_valid, "nothing sent while disabled");
    order = {};
    drain(80);
    check(order.size() == 2 && order[0] == DIR_DOWN && order[1] == DIR_UP, "fuller buffer first");

    // 2. equal fill: upstream first
    enable = 0; order = {};
    fork
      send(0, rand_frame(48), 1, 0);
      send(1, rand_frame(48), 1, 0);
    join
    drain(60);
    check(order.size() == 2 && order[0] == DIR_UP && order[1] == DIR_DOWN, "tie goes upstream");

    // 3. overflow: the third 100-byte frame does not fit into 64 words
    enable = 0;
    send(0, rand_frame(100), 1, 2);
    send(0, rand_frame(100), 1, 2);
    send(0, rand_frame(100), 0, 2);
    check(stat_overflow[0] == 1 && stat_overflow[1] == 0, $sformatf("overflow count %0d", stat_overflow[0]));
    send(0, rand_frame(30), 1, 2);  // 8 words still fit
    drain(150);
    check(exp_q[0].size() == 0, "frames around the overflow delivered");
    check(stat_overflow[0] == 1, "only the oversized frame lost");

    // 4. random traffic on both directions, random back-pressure
    fork
      for (int i = 0; i < 40; i++) send(0, rand_frame(60 + $urandom % 60), 1, $urandom % 40);
      for (int i = 0; i < 40; i++) send(1, rand_frame(60 + $urandom % 60), 1, $urandom % 40);
      begin
        enable = 1;
        repeat (9000) begin @(negedge clk); out_ready = ($urandom % 4) != 0; end
        out_ready = 1;
      end
    join
    repeat (200) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
          $sformatf("random traffic delivered (%0d/%0d left)", exp_q[0].size(), exp_q[1].size()));
    check(!busy, "idle at the end");
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
