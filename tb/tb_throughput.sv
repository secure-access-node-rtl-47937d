// tb_throughput: line-rate workload for the whole node at default sizes.
// Both Ethernet sides receive back-to-back frames at 1 Gbit/s each (one
// byte per cycle at 125 MHz, with a 24-byte gap for preamble, inter-frame
// gap and FCS), i.e. 2 Gbit/s in total, for several frame lengths. Every
// frame belongs to a configured flow whose rule set (three rules, one per
// layer, none discarding) is read from DDR2 with its stored flow id, so each
// frame takes the full lookup path. For each length the test prints frames
// sent, delivered and lost, the offered and delivered rates of frame bytes
// and the peak input buffer fill. It checks that no frame is lost, that the
// input buffers stay below half full (the node keeps up rather than
// absorbing a backlog), that every delivered frame is intact and in order,
// and that any loss would have been counted at the input buffers.
module tb_throughput;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;  // 125 MHz
  int checks = 0, failures = 0;

  logic [1:0]  rx_valid, rx_last, tx_valid, tx_last;
  logic [7:0]  rx_data [2], tx_data [2];
  logic        cfg_in_valid, cfg_in_ready, cfg_out_valid, cfg_out_ready, running;
  logic [7:0]  cfg_in_data, cfg_out_data;
  mem_req_t    sram_req, ddr_req;
  logic        sram_ready, sram_rvalid, ddr_ready, ddr_rvalid;
  logic [31:0] sram_rdata, ddr_rdata;
  stats_t      stats;

  secan_top dut (.*);
  mem_model #(.LATENCY(3)) u_sram (.clk, .req(sram_req), .ready(sram_ready), .rvalid(sram_rvalid), .rdata(sram_rdata));
  mem_model #(.LATENCY(9)) u_ddr  (.clk, .req(ddr_req),  .ready(ddr_ready),  .rvalid(ddr_rvalid),  .rdata(ddr_rdata));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // scoreboard: frames may be lost whole at the input buffers, so a received
  // frame is matched against the oldest expected frames, skipping lost ones
  bytes_t exp_q [2][$];
  bytes_t got [2];
  int     nrecv [2] = '{0, 0}, nlost [2] = '{0, 0}, nbad = 0;
  longint bytes_out = 0;
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (tx_valid[d]) begin
      got[d].push_back(tx_data[d]);
      bytes_out++;
      if (tx_last[d]) begin
        automatic bit found = 0;
        while (exp_q[d].size() > 0 && !found) begin
          automatic bytes_t e = exp_q[d].pop_front();
          if (e == got[d]) found = 1; else nlost[d]++;
        end
        if (!found) nbad++;
        nrecv[d]++;
        got[d] = {};
      end
    end
  end

  // peak input buffer fill (words) per measurement
  int peak = 0;
  always @(posedge clk) begin
    if (int'(dut.u_mux.fill[0]) > peak) peak = int'(dut.u_mux.fill[0]);
    if (int'(dut.u_mux.fill[1]) > peak) peak = int'(dut.u_mux.fill[1]);
  end

  task automatic cfg_byte(byte unsigned b);
    @(negedge clk);
    cfg_in_valid = 1; cfg_in_data = b;
    do @(posedge clk); while (!cfg_in_ready);
    @(negedge clk); cfg_in_valid = 0;
  endtask

  task automatic cfg_write(logic [6:0] comp, logic [31:0] addr, logic [31:0] w[$]);
    bytes_t v;
    put32(v, addr);
    foreach (w[k]) put32(v, w[k]);
    cfg_byte({comp, 1'b0});
    cfg_byte(8'(v.size()));
    foreach (v[k]) cfg_byte(v[k]);
  endtask

  function automatic logic [31:0] rule(logic [7:0] ty, int field, logic [7:0] act);
    return {ty, 8'd8, 4'(field), OP_EQ, act};
  endfunction

  localparam logic [9:0] TRIG = 10'b11_1110_0000;

  function automatic fspec_t flow(int d, int len, int seq);
    fspec_t s = default_spec();
    if (d == 1) begin s.sip = 32'hC0A8_0101; s.dip = 32'h0A00_0001; s.sport = 80; s.dport = 40000; end
    s.payload = {};
    for (int i = 0; i < len - 54; i++) s.payload.push_back(8'(seq + i));
    return s;
  endfunction

  task automatic add_flow(fspec_t s, logic [23:0] ptr);
    logic [255:0] f = make_flow_id(spec_params(s), TRIG);
    logic [31:0] w[$];
    for (int k = 0; k < 8; k++) w.push_back(f[255 - 32*k -: 32]);
    w.push_back(rule(CS_L2, P_ETYPE, ACT_FORWARD)); w.push_back(0); w.push_back(32'h0800);
    w.push_back(rule(CS_L3, P_PROTO, ACT_FORWARD)); w.push_back(0); w.push_back(6);
    w.push_back(rule(CS_L4, P_DPORT, ACT_DISCARD)); w.push_back(0); w.push_back(23);
    cfg_write(COMP_RSE, {2'd2, 30'(ptr) << 3}, w);
    cfg_write(COMP_RSE, {2'd1, 12'd0, crc32_ref(f, 256)[17:0]}, '{{1'b1, 7'd9, ptr}});
  endtask

  task automatic line(int d, int len, int n);
    for (int k = 0; k < n; k++) begin
      bytes_t b = build_frame(flow(d, len, k));
      exp_q[d].push_back(b);
      foreach (b[i]) begin
        @(negedge clk);
        rx_valid[d] = 1; rx_data[d] = b[i]; rx_last[d] = (i == b.size() - 1);
      end
      @(negedge clk); rx_valid[d] = 0; rx_last[d] = 0;
      repeat (23) @(negedge clk);
    end
  endtask

  initial begin
    int lens[5] = '{60, 128, 256, 512, 1514};
    rx_valid = 0; rx_last = 0; rx_data[0] = 0; rx_data[1] = 0;
    cfg_in_valid = 0; cfg_in_data = 0; cfg_out_ready = 1;
    got[0] = {}; got[1] = {};
    repeat (5) @(negedge clk); rst_n = 1;
    cfg_write(COMP_PCE, 0, '{32'(TRIG), 32'(TRIG)});
    add_flow(flow(0, 60, 0), 24'h20);
    add_flow(flow(1, 60, 0), 24'h30);
    cfg_write(COMP_SYS, 0, '{1});

    foreach (lens[li]) begin
      automatic int len = lens[li];
      automatic int n = (len < 256) ? 200 : 60;
      automatic int lost0 = nlost[0] + nlost[1], recv0 = nrecv[0] + nrecv[1];
      automatic int ovf0 = stats.mux_overflow_up + stats.mux_overflow_down;
      automatic longint t0 = $time, b0 = bytes_out;
      automatic int lost, recv, ovf;
      peak = 0;
      fork
        line(0, len, n);
        line(1, len, n);
      join
      t0 = $time - t0;
      // drain: wait until the node is empty and both transmitters are quiet
      begin
        automatic int quiet = 0;
        while (quiet < 400) begin
          @(negedge clk);
          quiet = (dut.sys_idle && tx_valid == 0 && !dut.u_mux.rd_valid[0] && !dut.u_mux.rd_valid[1]) ? quiet + 1 : 0;
        end
      end
      // frames still expected after draining were lost too
      for (int d = 0; d < 2; d++) begin nlost[d] += exp_q[d].size(); exp_q[d] = {}; end
      lost = nlost[0] + nlost[1] - lost0;
      recv = nrecv[0] + nrecv[1] - recv0;
      ovf  = stats.mux_overflow_up + stats.mux_overflow_down - ovf0;
      $display("WORKLOAD len=%0d sent=%0d delivered=%0d lost=%0d frame bytes offered %.2f Gbit/s, delivered %.2f Gbit/s, peak input buffer fill %0d words",
               len, 2 * n, recv, lost, real'(2 * n * len) * 8.0 / real'(t0),
               real'(bytes_out - b0) * 8.0 / real'(t0), peak);
      check(recv + lost == 2 * n, $sformatf("len %0d: frames accounted for", len));
      check(lost == ovf, $sformatf("len %0d: %0d lost, %0d counted as input overflow", len, lost, ovf));
      check(lost == 0, $sformatf("len %0d: no loss at line rate", len));
      check(peak < 512, $sformatf("len %0d: input buffers do not fill up (peak %0d)", len, peak));
    end
    check(nbad == 0, $sformatf("%0d delivered frames corrupted or out of order", nbad));
    check(stats.dropped == 0 && stats.out_overflow == 0, "no frame dropped by the engines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
