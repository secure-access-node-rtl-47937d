// tb_secan_top: end-to-end test of the Secure Access Node at its default
// sizes (1024-word buffers, 1 MB SRAM map, six control stages, 4096-bit
// Bloom filter, 1023-node domain tree), with behavioural SRAM and DDR2
// models and the whole configuration sent as type-length-value bytes.
//
// The test configures flow id triggers, a standard rule set, three per-flow
// rule sets (with their map entries), one signature and one blocked domain,
// reads part of it back, queues frames while the node is stopped, starts it
// and sends a mix of frames in both directions, then reconfigures while
// traffic flows. Every frame has an independently computed fate: dropped, or
// sent out unchanged or with a replaced source address on its own side.
// Each mechanism is counted and must have happened at least once:
// standard rule set for an unknown flow, incomplete flow id, CRC collision
// fallback, control stage discard, MAC and IPv4 address replace, DPI match, web filter hit,
// multiplexer choice by fill level, input buffer overflow, frames held while
// stopped, hold during configuration, configuration read-back.
module tb_secan_top;
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
  mem_model #(.LATENCY(3))             u_sram (.clk, .req(sram_req), .ready(sram_ready), .rvalid(sram_rvalid), .rdata(sram_rdata));
  mem_model #(.LATENCY(9), .STALL(1))  u_ddr  (.clk, .req(ddr_req),  .ready(ddr_ready),  .rvalid(ddr_rvalid),  .rdata(ddr_rdata));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------------- counters
  int n_held = 0, n_hold_busy = 0, n_fill_choice = 0, n_readback = 0, n_collision = 0;

  // frames waiting in the input buffers while the node is stopped
  always @(posedge clk) if (rst_n && !running && dut.u_mux.rd_valid[0]) n_held++;
  // configuration hold while frames are waiting
  always @(posedge clk) if (rst_n && dut.hold && dut.run && (dut.u_mux.rd_valid[0] || dut.u_mux.rd_valid[1])) n_hold_busy++;
  // flow id read from DDR2 differs from the requested one (map collision)
  logic mism_q = 0;
  always @(posedge clk) begin
    mism_q <= dut.u_rse.mismatch;
    if (rst_n && dut.u_rse.mismatch && !mism_q) n_collision++;
  end
  // multiplexer choice when both directions have a complete frame
  always @(posedge clk) begin
    if (rst_n && !dut.u_mux.active && running && dut.u_mux.rd_valid[0] && dut.u_mux.rd_valid[1]) begin
      automatic dir_e want = (dut.u_mux.fill[0] >= dut.u_mux.fill[1]) ? DIR_UP : DIR_DOWN;
      @(posedge clk);
      check(dut.u_mux.sel == want, "multiplexer serves the fuller buffer");
      n_fill_choice++;
    end
  end

  // ------------------------------------------------------------- scoreboard
  bytes_t exp_q [2][$];
  string  exp_n [2][$];
  bytes_t got [2];
  int     nrecv = 0;
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (tx_valid[d]) begin
      got[d].push_back(tx_data[d]);
      if (tx_last[d]) begin
        nrecv++;
        if (exp_q[d].size() == 0) check(0, $sformatf("unexpected frame on side %0d", d));
        else begin
          automatic bytes_t e = exp_q[d].pop_front();
          automatic string  n = exp_n[d].pop_front();
          check(got[d] == e, $sformatf("frame '%s' on side %0d (len %0d, expected %0d)", n, d, got[d].size(), e.size()));
        end
        got[d] = {};
      end
    end
  end

  // -------------------------------------------------------- Ethernet sides
  task automatic send(int d, string name, fspec_t s, bit pass, fspec_t after);
    bytes_t b = build_frame(s);
    if (pass) begin exp_q[d].push_back(build_frame(after)); exp_n[d].push_back(name); end
    foreach (b[i]) begin
      @(negedge clk);
      rx_valid[d] = 1; rx_data[d] = b[i]; rx_last[d] = (i == b.size() - 1);
    end
    @(negedge clk); rx_valid[d] = 0; rx_last[d] = 0;
    repeat (12) @(negedge clk);  // inter-frame gap
  endtask

  // ---------------------------------------------------------- configuration
  bytes_t cfg_rx;
  always @(posedge clk) if (cfg_out_valid && cfg_out_ready) cfg_rx.push_back(cfg_out_data);

  task automatic cfg_byte(byte unsigned b);
    @(negedge clk);
    cfg_in_valid = 1; cfg_in_data = b;
    do @(posedge clk); while (!cfg_in_ready);
    @(negedge clk); cfg_in_valid = 0;
  endtask

  task automatic cfg_write(logic [6:0] comp, logic [31:0] addr, logic [31:0] w[$]);
    int i = 0;
    while (i < w.size()) begin
      int n = (w.size() - i > 63) ? 63 : w.size() - i;
      bytes_t v;
      put32(v, addr + i);
      for (int k = 0; k < n; k++) put32(v, w[i + k]);
      cfg_byte({comp, 1'b0});
      cfg_byte(8'(v.size()));
      foreach (v[k]) cfg_byte(v[k]);
      i += n;
    end
  endtask

  task automatic cfg_read(logic [6:0] comp, logic [31:0] addr, int n, output logic [31:0] w[$]);
    bytes_t v;
    put32(v, addr);
    v.push_back(8'(n));
    cfg_rx = {};
    cfg_byte({comp, 1'b1});
    cfg_byte(8'(v.size()));
    foreach (v[k]) cfg_byte(v[k]);
    for (int t = 0; t < 2000 && cfg_rx.size() < 2 + 4 * n; t++) @(negedge clk);
    w = {};
    check(cfg_rx.size() == 2 + 4 * n && cfg_rx[0] == {comp, 1'b1} && cfg_rx[1] == 8'(4 * n), "read response header");
    for (int k = 0; k < n && 2 + 4 * k + 3 < cfg_rx.size(); k++)
      w.push_back({cfg_rx[2+4*k], cfg_rx[3+4*k], cfg_rx[4+4*k], cfg_rx[5+4*k]});
  endtask

  function automatic logic [31:0] rule(logic [7:0] ty, int len, int field, logic [3:0] op, logic [7:0] act);
    return {ty, 8'(len), 4'(field), op, act};
  endfunction

  localparam logic [9:0] TRIG = 10'b11_1110_0000;  // IP addresses, protocol, ports

  function automatic logic [255:0] fid_of(fspec_t s);
    return make_flow_id(spec_params(s), TRIG);
  endfunction

  // a flow's rule set record in DDR2 plus its map entry
  task automatic add_flow(fspec_t s, logic [23:0] ptr, logic [31:0] rules[$], output logic [31:0] entry);
    logic [255:0] f = fid_of(s);
    logic [31:0] w[$];
    for (int k = 0; k < 8; k++) w.push_back(f[255 - 32*k -: 32]);
    foreach (rules[k]) w.push_back(rules[k]);
    cfg_write(COMP_RSE, {2'd2, 30'(ptr) << 3}, w);
    entry = {1'b1, 7'(rules.size()), ptr};
    cfg_write(COMP_RSE, {2'd1, 12'd0, crc32_ref(f, 256)[17:0]}, '{entry});
  endtask

  initial begin
    fspec_t fa, fb, fc, fd, fe, fe2, fx, farp, fdpi, fweb, fok, big, r;
    logic [31:0] ent_a, ent_b, ent_c, rd[$], dflt[$];
    logic [63:0] dom = crc64_ref("blocked.example");
    rx_valid = 0; rx_last = 0; rx_data[0] = 0; rx_data[1] = 0;
    cfg_in_valid = 0; cfg_in_data = 0; cfg_out_ready = 1;
    got[0] = {}; got[1] = {};
    repeat (5) @(negedge clk); rst_n = 1;

    // flows
    fa = default_spec();                                   // up, rewritten source
    fb = fa; fb.sport = 40001;                             // up, discarded by its rule
    fc = fa; fc.sip = fa.dip; fc.dip = fa.sip; fc.sport = 80; fc.dport = 40000;  // down, forwarded
    fd = fa; fd.sport = 40002; fd.dport = 23;              // up, map entry collides
    fe = fa; fe.sport = 40003; fe.dport = 23;              // up, unknown: standard set discards
    fe2 = fa; fe2.sport = 40004; fe2.dport = 22;           // up, unknown: standard set forwards
    farp = fa; farp.ip = 0;                                // no IP: flow id incomplete
    fdpi = fa; fdpi.sport = 40005; fdpi.dport = 8080; fdpi.payload = str_bytes("payload with WORM inside");
    fweb = fc; fweb.sport = 80; fweb.dport = 40007;
    fweb.payload = str_bytes("GET /x HTTP/1.1\r\nHost:  Blocked.Example\r\nAccept: */*\r\n\r\n");
    fok = fweb; fok.payload = str_bytes("GET /x HTTP/1.1\r\nHost: open.example\r\n\r\n");

    // ---- configuration (node stopped)
    cfg_write(COMP_PCE, 0, '{32'(TRIG), 32'(TRIG)});
    dflt = '{0, 0, 0, 0, 0, 0, 0, 0, rule(CS_L4, 8, P_DPORT, OP_EQ, ACT_DISCARD), 0, 23};
    cfg_write(COMP_RSE, {2'd2, 30'h10 << 3}, dflt);
    cfg_write(COMP_RSE, 0, '{{1'b1, 7'd3, 24'h10}});
    // fa: subscriber MAC translated to a provider MAC, source address replaced
    add_flow(fa, 24'h20, '{rule(CS_L2, 16, P_SMAC, OP_EQ, ACT_REPLACE), 32'(fa.smac[47:32]), fa.smac[31:0], 32'h0000_0A1B, 32'h2C3D_4E5F,
                           rule(CS_L3, 12, P_SIP, OP_EQ, ACT_REPLACE), 0, fa.sip, 32'h5DB8_D822}, ent_a);
    add_flow(fb, 24'h30, '{rule(CS_L2, 8, P_SMAC, OP_EQ, ACT_FORWARD), 0, 32'h2,
                           rule(CS_L4, 8, P_DPORT, OP_EQ, ACT_DISCARD), 0, 80}, ent_b);
    add_flow(fc, 24'h40, '{rule(CS_L4, 8, P_SPORT, OP_NE, ACT_DISCARD), 0, 80}, ent_c);
    // map entry of fd points at fa's record: the stored flow id will not match
    cfg_write(COMP_RSE, {2'd1, 12'd0, crc32_ref(fid_of(fd), 256)[17:0]}, '{ent_a});
    begin
      logic [31:0] bw[$];
      logic [4095:0] bits = '0;
      for (int k = 0; k < 3; k++) bits[h3_ref(k, "WORM", 12)] = 1;
      for (int k = 0; k < 128; k++) bw.push_back(bits[32*k +: 32]);
      cfg_write(COMP_DPI, 0, bw);
    end
    cfg_write(COMP_WEB, 0, '{dom[63:32], dom[31:0], 1});

    // ---- read-back
    cfg_read(COMP_PCE, 0, 2, rd);
    if (rd.size() == 2 && rd[0] == 32'(TRIG) && rd[1] == 32'(TRIG)) n_readback++;
    cfg_read(COMP_RSE, {2'd1, 12'd0, crc32_ref(fid_of(fa), 256)[17:0]}, 1, rd);
    if (rd.size() == 1 && rd[0] == ent_a) n_readback++;
    cfg_read(COMP_RSE, {2'd2, 30'h10 << 3}, 11, rd);
    if (rd == dflt) n_readback++;
    cfg_read(COMP_WEB, 0, 3, rd);
    if (rd.size() == 3 && rd[0] == dom[63:32] && rd[1] == dom[31:0] && rd[2] == 1) n_readback++;
    check(n_readback == 4, $sformatf("configuration read back (%0d of 4)", n_readback));

    // ---- frames queued while stopped; three 1500-byte frames overflow the
    //      1024-word upstream buffer, the third is lost
    big = fe2; big.payload = {};
    for (int i = 0; i < 1446; i++) big.payload.push_back(8'h61 + i % 26);
    fork
      begin
        send(0, "big 1", big, 1, big);
        send(0, "big 2", big, 1, big);
        send(0, "big 3 (overflow)", big, 0, big);
      end
      send(1, "c before start", fc, 1, fc);
    join
    repeat (50) @(negedge clk);
    check(nrecv == 0 && !running, "nothing passes before the node is started");
    check(stats.mux_overflow_up == 1, $sformatf("input overflow count %0d", stats.mux_overflow_up));

    // ---- start
    cfg_write(COMP_SYS, 0, '{1});
    r = fa; r.sip = 32'h5DB8_D822; r.smac = 48'h0A1B_2C3D_4E5F;
    fork
      begin
        send(0, "a (replace)", fa, 1, r);
        send(0, "b (discard)", fb, 0, fb);
        send(0, "d (collision)", fd, 0, fd);
        send(0, "e (standard set discards)", fe, 0, fe);
        send(0, "e2 (standard set)", fe2, 1, fe2);
        send(0, "arp (incomplete)", farp, 1, farp);
        send(0, "dpi", fdpi, 0, fdpi);
        send(0, "a again", fa, 1, r);
      end
      begin
        send(1, "c", fc, 1, fc);
        send(1, "web blocked", fweb, 0, fweb);
        send(1, "web open", fok, 1, fok);
        send(1, "c again", fc, 1, fc);
      end
    join

    // ---- reconfiguration under traffic: a second blocked domain
    fork
      for (int i = 0; i < 6; i++) begin send(0, "a under cfg", fa, 1, r); send(0, "e2 under cfg", fe2, 1, fe2); end
      for (int i = 0; i < 6; i++) send(1, "c under cfg", fc, 1, fc);
      begin
        repeat (150) @(negedge clk);
        cfg_write(COMP_WEB, 4, '{32'h1234_5678, 32'h9ABC_DEF0, 1});
      end
    join
    repeat (4000) @(negedge clk);

    // ---- results
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
          $sformatf("frames missing: %0d upstream, %0d downstream", exp_q[0].size(), exp_q[1].size()));
    check(n_collision == 1, $sformatf("collision count %0d", n_collision));
    check(stats.cs_replaces == 16, $sformatf("replace count %0d", stats.cs_replaces));
    check(stats.cs_discards == 3, $sformatf("discard count %0d", stats.cs_discards));
    check(stats.dpi_matches == 1, $sformatf("DPI count %0d", stats.dpi_matches));
    check(stats.web_hits == 1, $sformatf("web count %0d", stats.web_hits));
    check(stats.incomplete_flow_id == 1, $sformatf("incomplete count %0d", stats.incomplete_flow_id));
    // standard set: upstream big x2, d (collision), e, e2 x7, arp, dpi;
    // downstream both web frames
    check(stats.default_rule_sets == 15, $sformatf("standard rule set count %0d", stats.default_rule_sets));
    check(stats.dropped == 5, $sformatf("dropped count %0d", stats.dropped));
    check(stats.fwd_up == 18 && stats.fwd_down == 10, $sformatf("forwarded %0d/%0d", stats.fwd_up, stats.fwd_down));

    $display("mechanisms: standard_set=%0d incomplete=%0d collision=%0d cs_discard=%0d replace=%0d dpi=%0d web=%0d",
             stats.default_rule_sets, stats.incomplete_flow_id, n_collision, stats.cs_discards,
             stats.cs_replaces, stats.dpi_matches, stats.web_hits);
    $display("mechanisms: fill_choice=%0d overflow=%0d held_while_stopped=%0d hold_during_cfg=%0d readback=%0d",
             n_fill_choice, stats.mux_overflow_up, n_held, n_hold_busy, n_readback);
    check(stats.default_rule_sets > 0, "mechanism: standard rule set");
    check(stats.incomplete_flow_id > 0, "mechanism: incomplete flow id");
    check(n_collision > 0, "mechanism: collision fallback");
    check(stats.cs_discards > 0, "mechanism: control stage discard");
    check(stats.cs_replaces > 0, "mechanism: address replace");
    check(stats.dpi_matches > 0, "mechanism: DPI match");
    check(stats.web_hits > 0, "mechanism: web filter hit");
    check(n_fill_choice > 0, "mechanism: multiplexer fill choice");
    check(stats.mux_overflow_up > 0, "mechanism: input overflow");
    check(n_held > 0, "mechanism: frames held while stopped");
    check(n_hold_busy > 0, "mechanism: hold during configuration");
    check(n_readback > 0, "mechanism: configuration read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
