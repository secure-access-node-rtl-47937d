// tb_random_flows: randomized end-to-end test of the whole node at default
// sizes. Twelve flows per direction get random rule sets (up to two rules
// per layer, random fields, equal/not-equal compares against the flow's real
// or a random value, forward/discard/replace, sometimes out of layer order);
// the standard rule set is random too. The two directions use different flow
// id triggers. Frames of these flows, of unknown flows and without IPv4 (an
// incomplete flow id) are sent on both sides at once with random lengths,
// VLAN tags and gaps. A reference model in this file applies the rule sets
// stage by stage the way the document describes (first rule only, removed
// when processed, parameter set updated by a replace) and predicts, for each
// frame, whether it is discarded and the exact bytes it leaves with.
module tb_random_flows;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
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
  mem_model #(.LATENCY(4), .STALL(1)) u_sram (.clk, .req(sram_req), .ready(sram_ready), .rvalid(sram_rvalid), .rdata(sram_rdata));
  mem_model #(.LATENCY(12), .STALL(1)) u_ddr (.clk, .req(ddr_req),  .ready(ddr_ready),  .rvalid(ddr_rvalid),  .rdata(ddr_rdata));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  typedef logic [31:0] words_t[$];
  localparam int NF = 12;
  localparam logic [9:0] TRIG_UP   = 10'b11_1110_0000;  // 5-tuple
  localparam logic [9:0] TRIG_DOWN = 10'b10_1100_0000;  // destination address, protocol, destination port

  // ------------------------------------------------------------ scoreboard
  bytes_t exp_q [2][$];
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
          check(got[d] == e, $sformatf("side %0d frame %0d bytes (len %0d vs %0d)", d, nrecv, got[d].size(), e.size()));
        end
        got[d] = {};
      end
    end
  end

  // --------------------------------------------------------- configuration
  task automatic cfg_byte(byte unsigned b);
    @(negedge clk);
    cfg_in_valid = 1; cfg_in_data = b;
    do @(posedge clk); while (!cfg_in_ready);
    @(negedge clk); cfg_in_valid = 0;
  endtask

  task automatic cfg_write(logic [6:0] comp, logic [31:0] addr, words_t w);
    bytes_t v;
    put32(v, addr);
    foreach (w[k]) put32(v, w[k]);
    cfg_byte({comp, 1'b0});
    cfg_byte(8'(v.size()));
    foreach (v[k]) cfg_byte(v[k]);
  endtask

  // ------------------------------------------------------- reference model
  function automatic logic [63:0] pval(fspec_t s, int field);
    return param_value(spec_params(s), 4'(field));
  endfunction

  // apply a rule set to a frame: returns 1 if discarded; s is rewritten
  function automatic bit apply(ref fspec_t s, input words_t rules);
    logic [7:0] ids[6] = '{CS_L2, CS_L2, CS_L3, CS_L3, CS_L4, CS_L4};
    bit drop = 0;
    foreach (ids[st]) begin
      if (rules.size() > 0 && rules[0][31:24] == ids[st]) begin
        automatic logic [31:0] h = rules[0];
        automatic int field = int'(h[15:12]);
        automatic int nw = 1 + int'(h[23:18]);
        automatic logic [63:0] cmp = {rules[1], rules[2]};
        automatic bit pres = spec_present(s)[field];
        automatic bit m = pres && ((h[11:8] == OP_NE) ? (pval(s, field) != cmp) : (pval(s, field) == cmp));
        if (m && h[7:0] == ACT_DISCARD) drop = 1;
        if (m && h[7:0] == ACT_REPLACE) begin
          case (field)
            P_DMAC: s.dmac = {rules[3][15:0], rules[4]};
            P_SMAC: s.smac = {rules[3][15:0], rules[4]};
            P_SIP:  s.sip  = rules[3];
            P_DIP:  s.dip  = rules[3];
            default: ;
          endcase
        end
        for (int k = 0; k < nw && rules.size() > 0; k++) void'(rules.pop_front());
      end
    end
    return drop;
  endfunction

  // random rule set for a flow (fields of each layer, mostly in layer order)
  function automatic words_t rand_rules(fspec_t s);
    int l2f[5] = '{P_DMAC, P_SMAC, P_VLAN1, P_VLAN2, P_ETYPE};
    int l3f[3] = '{P_SIP, P_DIP, P_PROTO};
    int l4f[2] = '{P_SPORT, P_DPORT};
    words_t w, tmp;
    words_t per_layer[3];
    for (int L = 0; L < 3; L++) begin
      automatic int n = $urandom % 3;
      for (int r = 0; r < n; r++) begin
        automatic int f = (L == 0) ? l2f[$urandom % 5] : (L == 1) ? l3f[$urandom % 3] : l4f[$urandom % 2];
        automatic logic [63:0] v = ($urandom % 10 < 6) ? pval(s, f) : {32'($urandom) & 32'hFFFF, 32'($urandom)};
        automatic logic [3:0] op = ($urandom % 4 == 0) ? OP_NE : OP_EQ;
        automatic int a = $urandom % 10;
        automatic bit mac = (f == P_DMAC || f == P_SMAC), ip = (f == P_SIP || f == P_DIP);
        automatic logic [7:0] act = (a < 4) ? ACT_FORWARD : (a < 6) ? ACT_DISCARD : ((mac || ip) ? ACT_REPLACE : ACT_FORWARD);
        automatic int len = (act == ACT_REPLACE) ? (mac ? 16 : 12) : 8;
        tmp = {};
        tmp.push_back({8'(L + 2), 8'(len), 4'(f), op, act});
        tmp.push_back(v[63:32]); tmp.push_back(v[31:0]);
        if (act == ACT_REPLACE && mac) begin tmp.push_back(32'($urandom) & 32'hFFFF); tmp.push_back($urandom); end
        if (act == ACT_REPLACE && ip) tmp.push_back($urandom);
        if (w.size() + per_layer[0].size() + per_layer[1].size() + per_layer[2].size() + tmp.size() <= 16)
          foreach (tmp[k]) per_layer[L].push_back(tmp[k]);
      end
    end
    // one flow in ten gets its layer 2 rules behind the layer 3 rules
    if ($urandom % 10 == 0) w = {per_layer[1], per_layer[0], per_layer[2]};
    else                    w = {per_layer[0], per_layer[1], per_layer[2]};
    return w;
  endfunction

  function automatic fspec_t rand_flow(int d, int i);
    fspec_t s = default_spec();
    s.dmac = {16'h0200, 32'($urandom)}; s.smac = {16'h0200, 32'($urandom)};
    s.nvlan = $urandom % 3; s.vlan1 = 16'($urandom % 4096); s.vlan2 = 16'($urandom % 4096);
    s.sip = $urandom; s.dip = $urandom;
    s.proto = ($urandom % 2) ? 8'd6 : 8'd17;
    s.sport = 16'(1024 + i + 100 * d); s.dport = 16'($urandom);
    return s;
  endfunction

  fspec_t   flows [2][NF];
  words_t   rsets [2][NF];
  words_t   dflt;

  task automatic send(int d, fspec_t s, words_t rules);
    fspec_t o = s;
    bytes_t b = build_frame(s);
    if (!apply(o, rules)) exp_q[d].push_back(build_frame(o));
    foreach (b[i]) begin
      @(negedge clk);
      rx_valid[d] = 1; rx_data[d] = b[i]; rx_last[d] = (i == b.size() - 1);
    end
    @(negedge clk); rx_valid[d] = 0; rx_last[d] = 0;
    repeat (12 + $urandom % 60) @(negedge clk);
  endtask

  task automatic traffic(int d, int n);
    for (int k = 0; k < n; k++) begin
      automatic int c = $urandom % 20;
      automatic fspec_t s;
      automatic words_t rules;
      if (c < 16) begin
        automatic int i = $urandom % NF;
        s = flows[d][i]; rules = rsets[d][i];
      end else if (c < 19) begin
        s = rand_flow(d, 500 + k); rules = dflt;          // unknown flow
      end else begin
        s = flows[d][$urandom % NF]; s.ip = 0; rules = dflt;  // no IPv4: incomplete
      end
      s.payload = {};
      for (int i = 0, n2 = 8 + $urandom % 300; i < n2; i++) s.payload.push_back(8'($urandom));
      send(d, s, rules);
    end
  endtask

  initial begin
    fspec_t t;
    rx_valid = 0; rx_last = 0; rx_data[0] = 0; rx_data[1] = 0;
    cfg_in_valid = 0; cfg_in_data = 0; cfg_out_ready = 1;
    got[0] = {}; got[1] = {};
    repeat (5) @(negedge clk); rst_n = 1;

    cfg_write(COMP_PCE, 0, '{32'(TRIG_UP), 32'(TRIG_DOWN)});
    t = rand_flow(0, 999);
    dflt = rand_rules(t);
    begin
      words_t w = '{0, 0, 0, 0, 0, 0, 0, 0};
      foreach (dflt[k]) w.push_back(dflt[k]);
      cfg_write(COMP_RSE, {2'd2, 30'h8 << 3}, w);
      cfg_write(COMP_RSE, 0, '{{1'b1, 7'(dflt.size()), 24'h8}});
    end
    for (int d = 0; d < 2; d++) for (int i = 0; i < NF; i++) begin
      automatic logic [255:0] f;
      automatic words_t w = {};
      automatic logic [23:0] ptr = 24'(16 + 4 * (NF * d + i));  // records up to 24 words
      flows[d][i] = rand_flow(d, i);
      rsets[d][i] = rand_rules(flows[d][i]);
      f = make_flow_id(spec_params(flows[d][i]), d ? TRIG_DOWN : TRIG_UP);
      for (int k = 0; k < 8; k++) w.push_back(f[255 - 32*k -: 32]);
      foreach (rsets[d][i][k]) w.push_back(rsets[d][i][k]);
      cfg_write(COMP_RSE, {2'd2, 30'(ptr) << 3}, w);
      cfg_write(COMP_RSE, {2'd1, 12'd0, crc32_ref(f, 256)[17:0]}, '{{1'b1, 7'(rsets[d][i].size()), ptr}});
    end
    cfg_write(COMP_SYS, 0, '{1});

    fork
      traffic(0, 150);
      traffic(1, 150);
    join
    repeat (5000) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
          $sformatf("frames missing: %0d upstream, %0d downstream", exp_q[0].size(), exp_q[1].size()));
    check(stats.dropped + stats.fwd_up + stats.fwd_down == 300, "every frame accounted for");
    check(stats.mux_overflow_up == 0 && stats.mux_overflow_down == 0 && stats.out_overflow == 0, "no overflow");
    $display("forwarded %0d/%0d dropped %0d replaces %0d standard sets %0d incomplete %0d",
             stats.fwd_up, stats.fwd_down, stats.dropped, stats.cs_replaces, stats.default_rule_sets, stats.incomplete_flow_id);
    check(stats.dropped > 10 && stats.cs_replaces > 10 && stats.incomplete_flow_id > 0, "random mix exercised discards, replaces and incomplete ids");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
