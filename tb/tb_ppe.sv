// tb_ppe: packet processing engine test. Configures one DPI signature and
// one blocked domain, then sends frames whose rule sets exercise each layer's
// control stages (forward, discard, replace, two rules for one layer, rules
// that do not match) and frames caught by the DPI and by the web filter.
// Checks the verdict of every frame and the bytes of the frames that pass.
module tb_ppe;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid, out_drop, cfg_rvalid, idle;
  beat_t in_beat, out_beat;
  desc_t in_desc;
  dir_e out_dir;
  cfg_req_t cfg;
  logic [31:0] cfg_rdata, stat_cs_discards, stat_cs_replaces, stat_dpi_matches, stat_web_hits;

  ppe dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cfg_wr(logic [6:0] comp, int a, logic [31:0] d);
    @(negedge clk);
    cfg = '0; cfg.wr = 1; cfg.comp = comp; cfg.addr = a; cfg.wdata = d;
    do @(posedge clk); while (!cfg_rvalid);
    @(negedge clk); cfg = '0;
  endtask

  typedef struct { bytes_t b; bit drop; dir_e d; string name; } exp_t;
  exp_t q[$];
  bytes_t got;
  always @(posedge clk) if (out_valid) begin
    if (out_beat.sop) got = {};
    for (int k = 0; k < 4; k++) if (!(out_beat.eop && k >= 4 - int'(out_beat.mty))) got.push_back(out_beat.data[31-8*k -: 8]);
    if (out_beat.eop) begin
      automatic exp_t e = q.pop_front();
      check(out_drop == e.drop, $sformatf("%s: drop %b", e.name, out_drop));
      check(out_dir == e.d, {e.name, ": direction"});
      if (!e.drop) check(got == e.b, {e.name, ": frame bytes"});
    end
  end

  function automatic logic [31:0] hdr(logic [7:0] ty, int len, int field, logic [3:0] op, logic [7:0] act);
    return {ty, 8'(len), 4'(field), op, act};
  endfunction

  task automatic send(string name, fspec_t s, logic [31:0] rules[$], bit drop, fspec_t after, dir_e d);
    bytes_t b = build_frame(s);
    int n = (b.size() + 3) / 4;
    desc_t ds = '0;
    exp_t e;
    int io = 14 + 4 * s.nvlan;
    int co = io + 20 + ((s.proto == 6) ? 16 : 6);
    ds.p.f = spec_params(s); ds.p.present = spec_present(s); ds.p.dir = d;
    ds.p.ip_off = 8'(io); ds.p.ip_csum = {b[io + 10], b[io + 11]};
    ds.p.l4csum_off = 8'(co);
    ds.p.l4_csum = {b[co], b[co + 1]};
    ds.p.l4csum_ok = 1;
    ds.p.payload_off = 8'(spec_payload_off(s));
    ds.rs.count = 5'(rules.size());
    foreach (rules[i]) ds.rs.words[i] = rules[i];
    e.b = build_frame(after); e.drop = drop; e.d = d; e.name = name;
    q.push_back(e);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      in_valid = 1; in_desc = ds;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'h00;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    automatic fspec_t s = default_spec();
    automatic fspec_t r;
    automatic logic [31:0] sig = "WORM";
    automatic logic [63:0] dom = crc64_ref("blocked.example");
    in_valid = 0; in_beat = '0; in_desc = '0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // one signature in the Bloom filter, one domain in the tree
    begin
      logic [31:0] words[128];
      foreach (words[i]) words[i] = 0;
      for (int k = 0; k < 3; k++) begin
        automatic int h = h3_ref(k, sig, 12);
        words[h / 32][h % 32] = 1;
      end
      foreach (words[i]) if (words[i] != 0) cfg_wr(COMP_DPI, i, words[i]);
    end
    cfg_wr(COMP_WEB, 0, dom[63:32]);
    cfg_wr(COMP_WEB, 1, dom[31:0]);
    cfg_wr(COMP_WEB, 2, 1);

    send("no rules", s, '{}, 0, s, DIR_UP);
    send("L2 forward, L4 discard", s, '{hdr(CS_L2, 8, P_DMAC, OP_EQ, ACT_FORWARD), 32'h0200, 32'h1,
         hdr(CS_L4, 8, P_DPORT, OP_EQ, ACT_DISCARD), 0, 80}, 1, s, DIR_DOWN);
    send("L4 no match", s, '{hdr(CS_L4, 8, P_DPORT, OP_EQ, ACT_DISCARD), 0, 443}, 0, s, DIR_UP);
    r = s; r.sip = 32'h5DB8_D822;
    send("L3 replace", s, '{hdr(CS_L3, 12, P_SIP, OP_EQ, ACT_REPLACE), 0, s.sip, r.sip}, 0, r, DIR_UP);
    send("two L3 rules", s, '{hdr(CS_L3, 8, P_SIP, OP_EQ, ACT_DISCARD), 0, 32'h1,
         hdr(CS_L3, 8, P_DIP, OP_EQ, ACT_DISCARD), 0, s.dip}, 1, s, DIR_UP);
    send("L2 VLAN discard", s, '{hdr(CS_L2, 8, P_VLAN1, OP_NE, ACT_DISCARD), 0, 100}, 0, s, DIR_UP);
    r = s; r.nvlan = 1; r.vlan1 = 200;
    send("L2 VLAN discard tagged", r, '{hdr(CS_L2, 8, P_VLAN1, OP_NE, ACT_DISCARD), 0, 100}, 1, r, DIR_UP);
    r = s; r.payload = str_bytes("xxxxWORMxxxx");
    send("DPI signature", r, '{}, 1, r, DIR_DOWN);
    r = s; r.payload = str_bytes("GET / HTTP/1.1\r\nHost: Blocked.Example\r\n\r\n");
    send("web filter", r, '{}, 1, r, DIR_UP);
    r = s; r.payload = str_bytes("GET / HTTP/1.1\r\nHost: fine.example\r\n\r\n");
    send("web filter pass", r, '{}, 0, r, DIR_UP);
    repeat (60) @(negedge clk);
    check(q.size() == 0, "all frames out");
    check(idle, "idle");
    check(stat_cs_discards == 3 && stat_cs_replaces == 1 && stat_dpi_matches == 1 && stat_web_hits == 1,
          $sformatf("counters %0d %0d %0d %0d", stat_cs_discards, stat_cs_replaces, stat_dpi_matches, stat_web_hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
