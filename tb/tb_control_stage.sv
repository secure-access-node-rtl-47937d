// tb_control_stage: one L3 control stage. Sends frames with hand-made rule
// sets and checks: a rule of another type passes untouched, a matching
// DISCARD rule marks the frame and is removed, equal and not-equal compares,
// an absent parameter never matches, REPLACE rewrites an IPv4 address with
// header and TCP/UDP checksums that are correct when recomputed in full, and
// REPLACE rewrites a destination or source MAC address.
module tb_control_stage;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_drop, out_valid, out_drop;
  beat_t in_beat, out_beat;
  desc_t in_desc, out_desc;
  logic [31:0] stat_rules, stat_discards, stat_replaces;

  control_stage #(.CS_ID(CS_L3)) dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  bytes_t got;
  logic got_drop;
  desc_t got_desc;
  always @(posedge clk) if (out_valid) begin
    if (out_beat.sop) begin got = {}; got_desc = out_desc; end
    for (int k = 0; k < 4; k++) if (!(out_beat.eop && k >= 4 - int'(out_beat.mty))) got.push_back(out_beat.data[31-8*k -: 8]);
    if (out_beat.eop) got_drop = out_drop;
  end

  task automatic run(fspec_t s, logic [31:0] rules[$], output bytes_t ob, output logic drop, output desc_t od);
    bytes_t b = build_frame(s);
    int n = (b.size() + 3) / 4;
    desc_t d = '0;
    d.p.f = spec_params(s); d.p.present = spec_present(s);
    d.p.ip_off = 8'(14 + 4 * s.nvlan); d.p.ip_csum = {b[d.p.ip_off + 10], b[d.p.ip_off + 11]};
    d.p.l4csum_off = d.p.ip_off + 20 + ((s.proto == 6) ? 8'd16 : 8'd6);
    begin
      int co = int'(d.p.l4csum_off);
      d.p.l4_csum = {b[co], b[co+1]};
    end
    d.p.l4csum_ok = s.ip && (s.proto == 6 || (s.proto == 17 && d.p.l4_csum != 0));
    d.p.payload_off = 8'(spec_payload_off(s));
    d.rs.count = 5'(rules.size());
    foreach (rules[i]) d.rs.words[i] = rules[i];
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      in_valid = 1; in_drop = 0; in_desc = d;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'h00;
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    ob = got; drop = got_drop; od = got_desc;
  endtask

  function automatic logic [31:0] hdr(logic [7:0] ty, int len, int field, logic [3:0] op, logic [7:0] act);
    return {ty, 8'(len), 4'(field), op, act};
  endfunction

  initial begin
    automatic fspec_t s = default_spec();
    bytes_t ob, b;
    logic drop;
    desc_t od;
    in_valid = 0; in_drop = 0; in_beat = '0; in_desc = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    // L2 rule first: not for this stage
    run(s, '{hdr(CS_L2, 8, P_DMAC, OP_EQ, ACT_DISCARD), 32'h0200, 32'h0000_0001}, ob, drop, od);
    check(!drop && od.rs.count == 3 && od.rs.words[0][31:24] == CS_L2, "other type passes");
    check(ob == build_frame(s), "frame unchanged");
    // matching discard on destination IP, followed by an L4 rule
    run(s, '{hdr(CS_L3, 8, P_DIP, OP_EQ, ACT_DISCARD), 32'h0, s.dip, hdr(CS_L4, 8, P_DPORT, OP_EQ, ACT_DISCARD), 32'h0, 32'd80},
        ob, drop, od);
    check(drop, "discard on match");
    check(od.rs.count == 3 && od.rs.words[0][31:24] == CS_L4 && od.rs.words[2] == 32'd80, "rule removed");
    // not equal: no drop for equal value
    run(s, '{hdr(CS_L3, 8, P_SIP, OP_NE, ACT_DISCARD), 32'h0, s.sip}, ob, drop, od);
    check(!drop && od.rs.count == 0, "not-equal with equal value");
    run(s, '{hdr(CS_L3, 8, P_SIP, OP_NE, ACT_DISCARD), 32'h0, s.sip ^ 1}, ob, drop, od);
    check(drop, "not-equal with other value");
    // absent parameter (non-IP frame)
    begin
      automatic fspec_t n = s;
      n.ip = 0;
      run(n, '{hdr(CS_L3, 8, P_SIP, OP_NE, ACT_DISCARD), 32'h0, 32'h0}, ob, drop, od);
      check(!drop, "absent parameter never matches");
    end
    // forward on match
    run(s, '{hdr(CS_L3, 8, P_PROTO, OP_EQ, ACT_FORWARD), 32'h0, 32'd6}, ob, drop, od);
    check(!drop && ob == build_frame(s), "forward");
    // replace source IP: TCP, UDP, with VLAN tags
    for (int t = 0; t < 12; t++) begin
      automatic fspec_t r = s;
      automatic fspec_t e;
      automatic logic [31:0] nip = $urandom;
      r.sip = $urandom; r.dip = $urandom; r.nvlan = t % 3; r.proto = (t % 2) ? 8'd17 : 8'd6;
      r.payload = {};
      for (int i = 0; i < 5 + t; i++) r.payload.push_back(8'($urandom));
      e = r; e.sip = (t % 4 < 2) ? nip : r.sip; e.dip = (t % 4 < 2) ? r.dip : nip;
      run(r, '{hdr(CS_L3, 12, (t % 4 < 2) ? P_SIP : P_DIP, OP_EQ, ACT_REPLACE), 32'h0,
               (t % 4 < 2) ? r.sip : r.dip, nip}, ob, drop, od);
      b = build_frame(e);
      check(!drop, "replace does not drop");
      check(ob.size() == b.size(), "length");
      check(ip_csum_good(ob, 14 + 4 * r.nvlan), $sformatf("t=%0d IPv4 checksum after replace", t));
      check(l4_csum_good(ob, 14 + 4 * r.nvlan), $sformatf("t=%0d transport checksum after replace", t));
      check(ob == b, $sformatf("t=%0d rewritten frame", t));
      check((t % 4 < 2) ? od.p.f.sip == nip : od.p.f.dip == nip, "parameter set updated");
    end
    // replace a MAC address (the stage does not tie fields to its layer)
    for (int t = 0; t < 6; t++) begin
      automatic fspec_t r = s;
      automatic fspec_t e;
      automatic logic [47:0] nmac = {16'($urandom), 32'($urandom)};
      r.dmac = {16'($urandom), 32'($urandom)}; r.smac = {16'($urandom), 32'($urandom)}; r.nvlan = t % 3;
      e = r;
      if (t % 2 == 0) e.dmac = nmac; else e.smac = nmac;
      run(r, '{hdr(CS_L3, 16, (t % 2 == 0) ? P_DMAC : P_SMAC, OP_EQ, ACT_REPLACE),
               32'((t % 2 == 0) ? r.dmac[47:32] : r.smac[47:32]), (t % 2 == 0) ? r.dmac[31:0] : r.smac[31:0],
               32'(nmac[47:32]), nmac[31:0]}, ob, drop, od);
      check(!drop && ob == build_frame(e), $sformatf("t=%0d MAC address replaced", t));
      check((t % 2 == 0) ? od.p.f.dmac == nmac : od.p.f.smac == nmac, "parameter set MAC updated");
      check(od.rs.count == 0, "MAC replace rule removed");
    end
    check(stat_replaces == 18 && stat_discards == 2, $sformatf("counters %0d %0d", stat_replaces, stat_discards));
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
