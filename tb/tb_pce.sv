// tb_pce: packet classification engine test. The testbench plays the
// multiplexer and the RSE. It configures both flow id triggers, sends frames
// in both directions, checks each rule set request (flow id, CRC32 hash,
// standard-set flag for incomplete flow ids) against a reference, answers
// with a rule set, and checks that every frame leaves unchanged with the
// right parameter set and rule set on its first beat.
module tb_pce;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, rse_req_valid, rse_req_ready, rse_req_use_default, rse_rsp_valid;
  beat_t in_beat, out_beat;
  dir_e in_dir;
  logic [255:0] rse_req_fid;
  logic [31:0] rse_req_hash, cfg_rdata, stat_incomplete;
  ruleset_t rse_rsp_rs;
  logic out_valid, cfg_rvalid, idle;
  desc_t out_desc;
  cfg_req_t cfg;

  pce #(.FB_DEPTH(256)) dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam logic [9:0] TRIG_UP   = 10'b11111_00000;  // IP 5-tuple
  localparam logic [9:0] TRIG_DOWN = 10'b00000_00111;  // MACs + outer VLAN

  typedef struct { bytes_t b; fparams_t f; logic [9:0] pres; dir_e d; } exp_t;
  exp_t req_q[$], out_q[$];
  int n_incomplete = 0, n_overlap = 0, n_frames = 0;

  function automatic logic [255:0] ref_fid(fparams_t f, logic [9:0] t);
    logic [255:0] r;
    r = {t[0] ? f.dmac : 48'h0, t[1] ? f.smac : 48'h0, t[2] ? f.vlan1 : 16'h0,
         t[3] ? f.vlan2 : 16'h0, t[4] ? f.etype : 16'h0, t[5] ? f.sip : 32'h0,
         t[6] ? f.dip : 32'h0, t[7] ? f.proto : 8'h0, t[8] ? f.sport : 16'h0,
         t[9] ? f.dport : 16'h0, 8'h00};
    return r;
  endfunction

  // RSE model
  initial begin
    rse_req_ready = 0; rse_rsp_valid = 0; rse_rsp_rs = '0;
    forever begin
      @(negedge clk);
      if (rse_req_valid) begin
        exp_t e;
        logic [9:0] t;
        rse_req_ready = 1;
        @(negedge clk); rse_req_ready = 0;
        e = req_q.pop_front();
        t = (e.d == DIR_DOWN) ? TRIG_DOWN : TRIG_UP;
        check(rse_req_fid == ref_fid(e.f, t), "flow id");
        check(rse_req_hash == crc32_ref(rse_req_fid, 256), "flow id hash");
        check(rse_req_use_default == ((t & ~e.pres) != 0), "standard set flag");
        if (rse_req_use_default) n_incomplete++;
        repeat ($urandom % 20) @(negedge clk);
        rse_rsp_valid = 1;
        rse_rsp_rs = '0; rse_rsp_rs.count = 2; rse_rsp_rs.words[0] = rse_req_hash; rse_rsp_rs.words[1] = 32'(e.b.size());
        @(negedge clk); rse_rsp_valid = 0;
      end
    end
  end

  // output checker
  int widx = 0;
  bytes_t cur;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_beat.sop) begin
      exp_t e;
      check(out_q.size() > 0, "unexpected frame");
      e = out_q.pop_front();
      cur = e.b; widx = 0;
      check(out_desc.p.f == e.f && out_desc.p.present == e.pres && out_desc.p.dir == e.d, "parameter set");
      check(out_desc.rs.count == 2 && out_desc.rs.words[1] == 32'(e.b.size()), "rule set follows frame");
      n_frames++;
      if (in_valid && in_ready) n_overlap++;
    end
    for (int k = 0; k < 4; k++)
      if (4*widx + k < cur.size() && out_beat.data[31-8*k -: 8] != cur[4*widx+k]) begin
        failures++; $display("FAIL data byte %0d", 4*widx + k);
      end
    if (out_beat.eop) checks++;
    widx++;
  end

  task automatic cfg_wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '0; cfg.wr = 1; cfg.comp = COMP_PCE; cfg.addr = a; cfg.wdata = d;
    do @(posedge clk); while (!cfg_rvalid);
    @(negedge clk); cfg = '0;
  endtask

  initial begin
    logic [31:0] rd;
    in_valid = 0; in_beat = '0; in_dir = DIR_UP; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    cfg_wr(0, 32'(TRIG_UP));
    cfg_wr(1, 32'(TRIG_DOWN));
    @(negedge clk); cfg.rd = 1; cfg.comp = COMP_PCE; cfg.addr = 1;
    do @(posedge clk); while (!cfg_rvalid);
    rd = cfg_rdata; @(negedge clk); cfg = '0;
    check(rd == 32'(TRIG_DOWN), "trigger read back");
    for (int t = 0; t < 60; t++) begin
      automatic fspec_t s = default_spec();
      automatic exp_t e;
      automatic int n;
      s.sip = $urandom; s.dmac = {16'h0200, $urandom}; s.nvlan = t % 2; s.vlan1 = 16'($urandom % 4000);
      s.proto = (t % 6 == 4) ? 8'd1 : 8'd17;
      s.payload = {};
      for (int i = 0; i < int'($urandom % 300); i++) s.payload.push_back(8'($urandom));
      e.b = build_frame(s); e.f = spec_params(s); e.pres = spec_present(s);
      e.d = dir_e'(t % 3 == 0);
      req_q.push_back(e); out_q.push_back(e);
      n = (e.b.size() + 3) / 4;
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        in_valid = 1; in_dir = e.d;
        in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
        in_beat.mty = in_beat.eop ? 2'((4 - e.b.size() % 4) % 4) : 2'd0;
        for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < e.b.size()) ? e.b[4*w+k] : 8'h00;
        #1 while (!in_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk); in_valid = 0;
    end
    repeat (500) @(negedge clk);
    check(out_q.size() == 0 && req_q.size() == 0, "all frames classified and sent");
    check(n_incomplete > 0, "incomplete flow ids seen");
    check(stat_incomplete == 32'(n_incomplete), "incomplete counter");
    check(n_overlap > 0, "reception overlapped with sending");
    check(idle, "idle at end");
    $display("frames=%0d incomplete=%0d overlap=%0d", n_frames, n_incomplete, n_overlap);
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
