// tb_dpi_bloom: loads a few 4-byte signatures into the Bloom filter through
// the configuration port and sends frames whose payloads hold a signature
// at every byte alignment, hold none, or hold one only before the payload
// start. The expected verdict comes from a reference scan over the same
// bit vector, so Bloom false positives are predicted too.
module tb_dpi_bloom;
  import secan_pkg::*;
  import tb_util_pkg::*;
  localparam int M = 4096, K = 3, HW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_drop, out_valid, out_drop, cfg_rvalid;
  beat_t in_beat, out_beat;
  desc_t in_desc, out_desc;
  cfg_req_t cfg;
  logic [31:0] cfg_rdata, stat_matches;

  dpi_bloom dut (.*);

  bit bits[M];
  string sigs[3] = '{"EVIL", "\x90\x90\x90\x90", "/bin"};

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cfg_acc(bit wr, int a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    cfg = '0; cfg.wr = wr; cfg.rd = !wr; cfg.comp = COMP_DPI; cfg.addr = a; cfg.wdata = d;
    do @(posedge clk); while (!cfg_rvalid);
    r = cfg_rdata;
    @(negedge clk); cfg = '0;
  endtask

  function automatic bit ref_scan(bytes_t b, int off);
    logic [31:0] w = 0;
    int n = 0;
    if (off == 0) return 0;
    for (int i = off; i < b.size(); i++) begin
      w = {w[23:0], b[i]}; n++;
      if (n >= 4) begin
        bit all = 1;
        for (int k = 0; k < K; k++) all &= bits[h3_ref(k, w, HW)];
        if (all) return 1;
      end
    end
    return 0;
  endfunction

  logic got_drop;
  int n_eop = 0;
  always @(posedge clk) if (out_valid && out_beat.eop) begin got_drop = out_drop; n_eop++; end

  task automatic send(bytes_t b, int off, output logic drop);
    int n = (b.size() + 3) / 4;
    int e = n_eop;
    desc_t d = '0;
    d.p.payload_off = 8'(off);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      in_valid = 1; in_drop = 0; in_desc = d;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'h00;
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    drop = got_drop;
    check(n_eop == e + 1, "one frame out");
  endtask

  initial begin
    logic [31:0] r;
    logic drop;
    int hits = 0, ref_hits = 0;
    in_valid = 0; in_drop = 0; in_beat = '0; in_desc = '0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (sigs[s]) begin
      automatic logic [31:0] w = {sigs[s][0], sigs[s][1], sigs[s][2], sigs[s][3]};
      for (int k = 0; k < K; k++) bits[h3_ref(k, w, HW)] = 1;
    end
    for (int a = 0; a < M / 32; a++) begin
      logic [31:0] v;
      for (int j = 0; j < 32; j++) v[j] = bits[32*a + j];
      if (v != 0) cfg_acc(1, a, v, r);
    end
    for (int a = 0; a < M / 32; a++) begin
      logic [31:0] v;
      for (int j = 0; j < 32; j++) v[j] = bits[32*a + j];
      if (v != 0) begin cfg_acc(0, a, 0, r); check(r == v, "bit vector read back"); end
    end
    for (int t = 0; t < 90; t++) begin
      automatic fspec_t s = default_spec();
      automatic bytes_t b;
      automatic int off;
      automatic bit exp;
      s.payload = {};
      for (int i = 0; i < 20 + t % 23; i++) s.payload.push_back(8'h61 + $urandom % 26);
      if (t % 3 == 0) begin
        automatic int p = t % 17;
        for (int i = 0; i < 4; i++) s.payload[p + i] = sigs[t % 3 == 0 ? (t / 3) % 3 : 0][i];
      end
      b = build_frame(s);
      off = spec_payload_off(s);
      if (t % 9 == 3) begin   // signature in the payload start, scanned from later on
        for (int i = 0; i < 4; i++) b[off + i] = sigs[0][i];
        off = off + 2;
      end
      exp = ref_scan(b, off);
      send(b, off, drop);
      check(drop == exp, $sformatf("t=%0d drop %b expected %b", t, drop, exp));
      hits += drop; ref_hits += exp;
    end
    check(ref_hits >= 25, "signatures present");
    check(stat_matches == 32'(ref_hits), "match counter");
    $display("frames with a possible signature: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
