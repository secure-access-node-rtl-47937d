// tb_web_filter: configures a binary search tree with the CRC64 hashes of
// blocked domains (tree built in the testbench from a sorted key list) and
// streams HTTP requests back to back. Checks the verdict for blocked and
// allowed domains, different letter cases, a port after the domain and a
// frame without payload, that data and direction pass unchanged, and the
// fixed latency of the delay line.
module tb_web_filter;
  import secan_pkg::*;
  import tb_util_pkg::*;
  localparam int NODES = 1023, DELAY = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_drop, out_valid, out_drop, cfg_rvalid;
  beat_t in_beat, out_beat;
  desc_t in_desc;
  dir_e out_dir;
  cfg_req_t cfg;
  logic [31:0] cfg_rdata, stat_lookups, stat_hits;

  web_filter dut (.*);

  string blocked[$] = '{"bad.example", "malware.test", "phish.invalid", "x.y", "tracker.example.org"};
  string allowed[$] = '{"good.example", "bad.example.com", "news.test", "a.b"};
  logic [63:0] keys[$];
  logic [63:0] tree[NODES];
  int nk, kpos;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic void fill(int i);
    if (i >= nk) return;
    fill(2*i + 1);
    tree[i] = keys[kpos++];
    fill(2*i + 2);
  endfunction

  task automatic cfg_wr(int a, logic [31:0] d);
    @(negedge clk);
    cfg = '0; cfg.wr = 1; cfg.comp = COMP_WEB; cfg.addr = a; cfg.wdata = d;
    do @(posedge clk); while (!cfg_rvalid);
    @(negedge clk); cfg = '0;
  endtask

  // expected frames, in order
  typedef struct { bytes_t b; bit drop; dir_e d; int t_in; } exp_t;
  exp_t q[$];
  bytes_t cur;
  int widx = 0, n_out = 0, cyc = 0;
  exp_t ce;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (out_valid) begin
    if (out_beat.sop) begin
      check(q.size() > 0, "unexpected frame");
      ce = q.pop_front(); widx = 0;
      // t_in is taken before the edge that samples the first beat
      check(cyc - ce.t_in == DELAY + 1, $sformatf("latency %0d", cyc - ce.t_in));
      check(out_dir == ce.d, "direction");
    end
    for (int k = 0; k < 4; k++)
      if (4*widx + k < ce.b.size() && out_beat.data[31-8*k -: 8] != ce.b[4*widx+k]) begin
        failures++; $display("FAIL data");
      end
    if (out_beat.eop) begin
      check(out_drop == ce.drop, $sformatf("frame %0d verdict %b expected %b", n_out, out_drop, ce.drop));
      n_out++;
    end
    widx++;
  end

  task automatic send(bytes_t b, int off, dir_e d, bit exp);
    int n = (b.size() + 3) / 4;
    desc_t ds = '0;
    exp_t e;
    ds.p.payload_off = 8'(off); ds.p.dir = d;
    e.b = b; e.drop = exp; e.d = d;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      if (w == 0) begin e.t_in = cyc; q.push_back(e); end
      in_valid = 1; in_drop = 0; in_desc = ds;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'h00;
    end
  endtask

  function automatic string req(string host, int variant);
    string h = host;
    if (variant % 3 == 1) h = host.toupper();
    if (variant % 4 == 2) h = {host, ":8080"};
    return {"GET /index.html HTTP/1.1\r\nUser-Agent: t\r\n", (variant % 2) ? "HOST:  " : "Host: ", h,
            "\r\nAccept: */*\r\n\r\n"};
  endfunction

  initial begin
    in_valid = 0; in_drop = 0; in_beat = '0; in_desc = '0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (blocked[i]) keys.push_back(crc64_ref(blocked[i]));
    keys.sort();
    nk = keys.size(); kpos = 0;
    fill(0);
    for (int i = 0; i < nk; i++) begin
      cfg_wr(4*i, tree[i][63:32]);
      cfg_wr(4*i + 1, tree[i][31:0]);
      cfg_wr(4*i + 2, 1);
    end
    for (int t = 0; t < 40; t++) begin
      automatic fspec_t s = default_spec();
      automatic bit blk = (t % 2 == 0);
      automatic string host = blk ? blocked[t % blocked.size()] : allowed[t % allowed.size()];
      automatic bytes_t b;
      s.payload = str_bytes(req(host, t));
      b = build_frame(s);
      send(b, spec_payload_off(s), dir_e'(t % 3 == 0), blk);
    end
    begin // no transport payload: not scanned
      automatic fspec_t s = default_spec();
      s.payload = str_bytes(req(blocked[0], 0));
      send(build_frame(s), 0, DIR_UP, 0);
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    check(n_out == 41 && q.size() == 0, "all frames out");
    check(stat_hits == 20, $sformatf("hit counter %0d", stat_hits));
    check(stat_lookups == 40, $sformatf("lookup counter %0d", stat_lookups));
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
