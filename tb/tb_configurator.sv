// tb_configurator: configurator test against a model of the components.
// The model stores words per component and acknowledges each request after
// a random delay (registered cfg_rvalid, requests ignored while it is high,
// like the real components). Checks: writes land once each at consecutive
// addresses, reads come back as response records with the right type,
// length and data under output back-pressure, the run bit, a 256-byte record
// (length byte 0), skipping of unknown types, `hold` over each record and no
// access before `sys_idle`.
module tb_configurator;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, out_valid, out_ready, cfg_rvalid, sys_idle, hold, run;
  logic [7:0]  in_data, out_data;
  cfg_req_t    cfg;
  logic [31:0] cfg_rdata;

  configurator dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // component model
  logic [31:0] mem [logic [38:0]];
  int          nwr = 0, nrd = 0, early = 0, wait_cnt = 0;
  always @(posedge clk) begin
    cfg_rvalid <= 1'b0;
    if ((cfg.wr || cfg.rd) && !sys_idle) early++;
    if ((cfg.wr || cfg.rd) && !cfg_rvalid) begin
      if (wait_cnt == 0) wait_cnt = 1 + $urandom % 3;
      wait_cnt--;
      if (wait_cnt == 0) begin
        if (cfg.wr) begin mem[{cfg.comp, cfg.addr}] = cfg.wdata; nwr++; end
        else nrd++;
        cfg_rdata  <= mem.exists({cfg.comp, cfg.addr}) ? mem[{cfg.comp, cfg.addr}] : 32'hDEAD_0000 | cfg.addr[15:0];
        cfg_rvalid <= 1'b1;
      end
    end
  end

  // output collector
  bytes_t outb;
  always @(posedge clk) if (out_valid && out_ready) outb.push_back(out_data);

  // hold must cover every record: sampled while a byte is accepted
  int hold_bad = 0;
  bit in_rec = 0;

  task automatic put(byte unsigned b);
    @(negedge clk);
    in_valid = 1; in_data = b;
    if (in_rec && !hold) hold_bad++;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
  endtask

  task automatic rec(byte unsigned t, bytes_t v);
    put(t);
    in_rec = 1;
    put(8'(v.size()));
    foreach (v[i]) put(v[i]);
    in_rec = 0;
  endtask

  function automatic bytes_t wr_val(logic [31:0] a, logic [31:0] d[$]);
    bytes_t b;
    put32(b, a);
    foreach (d[i]) put32(b, d[i]);
    return b;
  endfunction

  function automatic bytes_t rd_val(logic [31:0] a, int n);
    bytes_t b;
    put32(b, a);
    b.push_back(8'(n));
    return b;
  endfunction

  initial begin
    logic [31:0] d[$];
    bytes_t e;
    in_valid = 0; in_data = 0; out_ready = 1; sys_idle = 1; cfg_rvalid = 0; cfg_rdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(!run && !hold, "stopped and not holding after reset");

    // writes to every component
    for (int c = COMP_PCE; c <= COMP_WEB; c++) begin
      d = {};
      for (int i = 0; i < 3; i++) d.push_back($urandom);
      rec({7'(c), 1'b0}, wr_val(32'h100 * c, d));
      repeat (6) @(negedge clk);
      for (int i = 0; i < 3; i++)
        check(mem.exists({7'(c), 32'h100 * c + i}) && mem[{7'(c), 32'h100 * c + i}] == d[i],
              $sformatf("write comp %0d word %0d", c, i));
    end
    check(nwr == 12, $sformatf("each word written once (%0d)", nwr));

    // run bit
    rec({COMP_SYS, 1'b0}, wr_val(0, '{1}));
    repeat (3) @(negedge clk);
    check(run, "run set");
    outb = {};
    rec({COMP_SYS, 1'b1}, rd_val(0, 1));
    repeat (10) @(negedge clk);
    check(outb.size() == 6 && outb[0] == {COMP_SYS, 1'b1} && outb[1] == 4 && outb[5] == 1, "run read back");

    // read of 5 words from the DPI model with output back-pressure
    outb = {};
    fork
      rec({COMP_DPI, 1'b1}, rd_val(32'h400, 5));
      repeat (200) begin @(negedge clk); out_ready = $urandom % 2; end
    join
    out_ready = 1;
    repeat (20) @(negedge clk);
    e = {};
    e.push_back({COMP_DPI, 1'b1}); e.push_back(20);
    for (int i = 0; i < 5; i++)
      put32(e, mem.exists({COMP_DPI, 32'h400 + i}) ? mem[{COMP_DPI, 32'h400 + i}] : 32'hDEAD_0000 | (32'h400 + i));
    check(outb == e, "read response record");

    // unknown type skipped, next record still applied
    rec(8'hF0, wr_val(0, '{32'h1234_5678}));
    rec({COMP_RSE, 1'b0}, wr_val(32'h77, '{32'hCAFE_F00D}));
    repeat (6) @(negedge clk);
    check(mem[{COMP_RSE, 32'h77}] == 32'hCAFE_F00D, "record after unknown type");
    check(!mem.exists({7'h78, 32'h0}), "unknown type not applied");

    // 256-byte record (length byte 0): address + 63 words
    d = {};
    for (int i = 0; i < 63; i++) d.push_back($urandom);
    begin
      automatic bytes_t v = wr_val(32'h8000, d);
      put({COMP_WEB, 1'b0});
      in_rec = 1;
      put(8'd0);
      foreach (v[i]) put(v[i]);
      in_rec = 0;
    end
    repeat (6) @(negedge clk);
    begin
      automatic int ok = 1;
      for (int i = 0; i < 63; i++) if (mem[{COMP_WEB, 32'h8000 + i}] != d[i]) ok = 0;
      check(ok == 1, $sformatf("256-byte record written (%0d writes, state %0d)", nwr, dut.state));
    end
    check(!hold, "hold released after the record");

    // no access before sys_idle; hold stays high while waiting
    sys_idle = 0;
    nwr = 0;
    fork
      rec({COMP_PCE, 1'b0}, wr_val(0, '{32'h3FF}));
      begin
        repeat (40) @(negedge clk);
        check(hold && nwr == 0, "waits for idle with hold high");
        sys_idle = 1;
      end
    join
    repeat (6) @(negedge clk);
    check(nwr == 1 && mem[{COMP_PCE, 32'h0}] == 32'h3FF, "write after idle");
    check(early == 0, $sformatf("%0d accesses before idle", early));
    check(hold_bad == 0, "hold high during every record");

    // stop again
    rec({COMP_SYS, 1'b0}, wr_val(0, '{0}));
    repeat (3) @(negedge clk);
    check(!run, "run cleared");
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
