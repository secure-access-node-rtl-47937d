// tb_rse: rule set engine test with modelled SRAM and DDR2 (DDR2 with random
// back-pressure). Covers a hit, a CRC collision (stored flow id differs), an
// empty map entry, a request for the standard set, a rule set longer than
// the carried maximum, and configuration writes and reads of the default
// entry, SRAM and DDR2.
module tb_rse;
  import secan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, req_use_default, rsp_valid;
  logic [255:0] req_fid;
  logic [31:0] req_hash;
  ruleset_t rsp_rs;
  mem_req_t sram_req, ddr_req;
  logic sram_ready, sram_rvalid, ddr_ready, ddr_rvalid;
  logic [31:0] sram_rdata, ddr_rdata;
  cfg_req_t cfg;
  logic cfg_rvalid, idle;
  logic [31:0] cfg_rdata, stat_default;

  rse dut (.*);
  mem_model #(.LATENCY(2)) u_sram (.clk, .req(sram_req), .ready(sram_ready), .rvalid(sram_rvalid), .rdata(sram_rdata));
  mem_model #(.LATENCY(6), .STALL(1)) u_ddr (.clk, .req(ddr_req), .ready(ddr_ready), .rvalid(ddr_rvalid), .rdata(ddr_rdata));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cfg_access(bit wr, logic [31:0] addr, logic [31:0] wdata, output logic [31:0] rdata);
    @(negedge clk);
    cfg = '0; cfg.wr = wr; cfg.rd = !wr; cfg.comp = COMP_RSE; cfg.addr = addr; cfg.wdata = wdata;
    do @(posedge clk); while (!cfg_rvalid);
    rdata = cfg_rdata;
    @(negedge clk); cfg = '0;
  endtask

  task automatic lookup(logic [255:0] fid, logic [31:0] hash, bit def, output ruleset_t rs);
    @(negedge clk);
    req_valid = 1; req_fid = fid; req_hash = hash; req_use_default = def;
    do @(posedge clk); while (!req_ready);
    @(negedge clk); req_valid = 0;
    do @(posedge clk); while (!rsp_valid);
    rs = rsp_rs;
  endtask

  logic [31:0] def_rules[3] = '{32'h0310_5001, 32'h0, 32'h0A00_0001};
  logic [31:0] dummy;
  ruleset_t rs;
  logic [255:0] fa, fb;

  initial begin
    req_valid = 0; req_fid = 0; req_hash = 0; req_use_default = 0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // standard rule set record at pointer 100 (word 800), written via configuration
    cfg_access(1, 32'h0, {1'b1, 7'd3, 24'd100}, dummy);
    for (int i = 0; i < 3; i++) cfg_access(1, 32'h8000_0000 | (800 + 8 + i), def_rules[i], dummy);
    cfg_access(0, 32'h0, 0, dummy);
    check(dummy == {1'b1, 7'd3, 24'd100}, "default entry read back");
    cfg_access(0, 32'h8000_0000 | 809, 0, dummy);
    check(dummy == def_rules[1], "DDR2 read back");
    // flow A at hash 0x12345, pointer 10 (word 80), 4 rules
    fa = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    cfg_access(1, 32'h4000_0000 | 32'h12345, {1'b1, 7'd4, 24'd10}, dummy);
    cfg_access(0, 32'h4000_0000 | 32'h12345, 0, dummy);
    check(dummy == {1'b1, 7'd4, 24'd10}, "SRAM read back");
    for (int i = 0; i < 8; i++) u_ddr.write_word(80 + i, fa[255 - 32*i -: 32]);
    for (int i = 0; i < 4; i++) u_ddr.write_word(88 + i, 32'hA000_0000 + i);
    lookup(fa, 32'hFFF1_2345, 0, rs);   // upper hash bits are not used
    check(!rs.is_default && rs.count == 4, $sformatf("hit count %0d def %b", rs.count, rs.is_default));
    for (int i = 0; i < 4; i++) check(rs.words[i] == 32'hA000_0000 + i, "hit rule word");
    // collision: same hash, different flow id
    fb = fa ^ 256'h1;
    lookup(fb, 32'h0001_2345, 0, rs);
    check(rs.is_default && rs.count == 3 && rs.words[0] == def_rules[0] && rs.words[2] == def_rules[2], "collision -> standard set");
    // empty entry
    lookup(fa, 32'h0000_0777, 0, rs);
    check(rs.is_default && rs.count == 3 && rs.words[1] == def_rules[1], "empty entry -> standard set");
    // incomplete flow id
    lookup(fa, 32'h0001_2345, 1, rs);
    check(rs.is_default && rs.count == 3, "use_default -> standard set");
    // long rule set, 40 words stored: 16 carried
    u_sram.write_word(32'h00500, {1'b1, 7'd40, 24'd20});
    for (int i = 0; i < 8; i++) u_ddr.write_word(160 + i, fb[255 - 32*i -: 32]);
    for (int i = 0; i < 40; i++) u_ddr.write_word(168 + i, 32'hB000_0000 + i);
    lookup(fb, 32'h0000_0500, 0, rs);
    check(!rs.is_default && rs.count == 16 && rs.words[15] == 32'hB000_000F, "long set truncated");
    check(stat_default == 3, $sformatf("stat_default %0d", stat_default));
    check(idle, "idle at end");
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
