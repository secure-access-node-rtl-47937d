// tb_frame_parser: streams frames of many shapes (0/1/2 VLAN tags, IPv4
// TCP/UDP/ICMP, non-IP, short runt) and compares the extracted parameter
// set with the values the frames were built from.
module tb_frame_parser;
  import secan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, done;
  beat_t in_beat;
  pset_t pset;

  frame_parser dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic stream(bytes_t b);
    int n = (b.size() + 3) / 4;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_beat.sop = (w == 0); in_beat.eop = (w == n - 1);
      in_beat.mty = in_beat.eop ? 2'((4 - b.size() % 4) % 4) : 2'd0;
      for (int k = 0; k < 4; k++) in_beat.data[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'h00;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_beat = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic fspec_t s = default_spec();
      automatic bytes_t b;
      s.dmac = {$urandom, 16'($urandom)}; s.smac = {$urandom, 16'($urandom)};
      s.nvlan = t % 3; s.vlan1 = 16'($urandom) & 16'h0FFF; s.vlan2 = 16'($urandom) & 16'h0FFF;
      s.sip = $urandom; s.dip = $urandom; s.sport = 16'($urandom); s.dport = 16'($urandom);
      case (t % 5)
        0, 1: s.proto = 6;
        2:    s.proto = 17;
        3:    s.proto = 1;
        default: begin s.ip = 0; s.etype = 16'h86DD; end
      endcase
      b = build_frame(s);
      stream(b);
      @(posedge clk); #1;
      check(pset.f == spec_params(s), $sformatf("t=%0d params %h expected %h", t, pset.f, spec_params(s)));
      check(pset.present == spec_present(s), $sformatf("t=%0d present %b expected %b", t, pset.present, spec_present(s)));
      check(int'(pset.payload_off) == spec_payload_off(s), $sformatf("t=%0d payload_off %0d", t, pset.payload_off));
      if (s.ip) begin
        check(int'(pset.ip_off) == 14 + 4 * s.nvlan, "ip_off");
        check(pset.ip_csum == {b[14+4*s.nvlan+10], b[14+4*s.nvlan+11]}, "ip checksum");
      end
    end
    // runt: only MAC addresses and part of the type field
    begin
      automatic bytes_t r = '{1,2,3,4,5,6,7,8,9,10,11,12,8'h08};
      stream(r);
      @(posedge clk); #1;
      check(pset.present == 10'b00000_00011, $sformatf("runt present %b", pset.present));
    end
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
