// tb_pkt_fifo: frame buffer test. Writes random frames, some marked for
// discarding and some too large for the buffer, while reading at random,
// and checks that exactly the committed frames come out, whole and in order.
module tb_pkt_fifo;
  import secan_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, wr_drop, wr_full, rd_valid, rd_en, committed, discarded;
  beat_t wr_beat, rd_beat;
  logic [$clog2(DEPTH):0] fill;
  logic [15:0] frames;

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

  beat_t exp_q[$];
  int n_drop = 0, n_ovf = 0, n_ok = 0, n_disc = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // reader
  always @(posedge clk) if (rst_n) begin
    if (rd_en && rd_valid) begin
      beat_t e;
      check(exp_q.size() > 0, "unexpected beat");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(rd_beat == e, $sformatf("beat %h expected %h", rd_beat, e));
      end
    end
    if (discarded) n_disc++;
  end
  always @(negedge clk) rd_en <= ($urandom % 3) != 0;

  task automatic send(int len, bit drop);
    beat_t fr[$];
    bit full_seen = 0;
    for (int i = 0; i < len; i++) begin
      beat_t b;
      b.data = $urandom; b.sop = (i == 0); b.eop = (i == len - 1); b.mty = b.eop ? 2'($urandom) : 2'd0;
      fr.push_back(b);
    end
    foreach (fr[i]) begin
      @(negedge clk);
      wr_en = 1; wr_beat = fr[i]; wr_drop = drop && fr[i].eop;
      #1 if (wr_full) full_seen = 1;
    end
    @(negedge clk); wr_en = 0; wr_drop = 0;
    if (drop) n_drop++;
    else if (full_seen) n_ovf++;
    else begin n_ok++; foreach (fr[i]) exp_q.push_back(fr[i]); end
  endtask

  initial begin
    wr_en = 0; wr_drop = 0; wr_beat = '0; rd_en = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      automatic int len = (f % 17 == 5) ? 40 : 1 + $urandom % 12;
      send(len, (f % 7) == 3);
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "frames left unread");
    check(n_disc == n_drop + n_ovf, $sformatf("discarded %0d expected %0d", n_disc, n_drop + n_ovf));
    check(n_ovf > 0 && n_drop > 0 && n_ok > 0, "all cases exercised");
    check(fill == 0 && frames == 0, "empty at end");
    $display("frames ok=%0d dropped=%0d overflowed=%0d", n_ok, n_drop, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
