// tb_crc32_unit: feeds random 8-word flow ids, one word per cycle, and
// compares the result with a bit-serial CRC32 reference.
module tb_crc32_unit;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, en;
  logic [31:0] data, crc;

  crc32_unit dut (.*);

  initial begin
    init = 0; en = 0; data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic logic [255:0] d;
      automatic int n = 1 + (t % 8);
      for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
      if (t == 0) d = '0;
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      for (int i = 0; i < n; i++) begin
        en = 1; data = d[255 - 32*i -: 32];
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (crc !== crc32_ref(d, 32 * n)) begin
        failures++;
        $display("FAIL crc %h expected %h", crc, crc32_ref(d, 32 * n));
      end
    end
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
