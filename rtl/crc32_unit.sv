// crc32_unit: CRC32 over a stream of 32-bit words, one word per cycle.
//
// The PCE feeds the flow id through this unit while composing it, and the
// result addresses the flow-id-to-rule-set map of the RSE. The generator
// polynomial is the IEEE 802.3 one, 0x04C11DB7; bits enter most significant
// first, the register starts at all ones and the result is not inverted or
// reflected (those conventions are this design's choice: the value is used as
// a table address only).
//
// Interface: `init` loads the start value; each cycle with `en` high folds
// `data` into the register. `crc` is the register; it is valid the cycle after
// the last `en`. Latency one cycle per word.
module crc32_unit #(
  parameter logic [31:0] POLY = 32'h04C1_1DB7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [31:0] data,
  output logic [31:0] crc
);
  function automatic logic [31:0] step32(logic [31:0] c, logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 31; i >= 0; i--) begin
      if (r[31] ^ d[i]) r = {r[30:0], 1'b0} ^ POLY;
      else              r = {r[30:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= step32(crc, data);
  end
endmodule
