// mem_model: behavioural model of a board memory (SRAM or DDR2) behind a
// word request/response port. Storage is sparse (associative array), so the
// full 1 MB SRAM and 512 MB DDR2 address ranges can be modelled. A read
// returns its word LATENCY cycles after it was accepted, in order; with
// STALL set, `ready` drops pseudo-randomly to exercise back-pressure.
// Unwritten words read as zero.
module mem_model
  import secan_pkg::*;
#(
  parameter int unsigned LATENCY = 4,
  parameter bit          STALL   = 1'b0
) (
  input  logic        clk,
  input  mem_req_t    req,
  output logic        ready,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [logic [31:0]];
  logic        pv [LATENCY];
  logic [31:0] pd [LATENCY];
  int unsigned reads = 0;

  initial begin
    ready = 1'b1;
    for (int i = 0; i < int'(LATENCY); i++) begin pv[i] = 0; pd[i] = 0; end
  end

  function automatic void write_word(logic [31:0] a, logic [31:0] d);
    mem[a] = d;
  endfunction

  always @(posedge clk) begin
    for (int i = int'(LATENCY) - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= 1'b0;
    if (req.valid && ready) begin
      if (req.we) mem[req.addr] = req.wdata;
      else begin
        pv[0] <= 1'b1;
        pd[0] <= mem.exists(req.addr) ? mem[req.addr] : 32'h0;
        reads++;
      end
    end
    if (STALL) ready <= ($urandom % 4) != 0;
  end

  assign rvalid = pv[LATENCY-1];
  assign rdata  = pd[LATENCY-1];
endmodule
