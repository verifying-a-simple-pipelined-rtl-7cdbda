// acp_icache -- instruction cache (program memory mp) of the ACP pipeline.
//
// 2**M words of W bits. The fetch unit reads it asynchronously: rdata is
// mp[raddr] in the same cycle. The processor never writes it; the load port
// (we, waddr, wdata, written on the rising clock edge) exists so that a
// program can be placed in it, and is meant to be used while the core is held
// in reset. Cache misses are not modelled: every read hits, as in the
// architecture this pipeline implements. The load port is this design's own
// addition.
module acp_icache #(
  parameter int unsigned M = 8,   // address bits (2**M words)
  parameter int unsigned W = 16   // word size
) (
  input  logic         clk,
  input  logic [M-1:0] raddr,
  output logic [W-1:0] rdata,
  input  logic         we,
  input  logic [M-1:0] waddr,
  input  logic [W-1:0] wdata
);

  logic [W-1:0] mem [2**M];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
