// acp_dcache -- data cache (data memory md) of the ACP pipeline.
//
// 2**M words of W bits. The execute unit reads it asynchronously for a load
// (rdata = md[raddr] in the same cycle); the committal stage writes it on the
// rising clock edge when the execution triple's unit is dcache (a store).
// A second, external port (ext_we/ext_addr/ext_wdata/ext_rdata) lets the
// surrounding system place data before a run and inspect it afterwards. There
// is one write port: in a cycle where both write, the committal write is done
// and the external one is dropped. Every access hits: cache
// misses are not modelled. The external port is this design's own addition.
module acp_dcache #(
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  // execute unit read
  input  logic [M-1:0] raddr,
  output logic [W-1:0] rdata,
  // committal write
  input  logic         we,
  input  logic [M-1:0] waddr,
  input  logic [W-1:0] wdata,
  // external load / inspection port
  input  logic         ext_we,
  input  logic [M-1:0] ext_addr,
  input  logic [W-1:0] ext_wdata,
  output logic [W-1:0] ext_rdata
);

  logic [W-1:0] mem [2**M];

  always_ff @(posedge clk) begin
    if (we)          mem[waddr]    <= wdata;
    else if (ext_we) mem[ext_addr] <= ext_wdata;
  end

  assign rdata     = mem[raddr];
  assign ext_rdata = mem[ext_addr];

endmodule
