// acp_regfile -- general purpose register set reg of the ACP pipeline.
//
// 2**R registers of W bits. Three asynchronous read ports serve the execute
// unit: reg[ra] and reg[rb] for add and store, and reg[0], the register a
// branch tests for zero. One write port is driven by the committal stage
// (written on the rising edge when the execution triple's unit is reg). A
// fourth read port (dbg_addr/dbg_data) lets the surrounding system inspect
// the registers. Reset clears every register; the architecture leaves the
// initial contents open, so the reset value and the inspection port are this
// design's own choices.
module acp_regfile #(
  parameter int unsigned R = 3,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [R-1:0] ra,
  output logic [W-1:0] rd_a,
  input  logic [R-1:0] rb,
  output logic [W-1:0] rd_b,
  output logic [W-1:0] rd_0,
  input  logic         we,
  input  logic [R-1:0] waddr,
  input  logic [W-1:0] wdata,
  input  logic [R-1:0] dbg_addr,
  output logic [W-1:0] dbg_data
);

  logic [W-1:0] regs [2**R];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2**R; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rd_a     = regs[ra];
  assign rd_b     = regs[rb];
  assign rd_0     = regs[0];
  assign dbg_data = regs[dbg_addr];

endmodule
