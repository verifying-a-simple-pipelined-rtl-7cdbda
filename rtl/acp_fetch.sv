// acp_fetch -- Fetch unit of the ACP pipeline: instruction register ir and
// fetch program counter fpc.
//
// Each cycle one instruction is read from the instruction cache and stored in
// ir. Normally it is read at fpc and fpc then advances by one, so that with a
// full pipeline fpc runs three ahead of the architectural pc. When the
// execution triple waiting to be committed is a taken branch (redirect), the
// instruction is read at the branch target instead and fpc becomes target + 1.
// On a read-write conflict (hold, raised by the execute unit) nothing is
// fetched: ir and fpc keep their values. Reset sets fpc to the reset value of
// pc (0), the boot state; ir is not reset, it holds junk at boot.
//
// Timing: imem_addr is combinational from fpc/redirect/target; ir and fpc
// change on the rising clock edge. The behaviour follows the architecture's
// description of the Fetch stage; the priority of redirect over hold is this
// design's choice (the two never coincide).
module acp_fetch #(
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         hold,       // read-write conflict: fetch nothing
  input  logic         redirect,   // taken branch being committed
  input  logic [M-1:0] target,     // its target address
  output logic [M-1:0] imem_addr,
  input  logic [W-1:0] imem_data,
  output logic [W-1:0] ir,
  output logic [M-1:0] fpc
);

  assign imem_addr = redirect ? target : fpc;

  always_ff @(posedge clk) begin
    if (rst) begin
      fpc <= '0;
    end else if (redirect || !hold) begin
      fpc <= imem_addr + M'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (redirect || !hold) ir <= imem_data;
  end

endmodule
