// acp_pc -- architectural program counter of the ACP pipeline.
//
// The committal stage updates pc from the unit field of the execution triple
// waiting to be committed: a taken branch (unit = pc) loads dest, the branch
// target; a register write, a data cache write or a branch not taken
// (unit = reg, dcache, incpc) advance pc by one; unit = wait leaves it alone.
// The new value appears after the rising clock edge. Arithmetic is modulo
// 2**M. Reset sets pc to 0, which is this design's own choice of start
// address.
module acp_pc
  import acp_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  unit_e        unit,
  input  logic [M-1:0] dest,
  output logic [M-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
    end else begin
      unique case (unit)
        U_PC:                     pc <= dest;
        U_REG, U_DCACHE, U_INCPC: pc <= pc + M'(1);
        default:                  pc <= pc;
      endcase
    end
  end

endmodule
