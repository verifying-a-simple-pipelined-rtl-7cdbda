// acp_conflict -- read-after-write conflict detection of the ACP pipeline.
//
// Compares the decoded instruction (op, ra, rb, addr) with the execution
// triple that is about to be committed (unit, dest). Because results are only
// written at committal and nothing is forwarded, the decoded instruction must
// wait one cycle when it reads what the previous instruction writes:
//
//   unit = reg    and  branch with dest = 0          (branch tests reg[0])
//                 or   add with dest = ra or dest = rb
//                 or   store with dest = ra          (store reads reg[ra])
//   unit = dcache and  load with dest = addr         (load after store)
//
// where a register dest is the low R bits of the M-bit dest. This is the
// architecture's conflict rule; a branch in front never conflicts (it writes
// nothing), nor does set or load behind a register write (they read no
// register). Purely combinational.
module acp_conflict
  import acp_pkg::*;
#(
  parameter int unsigned R = 3,
  parameter int unsigned M = 8
) (
  input  logic [2:0]   op,
  input  logic [R-1:0] ra,
  input  logic [R-1:0] rb,
  input  logic [M-1:0] addr,
  input  unit_e        unit,
  input  logic [M-1:0] dest,
  output logic         conflict
);

  logic [R-1:0] dest_reg;
  assign dest_reg = dest[R-1:0];

  always_comb begin
    conflict = 1'b0;
    if (unit == U_REG) begin
      unique case (op)
        OP_BRANCH: conflict = (dest == '0);
        OP_ADD:    conflict = (dest_reg == ra) || (dest_reg == rb);
        OP_STORE:  conflict = (dest_reg == ra);
        default:   conflict = 1'b0;
      endcase
    end else if (unit == U_DCACHE) begin
      conflict = (op == OP_LOAD) && (dest == addr);
    end
  end

endmodule
