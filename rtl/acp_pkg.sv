// acp_pkg -- shared types of the SPM instruction set and the ACP pipeline.
//
// SPM has five instructions. Their 3-bit op codes (add = 000, branch = 001,
// load = 010, store = 011, set = 100) follow the architecture; the codes
// 101, 110 and 111 are not instructions. The execution unit tags every
// result with the place it is to be committed to (unit_e): a register, the
// program counter (taken branch), pc + 1 only (branch not taken), the data
// cache, or nothing at all (wait). The pipeline state counter is 0, 1 or 2.
// The 3-bit encoding of unit_e is this design's own choice.
package acp_pkg;

  typedef enum logic [2:0] {
    OP_ADD    = 3'b000,
    OP_BRANCH = 3'b001,
    OP_LOAD   = 3'b010,
    OP_STORE  = 3'b011,
    OP_SET    = 3'b100
  } op_e;

  typedef enum logic [2:0] {
    U_REG    = 3'd0,  // result -> reg[dest], pc := pc + 1
    U_PC     = 3'd1,  // taken branch: pc := dest
    U_INCPC  = 3'd2,  // branch not taken: pc := pc + 1
    U_DCACHE = 3'd3,  // result -> md[dest], pc := pc + 1
    U_WAIT   = 3'd4   // nothing to commit
  } unit_e;

  // Value the pipeline state counter takes at boot and after a taken branch.
  localparam logic [1:0] RESET_BOOT = 2'd2;

endpackage
