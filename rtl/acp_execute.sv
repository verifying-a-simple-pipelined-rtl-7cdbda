// acp_execute -- Execute unit of the ACP pipeline.
//
// Holds the execution triple (result, dest, unit) of the instruction that
// will be committed next cycle, and the pipeline state counter rst_ctr
// ("reset": 2 at boot and after a taken branch, counting down to 0 once the
// pipeline has refilled). Each cycle:
//
//   rst_ctr > 0              : (result, dest, wait, rst_ctr - 1)  refilling
//   rst_ctr = 0 and conflict : (result, dest, wait, 0)            stall
//   rst_ctr = 0, no conflict : execute the decoded instruction
//
// Executing an instruction (W-bit result, M-bit dest):
//   add    : (reg[ra] + reg[rb], rc,          reg,    0)
//   branch : reg[0] = 0  -> (result, bpc + addr, pc,  2)   taken, flush
//            reg[0] /= 0 -> (result, dest,      incpc, 0)
//   load   : (md[addr],          ra,          reg,    0)
//   store  : (reg[ra],           addr,        dcache, 0)
//   set    : (addr (zero-extended), ra,       reg,    0)
// Register indices and the immediate are zero-extended. result and dest are
// kept where an instruction does not need them.
//
// bpc is the address of the branch itself. The architectural pc lags the
// instruction in decode by one when the pipeline is full (the triple waiting
// to be committed belongs to the instruction at pc) and not at all in the
// stall state (unit = wait), so bpc = pc + (unit /= wait). The architecture
// defines the target as pc + addr with pc the branch's own address; this way
// of recovering that address in the pipeline is this design's choice. The
// op codes 101, 110 and 111 are not instructions; here they only advance pc
// (unit = incpc), also this design's choice.
//
// hold = conflict and rst_ctr = 0 is raised combinationally and freezes the
// fetch and decode units for the stall cycle. Register, data cache and pc
// reads are combinational; the triple changes on the rising clock edge.
// Reset gives the boot state: unit = wait, rst_ctr = 2.
module acp_execute
  import acp_pkg::*;
#(
  parameter int unsigned R = 3,
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  // decoded instruction
  input  logic [2:0]   op,
  input  logic [R-1:0] ra,
  input  logic [R-1:0] rb,
  input  logic [R-1:0] rc,
  input  logic [M-1:0] addr,
  // committed state
  input  logic [W-1:0] rd_a,       // reg[ra]
  input  logic [W-1:0] rd_b,       // reg[rb]
  input  logic [W-1:0] rd_0,       // reg[0]
  input  logic [M-1:0] pc,
  input  logic [W-1:0] dmem_rdata, // md[addr]
  // execution triple and pipeline state
  output logic [W-1:0] result,
  output logic [M-1:0] dest,
  output unit_e        unit,
  output logic [1:0]   rst_ctr,
  output logic         hold
);

  logic         conflict;
  logic [M-1:0] bpc;
  logic [W-1:0] n_result;
  logic [M-1:0] n_dest;
  unit_e        n_unit;
  logic [1:0]   n_ctr;

  acp_conflict #(.R(R), .M(M)) u_conflict (
    .op, .ra, .rb, .addr, .unit, .dest, .conflict
  );

  assign hold = conflict && (rst_ctr == 2'd0);
  assign bpc  = pc + ((unit != U_WAIT) ? M'(1) : M'(0));

  always_comb begin
    n_result = result;
    n_dest   = dest;
    n_unit   = U_WAIT;
    n_ctr    = 2'd0;
    if (rst_ctr != 2'd0) begin
      n_ctr = rst_ctr - 2'd1;
    end else if (!conflict) begin
      unique case (op)
        OP_ADD: begin
          n_result = rd_a + rd_b;
          n_dest   = M'(rc);
          n_unit   = U_REG;
        end
        OP_BRANCH: begin
          if (rd_0 == '0) begin
            n_dest = bpc + addr;
            n_unit = U_PC;
            n_ctr  = RESET_BOOT;
          end else begin
            n_unit = U_INCPC;
          end
        end
        OP_LOAD: begin
          n_result = dmem_rdata;
          n_dest   = M'(ra);
          n_unit   = U_REG;
        end
        OP_STORE: begin
          n_result = rd_a;
          n_dest   = addr;
          n_unit   = U_DCACHE;
        end
        OP_SET: begin
          n_result = W'(addr);
          n_dest   = M'(ra);
          n_unit   = U_REG;
        end
        default: n_unit = U_INCPC;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      result  <= '0;
      dest    <= '0;
      unit    <= U_WAIT;
      rst_ctr <= RESET_BOOT;
    end else begin
      result  <= n_result;
      dest    <= n_dest;
      unit    <= n_unit;
      rst_ctr <= n_ctr;
    end
  end

  // A taken branch always restarts the refill count; a counter above 0 never
  // comes with anything but a taken branch or wait.
  a_ctr_unit: assert property (@(posedge clk) disable iff (rst)
    (rst_ctr != 2'd0) |-> (unit == U_WAIT || unit == U_PC));
  a_ctr_range: assert property (@(posedge clk) disable iff (rst) rst_ctr <= 2'd2);

endmodule
