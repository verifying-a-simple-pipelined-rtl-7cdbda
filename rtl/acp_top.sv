// acp_top -- ACP, a four-stage pipelined implementation of the SPM
// architecture (2**R registers, 2**M-word program and data memories,
// W-bit words; instructions add, branch, load, store, set).
//
//   icache -> Fetch (ir, fpc) -> Decode (op, ra, rb, rc, addr)
//          -> Execute (result, dest, unit, rst_ctr)
//          -> Committal into pc, registers and dcache
//
// Fetch reads mp[fpc] (or the branch target while a taken branch is being
// committed); Decode splits the instruction; Execute computes the execution
// triple from the committed registers, pc and data cache; the next cycle the
// triple is committed. There is no forwarding: an instruction that reads what
// the instruction in front of it writes stalls for one cycle (fetch and
// decode hold). A taken branch flushes the two younger instructions and the
// pipeline refills over two cycles (rst_ctr = 2, 1). One SPM instruction thus
// completes per cycle when the pipeline is full, in 2 cycles after a stall,
// 3 after a taken branch and 4 from boot.
//
// Interface: rst (synchronous, active high) puts the pipeline in its boot
// state with pc = 0 and clears the registers. The program is written through
// imem_we/imem_waddr/imem_wdata and the data memory through the dmem_ext_*
// port, both while rst is held; dmem_ext_addr/dmem_ext_rdata and
// dbg_reg_addr/dbg_reg_data read the data memory and the registers at any
// time. pc, fpc, unit, rst_ctr and stall show the pipeline state. The load and
// inspection ports and the reset values are this design's own additions; the
// stage structure and behaviour follow the architecture's pipeline.
module acp_top
  import acp_pkg::*;
#(
  parameter int unsigned R = 3,
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  // program load
  input  logic         imem_we,
  input  logic [M-1:0] imem_waddr,
  input  logic [W-1:0] imem_wdata,
  // data memory load / inspection
  input  logic         dmem_ext_we,
  input  logic [M-1:0] dmem_ext_addr,
  input  logic [W-1:0] dmem_ext_wdata,
  output logic [W-1:0] dmem_ext_rdata,
  // register inspection
  input  logic [R-1:0] dbg_reg_addr,
  output logic [W-1:0] dbg_reg_data,
  // pipeline state
  output logic [M-1:0] pc,
  output logic [M-1:0] fpc,
  output unit_e        unit,
  output logic [1:0]   rst_ctr,
  output logic         stall
);

  logic [M-1:0] imem_addr;
  logic [W-1:0] imem_data;
  logic [W-1:0] ir;
  logic [2:0]   op;
  logic [R-1:0] ra, rb, rc;
  logic [M-1:0] addr;
  logic [W-1:0] rd_a, rd_b, rd_0;
  logic [W-1:0] dmem_rdata;
  logic [W-1:0] result;
  logic [M-1:0] dest;

  acp_icache #(.M(M), .W(W)) u_icache (
    .clk, .raddr(imem_addr), .rdata(imem_data),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  acp_fetch #(.M(M), .W(W)) u_fetch (
    .clk, .rst, .hold(stall), .redirect(unit == U_PC), .target(dest),
    .imem_addr, .imem_data, .ir, .fpc
  );

  acp_decode #(.R(R), .M(M), .W(W)) u_decode (
    .clk, .hold(stall), .ir, .op, .ra, .rb, .rc, .addr
  );

  acp_execute #(.R(R), .M(M), .W(W)) u_execute (
    .clk, .rst, .op, .ra, .rb, .rc, .addr,
    .rd_a, .rd_b, .rd_0, .pc, .dmem_rdata,
    .result, .dest, .unit, .rst_ctr, .hold(stall)
  );

  // Committal: the triple produced last cycle is written this cycle.
  acp_regfile #(.R(R), .W(W)) u_regfile (
    .clk, .rst, .ra, .rd_a, .rb, .rd_b, .rd_0,
    .we(unit == U_REG), .waddr(dest[R-1:0]), .wdata(result),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  acp_pc #(.M(M)) u_pc (
    .clk, .rst, .unit, .dest, .pc
  );

  acp_dcache #(.M(M), .W(W)) u_dcache (
    .clk, .raddr(addr), .rdata(dmem_rdata),
    .we(unit == U_DCACHE), .waddr(dest), .wdata(result),
    .ext_we(dmem_ext_we), .ext_addr(dmem_ext_addr),
    .ext_wdata(dmem_ext_wdata), .ext_rdata(dmem_ext_rdata)
  );

endmodule
