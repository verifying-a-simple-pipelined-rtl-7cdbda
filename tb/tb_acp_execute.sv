// tb_acp_execute -- self-checking test of the execute unit. The testbench
// plays the decode unit and the committed state (registers, pc, data word)
// with random values and keeps its own model of the execution triple and the
// state counter: refill after reset and after every taken branch (2, 1, then
// execute), a stall with unit = wait when the decoded instruction reads what
// the waiting triple writes, and the result/dest/unit of each instruction.
// Branch targets are checked to be the branch's own address plus the offset.
// Counts taken branches, stalls and every op, and fails if one never occurred.
module tb_acp_execute;
  import acp_pkg::*;
  localparam int unsigned R = 3, M = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  logic [2:0] op;
  logic [R-1:0] ra, rb, rc;
  logic [M-1:0] addr, pc, dest;
  logic [W-1:0] rd_a, rd_b, rd_0, dmem_rdata, result;
  unit_e unit;
  logic [1:0] rst_ctr;
  logic hold;

  logic [W-1:0] e_result;
  logic [M-1:0] e_dest;
  unit_e e_unit;
  int e_ctr;
  bit e_hold;
  int checks = 0, failures = 0;
  int n_taken = 0, n_stall = 0, n_refill = 0;
  int n_op [8];

  acp_execute dut (.clk, .rst, .op, .ra, .rb, .rc, .addr,
    .rd_a, .rd_b, .rd_0, .pc, .dmem_rdata, .result, .dest, .unit, .rst_ctr, .hold);

  function automatic bit reads_written();
    if (e_unit == U_REG) begin
      case (op)
        3'b000: return e_dest[R-1:0] == ra || e_dest[R-1:0] == rb;
        3'b001: return e_dest == '0;
        3'b011: return e_dest[R-1:0] == ra;
        default: return 0;
      endcase
    end
    if (e_unit == U_DCACHE) return op == 3'b010 && e_dest == addr;
    return 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; op = '0; ra = '0; rb = '0; rc = '0; addr = '0; pc = '0;
    rd_a = '0; rd_b = '0; rd_0 = '0; dmem_rdata = '0;
    @(posedge clk); #1;
    checks++; if (unit !== U_WAIT || rst_ctr !== 2'd2) failures++;
    e_result = result; e_dest = dest; e_unit = U_WAIT; e_ctr = 2;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      if (i > 0) @(negedge clk);
      op = 3'($urandom_range(0, 7));
      if ($urandom_range(0, 3) != 0) op = 3'($urandom_range(0, 4));
      ra = R'($urandom); rb = R'($urandom); rc = R'($urandom);
      addr = M'($urandom); pc = M'($urandom);
      if ($urandom_range(0, 2) == 0) begin ra = e_dest[R-1:0]; addr = e_dest; end
      rd_a = W'($urandom); rd_b = W'($urandom);
      rd_0 = ($urandom_range(0, 2) == 0) ? '0 : W'($urandom);
      dmem_rdata = W'($urandom);
      #1;
      e_hold = (e_ctr == 0) && reads_written();
      checks++;
      if (hold !== e_hold) begin failures++; $display("cycle %0d hold %b", i, hold); end
      // expected next triple
      if (e_ctr > 0) begin
        e_unit = U_WAIT; e_ctr--; n_refill++;
      end else if (e_hold) begin
        e_unit = U_WAIT; n_stall++;
      end else begin
        n_op[op]++;
        case (op)
          3'b000: begin e_result = rd_a + rd_b; e_dest = M'(rc); e_unit = U_REG; end
          3'b001: begin
            if (rd_0 == '0) begin
              // address of the branch: pc when nothing waits, pc + 1 otherwise
              e_dest = pc + ((e_unit == U_WAIT) ? M'(0) : M'(1)) + addr;
              e_unit = U_PC; e_ctr = 2; n_taken++;
            end else e_unit = U_INCPC;
          end
          3'b010: begin e_result = dmem_rdata; e_dest = M'(ra); e_unit = U_REG; end
          3'b011: begin e_result = rd_a; e_dest = addr; e_unit = U_DCACHE; end
          3'b100: begin e_result = W'(addr); e_dest = M'(ra); e_unit = U_REG; end
          default: e_unit = U_INCPC;
        endcase
      end
      @(posedge clk); #1;
      checks++;
      if (unit !== e_unit || int'(rst_ctr) != e_ctr || result !== e_result || dest !== e_dest) begin
        failures++;
        $display("cycle %0d op %0d: got %h %h %s %0d want %h %h %s %0d", i, op,
                 result, dest, unit.name(), rst_ctr, e_result, e_dest, e_unit.name(), e_ctr);
      end
    end
    $display("taken %0d stall %0d refill %0d", n_taken, n_stall, n_refill);
    checks++;
    if (n_taken == 0 || n_stall == 0 || n_refill == 0) failures++;
    for (int o = 0; o < 8; o++) begin
      checks++; if (n_op[o] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
