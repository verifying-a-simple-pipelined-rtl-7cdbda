// tb_acp_pc -- self-checking test of the program counter: reset to 0, then
// random committal units; the expected pc is dest for a taken branch, +1 for
// reg, dcache and incpc, unchanged for wait (modulo 2**M).
module tb_acp_pc;
  import acp_pkg::*;
  localparam int unsigned M = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  unit_e unit;
  logic [M-1:0] dest, pc;
  int exp_pc;
  int checks = 0, failures = 0;

  acp_pc dut (.clk, .rst, .unit, .dest, .pc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; unit = U_WAIT; dest = '0;
    @(negedge clk); rst = 0;
    exp_pc = 0;
    checks++; if (pc !== '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 4))
        0: unit = U_REG; 1: unit = U_PC; 2: unit = U_INCPC; 3: unit = U_DCACHE;
        default: unit = U_WAIT;
      endcase
      dest = M'($urandom);
      if (unit == U_PC) exp_pc = int'(dest);
      else if (unit != U_WAIT) exp_pc = (exp_pc + 1) % (2**M);
      @(posedge clk); #1;
      checks++;
      if (pc !== M'(exp_pc)) begin
        failures++; $display("unit %s: pc %0d want %0d", unit.name(), pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
