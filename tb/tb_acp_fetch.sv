// tb_acp_fetch -- self-checking test of the fetch unit against a small
// instruction memory model (word at address a is a*37+5). Random hold and
// redirect cycles: a normal cycle loads mem[fpc] and advances fpc, a hold
// keeps both, a redirect loads mem[target] and sets fpc to target + 1.
// Checks fpc = 0 after reset (boot state) and ir/fpc every cycle.
module tb_acp_fetch;
  localparam int unsigned M = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, hold, redirect;
  logic [M-1:0] target, imem_addr, fpc;
  logic [W-1:0] imem_data, ir;
  int e_fpc, e_ir;
  int checks = 0, failures = 0;

  function automatic logic [W-1:0] word_at(logic [M-1:0] a);
    return W'(int'(a) * 37 + 5);
  endfunction

  assign imem_data = word_at(imem_addr);

  acp_fetch dut (.clk, .rst, .hold, .redirect, .target,
                                 .imem_addr, .imem_data, .ir, .fpc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; hold = 0; redirect = 0; target = '0;
    @(posedge clk); #1;
    checks++; if (fpc !== '0) failures++;
    @(negedge clk); rst = 0;
    e_fpc = 0; e_ir = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      redirect = $urandom_range(0, 9) == 0;
      hold = (i > 0) && !redirect && ($urandom_range(0, 4) == 0);
      target = M'($urandom);
      if (redirect) begin
        e_ir = int'(word_at(target)); e_fpc = (int'(target) + 1) % (2**M);
      end else if (!hold) begin
        e_ir = int'(word_at(M'(e_fpc))); e_fpc = (e_fpc + 1) % (2**M);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(fpc) != e_fpc || int'(ir) != e_ir) begin
        failures++; $display("cycle %0d: fpc %0d/%0d ir %h/%h", i, fpc, e_fpc, ir, e_ir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
