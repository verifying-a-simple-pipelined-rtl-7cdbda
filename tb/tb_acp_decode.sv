// tb_acp_decode -- self-checking test of the decode unit: random instruction
// words, the expected fields worked out by shifting and masking the word, and
// hold cycles in which the fields must not change.
module tb_acp_decode;
  localparam int unsigned R = 3, M = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic hold;
  logic [W-1:0] ir;
  logic [2:0] op;
  logic [R-1:0] ra, rb, rc;
  logic [M-1:0] addr;
  int e_op, e_ra, e_rb, e_rc, e_addr;
  int checks = 0, failures = 0;

  acp_decode dut (.clk, .hold, .ir, .op, .ra, .rb, .rc, .addr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hold = 0; ir = '0;
    e_op = 0; e_ra = 0; e_rb = 0; e_rc = 0; e_addr = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ir = W'($urandom);
      hold = (i > 0) && ($urandom_range(0, 3) == 0);
      if (!hold) begin
        e_op   = (int'(ir) >> (W - 3)) & 7;
        e_ra   = (int'(ir) >> (W - 3 - R)) & ((1 << R) - 1);
        e_rb   = (int'(ir) >> (W - 3 - 2 * R)) & ((1 << R) - 1);
        e_rc   = (int'(ir) >> (W - 3 - 3 * R)) & ((1 << R) - 1);
        e_addr = (int'(ir) >> (W - 3 - R - M)) & ((1 << M) - 1);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(op) != e_op || int'(ra) != e_ra || int'(rb) != e_rb ||
          int'(rc) != e_rc || int'(addr) != e_addr) begin
        failures++;
        $display("ir %h: got %0d %0d %0d %0d %0d want %0d %0d %0d %0d %0d", ir,
                 op, ra, rb, rc, addr, e_op, e_ra, e_rb, e_rc, e_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
