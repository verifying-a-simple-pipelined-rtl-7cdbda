// tb_acp_dcache -- self-checking test of the data cache: random writes
// through the committal port and the external port, with the committal write
// taking the single write port when both write in one cycle, checked on both asynchronous read ports against
// a shadow copy.
module tb_acp_dcache;
  localparam int unsigned M = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [M-1:0] raddr, waddr, ext_addr;
  logic [W-1:0] rdata, wdata, ext_wdata, ext_rdata;
  logic we, ext_we;
  logic [W-1:0] shadow [2**M];
  int checks = 0, failures = 0;

  acp_dcache dut (.clk, .raddr, .rdata, .we, .waddr, .wdata,
                                  .ext_we, .ext_addr, .ext_wdata, .ext_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ext_we = 0; raddr = '0; waddr = '0; wdata = '0; ext_addr = '0; ext_wdata = '0;
    for (int a = 0; a < 2**M; a++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = M'(a); ext_wdata = W'($urandom); shadow[a] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = M'($urandom); wdata = W'($urandom);
      ext_we = $urandom_range(0, 2) == 0; ext_addr = M'($urandom); ext_wdata = W'($urandom);
      if (i % 7 == 0) ext_addr = waddr;   // force clashes
      raddr = M'($urandom);
      #1;
      checks += 2;
      if (rdata !== shadow[raddr]) begin failures++; $display("rd %0d", raddr); end
      if (ext_rdata !== shadow[ext_addr]) begin failures++; $display("ext rd %0d", ext_addr); end
      if (we) shadow[waddr] = wdata;     // committal write takes the port
      else if (ext_we) shadow[ext_addr] = ext_wdata;
    end
    @(negedge clk); we = 0; ext_we = 0;
    for (int a = 0; a < 2**M; a++) begin
      raddr = M'(a); #1; checks++;
      if (rdata !== shadow[a]) begin failures++; $display("final %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
