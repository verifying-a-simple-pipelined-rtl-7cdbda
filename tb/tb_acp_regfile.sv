// tb_acp_regfile -- self-checking test of the register set: checks that
// reset clears every register, then makes random writes and compares all
// four read ports (ra, rb, register 0 and the inspection port) with a shadow
// copy each cycle.
module tb_acp_regfile;
  localparam int unsigned R = 3, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, we;
  logic [R-1:0] ra, rb, waddr, dbg_addr;
  logic [W-1:0] rd_a, rd_b, rd_0, wdata, dbg_data;
  logic [W-1:0] shadow [2**R];
  int checks = 0, failures = 0;

  acp_regfile dut (.clk, .rst, .ra, .rd_a, .rb, .rd_b, .rd_0,
                                   .we, .waddr, .wdata, .dbg_addr, .dbg_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra = '0; rb = '0; waddr = '0; wdata = '0; dbg_addr = '0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 2**R; i++) begin
      dbg_addr = R'(i); #1; checks++;
      if (dbg_data !== '0) begin failures++; $display("reset r%0d", i); end
      shadow[i] = '0;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = R'($urandom); wdata = W'($urandom);
      if (i % 5 == 0) waddr = '0;
      ra = R'($urandom); rb = R'($urandom); dbg_addr = R'($urandom);
      #1; checks += 4;
      if (rd_a !== shadow[ra]) begin failures++; $display("ra %0d", ra); end
      if (rd_b !== shadow[rb]) begin failures++; $display("rb %0d", rb); end
      if (rd_0 !== shadow[0]) begin failures++; $display("r0"); end
      if (dbg_data !== shadow[dbg_addr]) begin failures++; $display("dbg %0d", dbg_addr); end
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
