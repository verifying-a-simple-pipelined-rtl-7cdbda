// tb_acp_icache -- self-checking test of the instruction cache: fills every
// word through the load port with pseudo-random data, then reads all of them
// back (asynchronous read) against a shadow copy kept by the testbench, and
// checks that a read in the same cycle as a write sees the old word.
module tb_acp_icache;
  localparam int unsigned M = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [M-1:0] raddr, waddr;
  logic [W-1:0] rdata, wdata;
  logic we;
  logic [W-1:0] shadow [2**M];
  int checks = 0, failures = 0;

  acp_icache dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < 2**M; a++) begin
      @(negedge clk);
      we = 1; waddr = M'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2**M; a++) begin
      raddr = M'(a); #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++; $display("read %0d: got %h want %h", a, rdata, shadow[a]);
      end
    end
    // read-during-write: old data until the clock edge, new data after it
    @(negedge clk);
    raddr = 8'd17; waddr = 8'd17; wdata = ~shadow[17]; we = 1; #1;
    checks++; if (rdata !== shadow[17]) failures++;
    @(posedge clk); #1; we = 0;
    checks++; if (rdata !== ~shadow[17]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
