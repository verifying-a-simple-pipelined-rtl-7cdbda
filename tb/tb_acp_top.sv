// tb_acp_top -- end-to-end test of the ACP pipeline at its default size
// (8 registers, 256-word memories, 16-bit words), checked against the SPM
// instruction-level reference model.
//
// Each program is loaded into the instruction memory and the data memory
// while reset is held. After reset the core runs; every cycle in which an
// execution triple is committed (unit /= wait) the reference model executes
// one instruction, and after the clock edge pc and all registers must agree
// with it, and the data word a store wrote. At every such step the testbench
// also checks the pipeline timing: the number of cycles between two steps is
// 4 from boot, 3 after a taken branch, 2 after a stall and 1 with the
// pipeline full. At each step the pipeline must also be in one of its four
// legal states: fpc runs 0, 1, 2 or 3 ahead of pc, the instruction register
// holds mp[fpc - 1] (all but boot) and the decode unit the decoded mp[fpc - 2]
// (stall and full). At the end of each program the whole data memory is
// compared.
//
// Programs: a directed counting loop whose result (3 * N) is known without
// the model, then pseudo-random programs biased towards few registers and
// data addresses so that every dependency pair of the conflict table occurs.
// The testbench counts commits of each instruction, taken and not-taken
// branches, stalls for each dependency pair, refills after a branch and boot,
// and fails if any of them never happened. It also fails unless every case
// (pipeline state at a step x next two instructions x dependent or not) that
// can occur has occurred.
module tb_acp_top;
  import acp_pkg::*;
  import spm_ref_pkg::*;

  localparam int unsigned R = 3, M = 8, W = 16;
  localparam int N_RANDOM = 150;       // random programs
  localparam int RUN_CYCLES = 600;     // cycles per random program

  typedef spm_model #(R, M, W) model_t;

  logic clk = 0;
  always #500 clk = ~clk;

  logic         rst;
  logic         imem_we;
  logic [M-1:0] imem_waddr;
  logic [W-1:0] imem_wdata;
  logic         dmem_ext_we;
  logic [M-1:0] dmem_ext_addr;
  logic [W-1:0] dmem_ext_wdata, dmem_ext_rdata;
  logic [R-1:0] dbg_reg_addr;
  logic [W-1:0] dbg_reg_data;
  logic [M-1:0] pc, fpc;
  unit_e        unit;
  logic [1:0]   rst_ctr;
  logic         stall;

  acp_top dut (.*);

  model_t ref_m;
  int checks = 0, failures = 0;
  int cycle, last_step, want_dur, want_ahead;
  int n_commit [8];
  int n_taken = 0, n_not_taken = 0, n_stall_cycles = 0, n_boot = 0, n_after_branch = 0;
  int n_after_stall = 0, n_full = 0;
  int n_pair [5][5];  // stalls by (older op, younger op)
  int cov [4][5][5][2];  // state at a step x next two instructions x dependent

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    #(1000.0 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load the model's memories into the core, with reset held.
  task automatic load_program();
    rst = 1;
    for (int a = 0; a < 2**M; a++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = M'(a); imem_wdata = ref_m.mp[a];
      dmem_ext_we = 1; dmem_ext_addr = M'(a); dmem_ext_wdata = ref_m.md[a];
    end
    @(negedge clk);
    imem_we = 0; dmem_ext_we = 0;
    ref_m.reset();
  endtask

  // Does instruction i2 read what instruction i1 writes?
  function automatic bit depends(logic [W-1:0] i1, logic [W-1:0] i2);
    int wr;          // register written by i1, or -1
    int wm;          // data address written by i1, or -1
    wr = -1; wm = -1;
    case (model_t::f_op(i1))
      3'b000: wr = int'(model_t::f_rc(i1));
      3'b010, 3'b100: wr = int'(model_t::f_ra(i1));
      3'b011: wm = int'(model_t::f_ad(i1));
      default: ;
    endcase
    case (model_t::f_op(i2))
      3'b000: return wr == int'(model_t::f_ra(i2)) || wr == int'(model_t::f_rb(i2));
      3'b001: return wr == 0;
      3'b011: return wr == int'(model_t::f_ra(i2));
      3'b010: return wm == int'(model_t::f_ad(i2));
      default: return 0;
    endcase
  endfunction

  // Classify the state just after a step; give its duration and fpc - pc.
  task automatic classify();
    int st, o1, o2, dp;
    logic [W-1:0] i1, i2;
    if (unit != U_WAIT) begin
      want_dur = 1; want_ahead = 3; n_full++; st = 3;
    end else if (rst_ctr == 2'd0) begin
      want_dur = 2; want_ahead = 2; n_after_stall++; st = 2;
    end else if (rst_ctr == 2'd1) begin
      want_dur = 3; want_ahead = 1; n_after_branch++; st = 1;
    end else begin
      want_dur = 4; want_ahead = 0; n_boot++; st = 0;
    end
    i1 = ref_m.mp[pc];
    i2 = ref_m.mp[M'(pc + 1'b1)];
    o1 = int'(model_t::f_op(i1));
    o2 = int'(model_t::f_op(i2));
    dp = int'(depends(i1, i2));
    if (o1 < 5 && o2 < 5) cov[st][o1][o2][dp]++;
    check(M'(fpc - pc) == M'(want_ahead), $sformatf("fpc %0d pc %0d, expected %0d ahead",
          fpc, pc, want_ahead));
    // fetch holds mp[fpc - 1]; from the stall state on, decode holds mp[fpc - 2]
    if (want_ahead >= 1)
      check(dut.u_fetch.ir == ref_m.mp[M'(fpc - 1)], "instruction register");
    if (want_ahead >= 2) begin
      logic [W-1:0] i;
      i = ref_m.mp[M'(fpc - 2)];
      check(dut.u_decode.op == model_t::f_op(i) && dut.u_decode.ra == model_t::f_ra(i) &&
            dut.u_decode.rb == model_t::f_rb(i) && dut.u_decode.rc == model_t::f_rc(i) &&
            dut.u_decode.addr == model_t::f_ad(i), "decoded instruction");
    end
  endtask

  task automatic compare_regs();
    for (int i = 0; i < 2**R; i++) begin
      dbg_reg_addr = R'(i);
      #1;
      check(dbg_reg_data == ref_m.rf[i], $sformatf("r%0d = %h, expected %h", i,
            dbg_reg_data, ref_m.rf[i]));
    end
  endtask

  // Run the loaded program for n cycles.
  task automatic run(int n);
    logic [2:0] op, op1, op2;
    logic [M-1:0] st_addr;
    bit was_store;
    @(negedge clk);
    rst = 0;
    cycle = 0; last_step = 0;
    #1 classify();              // boot state
    for (int c = 0; c < n; c++) begin
      // just before the rising edge: what will be committed / why we stall
      if (stall) begin
        n_stall_cycles++;
        op1 = model_t::f_op(ref_m.mp[pc]);
        op2 = model_t::f_op(ref_m.mp[M'(pc + 1'b1)]);
        if (op1 < 5 && op2 < 5) n_pair[op1][op2]++;
      end
      was_store = (unit == U_DCACHE);
      st_addr = model_t::f_ad(ref_m.mp[ref_m.pc]);
      if (unit == U_PC) n_taken++;
      if (unit == U_INCPC) n_not_taken++;
      if (unit != U_WAIT) begin
        @(posedge clk);
        op = ref_m.step();
        n_commit[op]++;
        cycle++;
        @(negedge clk);
        check(pc == ref_m.pc, $sformatf("pc %0d, expected %0d", pc, ref_m.pc));
        check(cycle - last_step == want_dur, $sformatf("step took %0d cycles, expected %0d",
              cycle - last_step, want_dur));
        last_step = cycle;
        compare_regs();
        if (was_store) begin
          dmem_ext_addr = st_addr;
          #1 check(dmem_ext_rdata == ref_m.md[st_addr], $sformatf("md[%0d]", st_addr));
        end
        classify();
      end else begin
        @(posedge clk);
        cycle++;
        @(negedge clk);
        #1;
      end
    end
    // whole data memory
    for (int a = 0; a < 2**M; a++) begin
      dmem_ext_addr = M'(a);
      #1 check(dmem_ext_rdata == ref_m.md[a], $sformatf("final md[%0d]", a));
    end
  endtask

  // Directed program: md[2] := 3 * md[0] with a counting loop.
  task automatic directed(int count);
    for (int a = 0; a < 2**M; a++) begin
      ref_m.mp[a] = model_t::enc(1, 0, 0, 0, 0);   // branch +0: stop here
      ref_m.md[a] = '0;
    end
    ref_m.md[0] = W'(count);
    ref_m.md[1] = '1;                                // -1
    ref_m.mp[0]  = model_t::enc(2, 5, 0, 0, 0);      // load  r5 0     counter
    ref_m.mp[1]  = model_t::enc(2, 1, 0, 0, 1);      // load  r1 1     -1
    ref_m.mp[2]  = model_t::enc(4, 2, 0, 0, 0);      // set   r2 0     acc
    ref_m.mp[3]  = model_t::enc(4, 3, 0, 0, 3);      // set   r3 3
    ref_m.mp[4]  = model_t::enc(0, 5, 6, 0, 0);      // add   r5 r6 r0 (r6 = 0)
    ref_m.mp[5]  = model_t::enc(1, 0, 0, 0, 5);      // branch +5 -> 10 if r0 = 0
    ref_m.mp[6]  = model_t::enc(0, 2, 3, 2, 0);      // add   r2 r3 r2
    ref_m.mp[7]  = model_t::enc(0, 5, 1, 5, 0);      // add   r5 r1 r5
    ref_m.mp[8]  = model_t::enc(4, 0, 0, 0, 0);      // set   r0 0
    ref_m.mp[9]  = model_t::enc(1, 0, 0, 0, 251);    // branch -5 -> 4
    ref_m.mp[10] = model_t::enc(3, 2, 0, 0, 2);      // store r2 2
    ref_m.mp[11] = model_t::enc(4, 0, 0, 0, 0);      // set   r0 0
    load_program();
    run(20 + 12 * count);
    dmem_ext_addr = 8'd2;
    #1 check(dmem_ext_rdata == W'(3 * count), $sformatf("loop result %0d, expected %0d",
             dmem_ext_rdata, 3 * count));
    check(pc == 8'd12, "loop did not reach its end");
  endtask

  task automatic random_program();
    int op, ra, rb, rc, ad;
    for (int a = 0; a < 2**M; a++) begin
      op = $urandom_range(0, 99);
      op = (op < 30) ? 0 : (op < 45) ? 1 : (op < 60) ? 2 : (op < 75) ? 3 : 4;
      ra = $urandom_range(0, 3); rb = $urandom_range(0, 3); rc = $urandom_range(0, 3);
      if ($urandom_range(0, 3) == 0) begin
        ra = $urandom_range(0, 7); rb = $urandom_range(0, 7); rc = $urandom_range(0, 7);
      end
      if (op == 1) ad = $urandom_range(0, 255);
      else if (op == 4) ad = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 255);
      else ad = $urandom_range(0, 7);
      ref_m.mp[a] = model_t::enc(op, ra, rb, rc, ad);
      ref_m.md[a] = W'($urandom);
    end
    load_program();
    run(RUN_CYCLES);
  endtask

  initial begin
    ref_m = new();
    rst = 1; imem_we = 0; imem_waddr = '0; imem_wdata = '0;
    dmem_ext_we = 0; dmem_ext_addr = '0; dmem_ext_wdata = '0; dbg_reg_addr = '0;
    directed(5);
    directed(0);
    for (int p = 0; p < N_RANDOM; p++) random_program();

    $display("commits add %0d branch %0d load %0d store %0d set %0d", n_commit[0],
             n_commit[1], n_commit[2], n_commit[3], n_commit[4]);
    $display("taken %0d not taken %0d stall cycles %0d", n_taken, n_not_taken, n_stall_cycles);
    $display("states at step: boot %0d after-branch %0d stall %0d full %0d", n_boot,
             n_after_branch, n_after_stall, n_full);
    for (int i = 0; i < 5; i++) check(n_commit[i] > 0, $sformatf("op %0d never committed", i));
    check(n_taken > 0, "no taken branch");
    check(n_not_taken > 0, "no branch not taken");
    check(n_stall_cycles > 0, "no stall");
    check(n_after_branch > 0 && n_after_stall > 0 && n_full > 0 && n_boot > 0,
          "a pipeline state never occurred");
    // the dependency pairs of the conflict table: (older, younger)
    for (int o = 0; o < 5; o++) begin
      for (int y = 0; y < 5; y++) begin
        bit dep;
        dep = (o == 0 || o == 2 || o == 4) ? (y == 0 || y == 1 || y == 3) : (o == 3 && y == 2);
        if (dep) check(n_pair[o][y] > 0, $sformatf("no stall for pair %0d -> %0d", o, y));
        else check(n_pair[o][y] == 0, $sformatf("stall for pair %0d -> %0d", o, y));
        $write("%6d", n_pair[o][y]);
      end
      $write("\n");
    end
    // case coverage: after-branch, stall and full states, each ordered pair
    // of instructions, with and without a dependency where one is possible.
    // A stall state never starts with set (set cannot conflict).
    begin
      int cases;
      cases = 0;
      for (int st = 1; st < 4; st++)
        for (int o = 0; o < 5; o++)
          for (int y = 0; y < 5; y++)
            for (int d = 0; d < 2; d++) begin
              bit dep_possible;
              dep_possible = (o == 0 || o == 2 || o == 4) ? (y == 0 || y == 1 || y == 3)
                                                         : (o == 3 && y == 2);
              if ((d == 1 && !dep_possible) || (st == 2 && o == 4)) continue;
              cases++;
              check(cov[st][o][y][d] > 0, $sformatf("case state %0d pair %0d -> %0d dep %0d never ran",
                    st, o, y, d));
            end
      $display("pipeline-state x instruction-pair cases covered: %0d", cases);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
