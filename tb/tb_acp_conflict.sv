// tb_acp_conflict -- self-checking test of the conflict detector. The
// expected answer is worked out from what the older instruction writes (a
// register for unit = reg, a data word for unit = dcache, nothing otherwise)
// and what the younger one reads (add: ra, rb; branch: register 0; store: ra;
// load: data word addr; set: nothing). Random operands are biased so that
// every pair of the dependency table is hit many times, and the number of
// conflicts seen for each (older unit, younger op) pair is checked to be
// non-zero where a dependency exists.
module tb_acp_conflict;
  import acp_pkg::*;
  localparam int unsigned R = 3, M = 8;
  logic [2:0] op;
  logic [R-1:0] ra, rb;
  logic [M-1:0] addr, dest;
  unit_e unit;
  logic conflict;
  int checks = 0, failures = 0;
  int hits [5][8];

  acp_conflict dut (.op, .ra, .rb, .addr, .unit, .dest, .conflict);

  function automatic bit expect_conflict();
    bit reads_reg [2**R];
    bit writes_reg, writes_mem, reads_mem;
    for (int i = 0; i < 2**R; i++) reads_reg[i] = 0;
    reads_mem  = 0;
    case (op)
      3'b000: begin reads_reg[ra] = 1; reads_reg[rb] = 1; end
      3'b001: reads_reg[0] = 1;
      3'b011: reads_reg[ra] = 1;
      3'b010: reads_mem = 1;
      default: ;
    endcase
    writes_reg = (unit == U_REG);
    writes_mem = (unit == U_DCACHE);
    // register results come from pad(rc) / pad(ra): the upper dest bits are 0
    return (writes_reg && reads_reg[dest[R-1:0]]) || (writes_mem && reads_mem && addr == dest);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      op = 3'($urandom_range(0, 7));
      ra = R'($urandom); rb = R'($urandom);
      addr = M'($urandom);
      case ($urandom_range(0, 4))
        0: unit = U_REG; 1: unit = U_PC; 2: unit = U_INCPC; 3: unit = U_DCACHE;
        default: unit = U_WAIT;
      endcase
      if (unit == U_DCACHE) dest = ($urandom_range(0, 1) == 1) ? addr : M'($urandom);
      else begin
        dest = M'($urandom_range(0, 2**R - 1));
        if ($urandom_range(0, 2) == 0) dest = M'(ra);
        else if ($urandom_range(0, 2) == 0) dest = M'(rb);
      end
      #1;
      checks++;
      if (conflict !== expect_conflict()) begin
        failures++;
        $display("op %0d ra %0d rb %0d addr %0d unit %s dest %0d: got %b", op, ra, rb, addr,
                 unit.name(), dest, conflict);
      end
      if (conflict) hits[int'(unit)][op]++;
    end
    // every dependency of the table occurred: reg->add/branch/store, dcache->load
    checks += 4;
    if (hits[U_REG][0] == 0) failures++;
    if (hits[U_REG][1] == 0) failures++;
    if (hits[U_REG][3] == 0) failures++;
    if (hits[U_DCACHE][2] == 0) failures++;
    // and none where the table has none
    checks++;
    if (hits[U_REG][2] + hits[U_REG][4] + hits[U_DCACHE][0] + hits[U_DCACHE][3] +
        hits[U_PC][0] + hits[U_INCPC][0] + hits[U_WAIT][0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
