// spm_ref_pkg -- instruction-level reference model of the SPM architecture,
// used by the end-to-end testbench to check the pipelined core.
//
// The model holds the architectural state (program memory mp, data memory md,
// registers reg, program counter pc) and step() executes one instruction:
//   add ra rb rc : reg[rc] := reg[ra] + reg[rb];   pc := pc + 1
//   branch addr  : pc := pc + addr if reg[0] = 0, else pc := pc + 1
//   load ra addr : reg[ra] := md[addr];            pc := pc + 1
//   store ra addr: md[addr] := reg[ra];            pc := pc + 1
//   set ra val   : reg[ra] := val (zero-extended); pc := pc + 1
// Op codes 101, 110, 111 only advance pc, as in the core. Instruction fields
// use the core's layout: op in the top 3 bits, then ra, then rb, rc or
// addr/val.
package spm_ref_pkg;

  class spm_model #(int unsigned R = 3, int unsigned M = 8, int unsigned W = 16);
    logic [W-1:0] mp [2**M];
    logic [W-1:0] md [2**M];
    logic [W-1:0] rf [2**R];
    logic [M-1:0] pc;

    function void reset();
      pc = '0;
      foreach (rf[i]) rf[i] = '0;
    endfunction

    static function logic [2:0] f_op(logic [W-1:0] i);   return i[W-1 -: 3];     endfunction
    static function logic [R-1:0] f_ra(logic [W-1:0] i); return i[W-4 -: R];     endfunction
    static function logic [R-1:0] f_rb(logic [W-1:0] i); return i[W-4-R -: R];   endfunction
    static function logic [R-1:0] f_rc(logic [W-1:0] i); return i[W-4-2*R -: R]; endfunction
    static function logic [M-1:0] f_ad(logic [W-1:0] i); return i[W-4-R -: M];   endfunction

    static function logic [W-1:0] enc(int op, int ra, int rb, int rc, int ad);
      logic [W-1:0] i = '0;
      i[W-1 -: 3] = 3'(op);
      i[W-4 -: R] = R'(ra);
      if (op == 0) begin
        i[W-4-R -: R]   = R'(rb);
        i[W-4-2*R -: R] = R'(rc);
      end else begin
        i[W-4-R -: M] = M'(ad);
      end
      return i;
    endfunction

    // Executes mp[pc]; returns its op code.
    function logic [2:0] step();
      logic [W-1:0] i = mp[pc];
      logic [2:0] op = f_op(i);
      case (op)
        3'b000: begin rf[f_rc(i)] = rf[f_ra(i)] + rf[f_rb(i)]; pc = pc + 1'b1; end
        3'b001: pc = (rf[0] == '0) ? pc + f_ad(i) : pc + 1'b1;
        3'b010: begin rf[f_ra(i)] = md[f_ad(i)]; pc = pc + 1'b1; end
        3'b011: begin md[f_ad(i)] = rf[f_ra(i)]; pc = pc + 1'b1; end
        3'b100: begin rf[f_ra(i)] = W'(f_ad(i)); pc = pc + 1'b1; end
        default: pc = pc + 1'b1;
      endcase
      return op;
    endfunction
  endclass

endpackage
