// vliw_tb_pkg: test support for the low-power VLIW. Operation encoders (an assembler
// in functions) and ref_model, an instruction-set reference that executes one bundle
// at a time with plain sequential semantics (all sources read before any result is
// written), ignoring the inhibit bits. Exceptions follow the machine's rule: the
// excepting bundle completes (the offending operation does nothing), then execution
// continues at the vector with EPC = address of the next bundle.
package vliw_tb_pkg;
  import vliw_pkg::*;

  function automatic slot_enc_t enc(input logic [5:0] opc, input int rd, input int rs1,
                                    input int rs2_or_imm, input bit imm_form,
                                    input bit wi = 0, input bit ri1 = 0, input bit ri2 = 0);
    slot_enc_t e;
    e.wi = wi; e.ri1 = ri1; e.ri2 = ri2;
    e.word[31:26] = imm_form ? (opc | OP_IMM_BIT) : opc;
    e.word[25:20] = 6'(rd);
    e.word[19:14] = 6'(rs1);
    e.word[13:0]  = imm_form ? 14'(rs2_or_imm) : {6'(rs2_or_imm), 8'h00};
    return e;
  endfunction

  function automatic slot_enc_t rr(input opcode_t o, input int rd, input int rs1, input int rs2);
    return enc(6'(o), rd, rs1, rs2, 0);
  endfunction
  function automatic slot_enc_t ri(input opcode_t o, input int rd, input int rs1, input int imm);
    return enc(6'(o), rd, rs1, imm, 1);
  endfunction
  function automatic slot_enc_t ldw(input int rd, input int rs1, input int imm);
    return enc(6'(OP_LDW), rd, rs1, imm, 0);
  endfunction
  function automatic slot_enc_t ldw_fix(input int rd, input int rs1, input int imm);
    slot_enc_t e = enc(6'(OP_LDW), rd, rs1, 0, 0);
    e.word[13:0] = 14'(imm);
    return e;
  endfunction
  function automatic slot_enc_t stw(input int rdata, input int rs1, input int imm);
    slot_enc_t e = enc(6'(OP_STW), rdata, rs1, 0, 0);
    e.word[13:0] = 14'(imm);
    return e;
  endfunction
  function automatic slot_enc_t ctl(input opcode_t o, input int rs1, input int off);
    slot_enc_t e = enc(6'(o), 0, rs1, 0, 0);
    e.word[13:0] = 14'(off);
    return e;
  endfunction
  function automatic slot_enc_t nop();
    return '0;
  endfunction

  typedef struct {
    bit    we   [NSLOT];
    int    rd   [NSLOT];
    word_t data [NSLOT];
    bit    exc;
    pc_t   next_pc;
  } step_t;

  class ref_model;
    word_t regs [NREG];
    word_t mem  [];
    pc_t   pc;
    pc_t   epc;
    pc_t   vector;

    function new(int words, pc_t vec);
      mem = new[words];
      foreach (regs[i]) regs[i] = '0;
      foreach (mem[i])  mem[i]  = '0;
      pc = '0; epc = '0; vector = vec;
    endfunction

    static function word_t alu(input logic [5:0] base, input word_t a, input word_t b);
      case (base)
        6'(OP_ADD):   return a + b;
        6'(OP_SUB):   return a - b;
        6'(OP_AND):   return a & b;
        6'(OP_OR):    return a | b;
        6'(OP_XOR):   return a ^ b;
        6'(OP_SHL):   return a << b[4:0];
        6'(OP_SHR):   return word_t'($signed(a) >>> b[4:0]);
        6'(OP_SHRU):  return a >> b[4:0];
        6'(OP_MUL):   return a * b;
        6'(OP_CMPEQ): return (a == b) ? 1 : 0;
        6'(OP_CMPLT): return ($signed(a) < $signed(b)) ? 1 : 0;
        default:      return '0;
      endcase
    endfunction

    // Execute the bundle at pc; enter the handler after it when `take` is set
    // (the machine served an exception or interrupt on this bundle).
    function step_t step(input bundle_t b, input bit take);
      step_t r;
      word_t rv [NREG];
      pc_t   nxt;
      bit    exc;
      rv  = regs;
      nxt = pc + 1'b1;
      exc = 0;
      for (int s = 0; s < NSLOT; s++) begin
        logic [31:0] w;
        logic [5:0]  opc, base;
        bit          immf;
        word_t       a, bb, imm, addr;
        w = b[s].word; opc = w[31:26]; base = opc & ~OP_IMM_BIT; immf = opc[5];
        a = rv[w[19:14]]; bb = rv[w[13:8]]; imm = sext14(w[13:0]);
        r.we[s] = 0; r.rd[s] = w[25:20]; r.data[s] = '0;
        if (base >= 6'(OP_ADD) && base <= 6'(OP_CMPLT)) begin
          r.we[s] = 1; r.data[s] = alu(base, a, immf ? imm : bb);
        end else if (opc == 6'(OP_NOP)) begin
        end else if (s == MEM_SLOT && opc == 6'(OP_LDW)) begin
          addr = a + imm;
          r.we[s] = 1;
          if (addr[1:0] != 0) begin exc = 1; r.data[s] = '0; end
          else r.data[s] = mem[addr[31:2] % mem.size()];
        end else if (s == MEM_SLOT && opc == 6'(OP_STW)) begin
          addr = a + imm;
          if (addr[1:0] != 0) exc = 1;
          else mem[addr[31:2] % mem.size()] = rv[w[25:20]];
        end else if (s == MEM_SLOT && opc == 6'(OP_BR)) begin
          if (a != 0) nxt = pc + pc_t'(imm);
        end else if (s == MEM_SLOT && opc == 6'(OP_BRF)) begin
          if (a == 0) nxt = pc + pc_t'(imm);
        end else if (s == MEM_SLOT && opc == 6'(OP_GOTO)) begin
          nxt = pc + pc_t'(imm);
        end else if (s == MEM_SLOT && opc == 6'(OP_RFI)) begin
          nxt = epc;
        end else if (s == MEM_SLOT && opc == 6'(OP_TRAP)) begin
          exc = 1;
        end else begin
          exc = 1;   // illegal operation
        end
        if (r.rd[s] == 0) r.we[s] = 0;
      end
      for (int s = 0; s < NSLOT; s++) if (r.we[s]) regs[r.rd[s]] = r.data[s];
      if (take) begin
        epc = nxt;
        nxt = vector;
      end
      r.exc = exc;
      r.next_pc = nxt;
      pc = nxt;
      return r;
    endfunction
  endclass

  // Random program generator. Straight-line basic blocks of NSLOT-wide bundles; each
  // block ends with a conditional branch to the following block, taken or not. The
  // Read/Write Inhibit bits are then set by a liveness analysis inside each block, as
  // a compiler would: a definition is write-inhibited when it is redefined in the
  // same block and all its uses lie 1..lmax bundles after it; a source is
  // read-inhibited when its reaching definition lies in the same block, 1..FWD_DEPTH
  // bundles before. Registers r1..r15 carry the program; r60..r63 belong to the
  // exception handler. A load result is never used by the next bundle.
  class prog_gen;
    slot_enc_t prog [1024][NSLOT];
    int      bb_start [$];
    int      n_bundles;
    int      end_pc;
    int      lmax;
    int      p_exc;      // per-mille chance of an exception-raising operation per bundle

    function new(int lmax_i, int p_exc_i);
      foreach (prog[i, j]) prog[i][j] = '0;
      lmax = lmax_i; p_exc = p_exc_i;
    endfunction

    function bundle_t get(int a);
      bundle_t b;
      for (int s = 0; s < NSLOT; s++) b[s] = prog[a][s];
      return b;
    endfunction

    static function bit reads(slot_enc_t e, int sidx, int r);
      logic [5:0] opc = e.word[31:26];
      logic [5:0] base = opc & ~OP_IMM_BIT;
      if (r == 0) return 0;
      if (base >= 6'(OP_ADD) && base <= 6'(OP_CMPLT))
        return (e.word[19:14] == 6'(r)) || (!opc[5] && e.word[13:8] == 6'(r));
      if (sidx != MEM_SLOT) return 0;
      if (opc == 6'(OP_LDW) || opc == 6'(OP_BR) || opc == 6'(OP_BRF)) return e.word[19:14] == 6'(r);
      if (opc == 6'(OP_STW)) return (e.word[19:14] == 6'(r)) || (e.word[25:20] == 6'(r));
      return 0;
    endfunction

    static function int writes(slot_enc_t e, int sidx);
      logic [5:0] opc = e.word[31:26];
      logic [5:0] base = opc & ~OP_IMM_BIT;
      if (base >= 6'(OP_ADD) && base <= 6'(OP_CMPLT)) return int'(e.word[25:20]);
      if (sidx == MEM_SLOT && opc == 6'(OP_LDW)) return int'(e.word[25:20]);
      return 0;
    endfunction

    function automatic slot_enc_t rand_alu(int rd, int ldbar);
      int r1, r2;
      do r1 = $urandom_range(0, 15); while (r1 == ldbar && r1 != 0);
      do r2 = $urandom_range(1, 15); while (r2 == ldbar);
      if ($urandom_range(0, 3) == 0)
        return enc(6'($urandom_range(1, 11)), rd, r1, $urandom_range(0, 300) - 150, 1);
      return enc(6'($urandom_range(1, 11)), rd, r1, r2, 0);
    endfunction

    function void generate_program(int n_bb, int vector);
      int pc = 0;
      int ldbar = -1;
      // initialise every register: r1..r15 random, the others zero
      for (int r = 1; r < NREG; r += NSLOT) begin
        for (int s = 0; s < NSLOT; s++)
          if (r + s < NREG)
            prog[pc][s] = ri(OP_ADD, r + s, 0, (r + s <= 15) ? $urandom_range(0, 4000) - 2000 : 0);
        pc++;
      end
      for (int b = 0; b < n_bb; b++) begin
        int len = $urandom_range(3, 9);
        bb_start.push_back(pc);
        for (int i = 0; i < len; i++) begin
          int used [$];
          int newbar = -1;
          for (int s = 0; s < NSLOT; s++) begin
            int rd;
            do rd = $urandom_range(1, 15); while (rd inside {used});
            used.push_back(rd);
            if (s == MEM_SLOT && i == len - 1) begin
              int c;
              do c = $urandom_range(1, 15); while (c == ldbar);
              prog[pc][s] = ctl($urandom_range(0, 1) ? OP_BR : OP_BRF, c, 1);
            end else if (s == MEM_SLOT && $urandom_range(0, 9) < 2) begin
              int base_r = 0;
              prog[pc][s] = ldw_fix(rd, base_r, 4 * $urandom_range(0, 63));
              newbar = rd;
            end else if (s == MEM_SLOT && $urandom_range(0, 9) < 2) begin
              int d;
              do d = $urandom_range(1, 15); while (d == ldbar);
              prog[pc][s] = stw(d, 0, 4 * $urandom_range(0, 63));
            end else if ($urandom_range(0, 9) == 0) begin
              prog[pc][s] = nop();
            end else begin
              prog[pc][s] = rand_alu(rd, ldbar);
            end
          end
          // occasional exception sources
          if ($urandom_range(0, 999) < p_exc) begin
            case ($urandom_range(0, 2))
              0: if (i != len - 1) prog[pc][MEM_SLOT] = ctl(OP_TRAP, 0, 0);
              1: prog[pc][2] = ldw_fix(used[2], 0, 8);                 // illegal slot
              default: if (i != len - 1) begin
                int d;
                do d = $urandom_range(1, 15); while (d == ldbar);
                prog[pc][MEM_SLOT] = stw(d, 0, 4 * $urandom_range(0, 63) + 1);
                newbar = -1;
              end
            endcase
          end
          ldbar = newbar;
          pc++;
        end
      end
      bb_start.push_back(pc);
      end_pc = pc;
      prog[pc][MEM_SLOT] = ctl(OP_GOTO, 0, 0);          // park: jump to itself
      n_bundles = pc + 1;
      // exception handler: count entries in r60, then return
      prog[vector][0]     = ri(OP_ADD, 60, 60, 1);
      prog[vector + 1][1] = ri(OP_ADD, 61, 60, 7);
      prog[vector + 2][0] = ctl(OP_RFI, 0, 0);
      analyse();
    endfunction

    // Liveness analysis inside each basic block sets the inhibit bits.
    function void analyse();
      for (int k = 0; k + 1 < bb_start.size(); k++) begin
        int b0 = bb_start[k], b1 = bb_start[k + 1];
        for (int i = b0; i < b1; i++) begin
          for (int s = 0; s < NSLOT; s++) begin
            int r = writes(prog[i][s], s);
            int redef = -1, last_use = -1;
            if (r == 0) continue;
            for (int j = i + 1; j < b1 && redef < 0; j++) begin
              for (int t = 0; t < NSLOT; t++) begin
                if (reads(prog[j][t], t, r)) last_use = j;
                if (writes(prog[j][t], t) == r) redef = j;
              end
            end
            prog[i][s].wi = (redef >= 0 && last_use > i && last_use - i <= lmax);
          end
          for (int s = 0; s < NSLOT; s++) begin
            int r1 = int'(prog[i][s].word[19:14]);
            int r2 = (prog[i][s].word[31:26] == 6'(OP_STW)) ? int'(prog[i][s].word[25:20])
                                                             : int'(prog[i][s].word[13:8]);
            prog[i][s].ri1 = reach_ok(b0, i, r1);
            prog[i][s].ri2 = reach_ok(b0, i, r2);
          end
        end
      end
    endfunction

    function bit reach_ok(int b0, int u, int r);
      if (r == 0) return 0;
      for (int d = u - 1; d >= b0 && d >= u - int'(FWD_DEPTH); d--)
        for (int t = 0; t < NSLOT; t++)
          if (writes(prog[d][t], t) == r) return 1;
      return 0;
    endfunction
  endclass

endpackage
