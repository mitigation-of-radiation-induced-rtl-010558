// tb_mips_pkg: testbench helpers for the TESM-hardened MIPS core.
//
// - enc_r / enc_i / enc_j: instruction encoders (MIPS R2000 field layout).
// - mips_iss: an instruction-level reference model of the core's
//   instruction set written from the architectural rules, not from the RTL.
//   step() executes one instruction and returns how many clock cycles the
//   multi-cycle core needs for it (jump 2, branch/jr 3, ALU/immediate/store 4,
//   load 5). It follows the core's conventions: word addresses, sign-extended
//   immediates for every I-type instruction, unsigned set-on-less-than, and
//   an unknown funct or I-type opcode acting as jump-register.
// - prologue/epilogue builders: clear all registers at the start of a program
//   and store all registers to data memory at its end, so that any register
//   corruption becomes visible on the memory bus.
package tb_mips_pkg;
  import tesm_pkg::*;

  typedef logic [31:0] word_t;
  typedef word_t prog_t[$];

  function automatic word_t enc_r(opc_t fn, int rd, int rs, int rt, int sh = 0);
    return {OPC_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic word_t enc_i(opc_t op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t enc_j(int target);
    return {OPC_J, 26'(target)};
  endfunction

  // clear r1..r31
  function automatic void add_prologue(ref prog_t p);
    for (int r = 1; r < 32; r++) p.push_back(enc_i(OPC_ADDI, r, 0, 0));
  endfunction

  // store r1..r31 to dmem[base+r], then loop forever
  function automatic void add_epilogue(ref prog_t p, input int base);
    for (int r = 1; r < 32; r++) p.push_back(enc_i(OPC_SW, r, 0, base + r));
    p.push_back(enc_j(p.size()));
  endfunction

  // instruction kinds reported by the reference model
  localparam int N_KINDS = 13;
  localparam string KIND_NAMES [N_KINDS] = '{"j", "beq_taken", "beq_not", "bne_taken", "bne_not",
                                             "jr", "alu", "addi", "addiu", "andi", "ori", "lw", "sw"};

  function automatic int kind_id(string k);
    for (int i = 0; i < N_KINDS; i++) if (KIND_NAMES[i] == k) return i;
    return 0;
  endfunction

  class mips_iss;
    word_t regs [32];
    word_t imem [];
    word_t dmem [];
    word_t pc;
    // last instruction's effects
    bit    did_store;
    word_t st_addr, st_data;
    string kind;

    function new(int iwords, int dwords);
      imem = new[iwords];
      dmem = new[dwords];
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function void wr(int r, word_t v);
      if (r != 0) regs[r] = v;
    endfunction

    function int step();
      word_t ins = imem[pc % imem.size()];
      opc_t  op = ins[31:26], fn = ins[5:0];
      int    rs = int'(ins[25:21]), rt = int'(ins[20:16]), rd = int'(ins[15:11]), sh = int'(ins[10:6]);
      word_t a = regs[rs], b = regs[rt];
      word_t simm = {{16{ins[15]}}, ins[15:0]};
      word_t ea = a + simm;
      did_store = 0;
      pc = pc + 1;
      case (op)
        OPC_RTYPE: begin
          kind = "alu";
          case (fn)
            FN_ADD: wr(rd, a + b);
            FN_SUB: wr(rd, a - b);
            FN_AND: wr(rd, a & b);
            FN_OR:  wr(rd, a | b);
            FN_SLT: wr(rd, (a < b) ? 1 : 0);
            FN_SLL: wr(rd, b << sh);
            FN_SRL: wr(rd, b >> sh);
            default: begin kind = "jr"; pc = a; return 3; end
          endcase
          return 4;
        end
        OPC_J:   begin kind = "j"; pc = {6'b0, ins[25:0]}; return 2; end
        OPC_BEQ: begin kind = (a == b) ? "beq_taken" : "beq_not"; if (a == b) pc = pc + simm; return 3; end
        OPC_BNE: begin kind = (a != b) ? "bne_taken" : "bne_not"; if (a != b) pc = pc + simm; return 3; end
        OPC_ADDI:  begin kind = "addi";  wr(rt, a + simm); return 4; end
        OPC_ADDIU: begin kind = "addiu"; wr(rt, a + simm); return 4; end
        OPC_ANDI:  begin kind = "andi";  wr(rt, a & simm); return 4; end
        OPC_ORI:   begin kind = "ori";   wr(rt, a | simm); return 4; end
        OPC_LW: begin kind = "lw"; wr(rt, dmem[ea % dmem.size()]); return 5; end
        OPC_SW: begin
          kind = "sw";
          dmem[ea % dmem.size()] = b;
          did_store = 1; st_addr = ea; st_data = b;
          return 4;
        end
        default: begin kind = "jr"; pc = a; return 3; end
      endcase
    endfunction
  endclass

  // A program that uses every instruction kind of the core at least once:
  // all R-type operations, all immediates, load and store, beq/bne taken and
  // not taken, jr and j. Prologue clears the registers, epilogue stores them
  // to dmem[32..63] and ends in a jump-to-self.
  function automatic prog_t build_char_prog();
    prog_t p;
    int tgt;
    add_prologue(p);
    p.push_back(enc_i(OPC_ADDI, 1, 0, 5));
    p.push_back(enc_i(OPC_ADDI, 2, 0, 7));
    p.push_back(enc_r(FN_ADD, 3, 1, 2));
    p.push_back(enc_r(FN_SUB, 4, 2, 1));
    p.push_back(enc_r(FN_AND, 5, 1, 2));
    p.push_back(enc_r(FN_OR,  6, 1, 2));
    p.push_back(enc_r(FN_SLT, 7, 1, 2));
    p.push_back(enc_r(FN_SLL, 8, 0, 1, 3));
    p.push_back(enc_r(FN_SRL, 9, 0, 8, 2));
    p.push_back(enc_i(OPC_ADDIU, 10, 1, -1));
    p.push_back(enc_i(OPC_ANDI, 11, 2, 3));
    p.push_back(enc_i(OPC_ORI, 12, 1, 8));
    p.push_back(enc_i(OPC_SW, 3, 0, 0));
    p.push_back(enc_i(OPC_LW, 13, 0, 0));
    p.push_back(enc_i(OPC_SW, 13, 1, 1));      // dmem[6]
    p.push_back(enc_i(OPC_BEQ, 1, 1, 1));      // taken, skips next
    p.push_back(enc_i(OPC_ADDI, 14, 0, 99));
    p.push_back(enc_i(OPC_BNE, 1, 2, 1));      // taken, skips next
    p.push_back(enc_i(OPC_ADDI, 15, 0, 99));
    p.push_back(enc_i(OPC_BEQ, 1, 2, 1));      // not taken
    p.push_back(enc_i(OPC_BNE, 1, 1, 1));      // not taken
    p.push_back(enc_i(OPC_ADDI, 16, 0, 11));
    p.push_back(enc_i(OPC_ADDI, 17, 0, 22));
    tgt = p.size() + 3;
    p.push_back(enc_i(OPC_ADDI, 18, 0, tgt));
    p.push_back(enc_r(FN_JR, 0, 18, 0));       // jump to tgt
    p.push_back(enc_i(OPC_ADDI, 19, 0, 99));   // skipped
    p.push_back(enc_j(p.size() + 2));          // tgt: jump over next
    p.push_back(enc_i(OPC_ADDI, 20, 0, 99));   // skipped
    p.push_back(enc_i(OPC_LW, 21, 1, 1));      // reads dmem[6]
    p.push_back(enc_r(FN_ADD, 22, 21, 21));
    add_epilogue(p, 32);
    return p;
  endfunction

  // Program body with the instruction mix of one benchmark section:
  // counts of andi, addi, addiu, ori, j, beq, bne, R-type ALU and sw, in a
  // random order fixed by seed. Branch offsets are 0 and jumps go to the next
  // word, so the control flow is the same whether or not a branch is taken;
  // stores go to dmem[0..31]. Registers r1..r8 are used.
  function automatic prog_t build_mix_prog(int n_andi, int n_addi, int n_addiu, int n_ori,
                                           int n_j, int n_beq, int n_bne, int n_alu, int n_sw,
                                           int unsigned seed, output int body_start, output int body_len);
    int kinds[$];
    prog_t p;
    opc_t fns [7] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT, FN_SLL, FN_SRL};
    int unsigned s = seed;
    repeat (n_andi)  kinds.push_back(0);
    repeat (n_addi)  kinds.push_back(1);
    repeat (n_addiu) kinds.push_back(2);
    repeat (n_ori)   kinds.push_back(3);
    repeat (n_j)     kinds.push_back(4);
    repeat (n_beq)   kinds.push_back(5);
    repeat (n_bne)   kinds.push_back(6);
    repeat (n_alu)   kinds.push_back(7);
    repeat (n_sw)    kinds.push_back(8);
    // deterministic shuffle (linear congruential generator)
    for (int i = kinds.size() - 1; i > 0; i--) begin
      int j, t;
      s = s * 1103515245 + 12345;
      j = int'((s >> 8) % (i + 1));
      t = kinds[i]; kinds[i] = kinds[j]; kinds[j] = t;
    end
    add_prologue(p);
    // seed registers with distinct values
    for (int r = 1; r <= 8; r++) p.push_back(enc_i(OPC_ADDI, r, 0, r * 3 + 1));
    body_start = p.size();
    foreach (kinds[i]) begin
      int rd, rs, rt, imm;
      s = s * 1103515245 + 12345;
      rd = 1 + int'((s >> 4) % 8);
      rs = 1 + int'((s >> 9) % 8);
      rt = 1 + int'((s >> 14) % 8);
      imm = int'((s >> 19) % 32);
      case (kinds[i])
        0: p.push_back(enc_i(OPC_ANDI, rd, rs, imm));
        1: p.push_back(enc_i(OPC_ADDI, rd, rs, imm));
        2: p.push_back(enc_i(OPC_ADDIU, rd, rs, imm));
        3: p.push_back(enc_i(OPC_ORI, rd, rs, imm));
        4: p.push_back(enc_j(p.size() + 1));
        5: p.push_back(enc_i(OPC_BEQ, rt, rs, 0));
        6: p.push_back(enc_i(OPC_BNE, rt, rs, 0));
        7: p.push_back(enc_r(fns[(s >> 24) % 7], rd, rs, rt, imm % 5));
        default: p.push_back(enc_i(OPC_SW, rt, 0, imm));
      endcase
    end
    body_len = kinds.size();
    add_epilogue(p, 32);
    return p;
  endfunction

endpackage
